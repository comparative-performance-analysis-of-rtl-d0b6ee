// tb_spa_decision: decision passes on a small code (M = 16).
// Frame 1 has random LLRs and messages: every streamed bit must equal the
// sign of the reference total LLR (Lj + all Lij of the column, fp16 sums in
// column-list order) and parity_ok must match the reference parity check.
// Frame 2 has LLRs and messages consistent with the all-zero codeword, so
// the parity check must pass. The pass length is checked against
// 2 + sum over columns of (3 + 5d) + sum over checked rows of (3 + 2d).
module tb_spa_decision;
  import tb_spa_ref::*;
  localparam int M  = 16;
  localparam int R  = 3 * M;
  localparam int N  = 5 * M;
  localparam int E  = R * 6;
  localparam int RW = $clog2(R);
  localparam int NW = $clog2(N);
  localparam int EW = $clog2(E);

  logic clk = 0, rst_n = 0, start = 0, busy, done, gen_done, parity_ok;
  logic [NW-1:0] col_idx, llr_raddr, row_col, dec_addr;
  logic [2:0]    col_slot, col_cnt, col_rslot, row_slot, row_cnt;
  logic [RW-1:0] col_row, row_idx;
  logic [EW-1:0] lij_raddr;
  logic [15:0]   lij_rdata, llr_rdata;
  logic          dec_valid, dec_data;
  logic [15:0]   llr [N];
  logic [15:0]   lij [E];
  logic          got [N];
  int            ngot [N];
  int checks = 0, failures = 0;

  int rc [R];
  int rl [R][6];
  int cc [N];
  int ce [N][6];

  spa_hmatrix #(.M(M)) u_h (.clk, .rst_n, .en(1'b1), .gen_done,
    .row_idx, .row_slot, .row_cnt, .row_col,
    .col_idx, .col_slot, .col_cnt, .col_row, .col_rslot);

  spa_decision #(.M(M)) dut (.clk, .rst_n, .en(1'b1), .start, .busy, .done, .parity_ok,
    .col_idx, .col_slot, .col_cnt, .col_row, .col_rslot,
    .row_idx, .row_slot, .row_cnt, .row_col,
    .llr_raddr, .llr_rdata, .lij_raddr, .lij_rdata, .dec_valid, .dec_addr, .dec_data);

  always #5 clk = ~clk;
  always_ff @(posedge clk) lij_rdata <= lij[lij_raddr];
  always_ff @(posedge clk) llr_rdata <= llr[llr_raddr];
  always_ff @(posedge clk) if (rst_n && dec_valid) begin got[dec_addr] <= dec_data; ngot[dec_addr]++; end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_frame(string name);
    logic bits [N];
    logic ok;
    int cyc, expcyc, fail_row;
    foreach (ngot[c]) ngot[c] = 0;
    expcyc = 1;
    for (int c = 0; c < N; c++) begin
      fp16_t sum;
      sum = llr[c];
      for (int s = 0; s < cc[c]; s++) sum = add(sum, lij[ce[c][s]]);
      bits[c] = is_neg(sum);
      expcyc += 3 + 5 * cc[c];
    end
    ok = 1;
    fail_row = -1;
    for (int r = 0; r < R && ok; r++) begin
      logic p;
      p = 0;
      for (int s = 0; s < rc[r]; s++) p ^= bits[rl[r][s]];
      expcyc += 3 + 2 * rc[r];
      if (p) begin ok = 0; fail_row = r; end
    end
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks += 2;
    if (cyc != expcyc) begin
      failures++;
      $display("%s: pass took %0d cycles, expected %0d", name, cyc, expcyc);
    end
    if (parity_ok !== ok) begin
      failures++;
      $display("%s: parity_ok %b expected %b (first failing row %0d)", name, parity_ok, ok, fail_row);
    end
    @(negedge clk);
    for (int c = 0; c < N; c++) begin
      checks++;
      if (ngot[c] != 1 || got[c] !== bits[c]) begin
        failures++;
        if (failures < 10) $display("%s: bit %0d = %b (%0d times) expected %b", name, c, got[c], ngot[c], bits[c]);
      end
    end
  endtask

  initial begin
    foreach (rc[r]) rc[r] = 0;
    foreach (cc[c]) cc[c] = 0;
    for (int t = 0; t < 15; t++)
      for (int i = 0; i < M; i++) begin
        int r, c;
        r = term_row(M, t, i);
        c = term_col(M, t, i);
        rl[r][rc[r]] = c;
        ce[c][cc[c]] = r * 6 + rc[r];
        rc[r]++;
        cc[c]++;
      end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    while (!gen_done) @(negedge clk);
    // frame 1: random
    for (int c = 0; c < N; c++) llr[c] = from_real(8.0 * (real'($urandom % 10000) / 10000.0) - 4.0);
    for (int e = 0; e < E; e++) lij[e] = from_real(4.0 * (real'($urandom % 10000) / 10000.0) - 2.0);
    run_frame("random");
    // frame 2: all-zero codeword, positive beliefs
    for (int c = 0; c < N; c++) llr[c] = from_real(0.5 + 3.0 * (real'($urandom % 10000) / 10000.0));
    for (int e = 0; e < E; e++) lij[e] = from_real(0.1 + real'($urandom % 10000) / 10000.0);
    run_frame("codeword");
    checks++;
    if (!parity_ok) begin failures++; $display("codeword frame failed the parity check"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
