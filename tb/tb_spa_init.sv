// tb_spa_init: loads a frame of random LLRs from a one-cycle-latency source
// on a small code (M = 16) and checks that the channel LLR memory receives
// every LLR once at its address, that every edge's variable-to-check
// message is set to the LLR of its column exactly once, and the pass length
// 2 + sum over columns of 3 + 2*d cycles.
module tb_spa_init;
  import tb_spa_ref::*;
  localparam int M  = 16;
  localparam int R  = 3 * M;
  localparam int N  = 5 * M;
  localparam int E  = R * 6;
  localparam int RW = $clog2(R);
  localparam int NW = $clog2(N);
  localparam int EW = $clog2(E);

  logic clk = 0, rst_n = 0, start = 0, busy, done, gen_done;
  logic [NW-1:0] llr_addr, col_idx, llr_waddr, u_rc;
  logic          llr_rd, llr_we, lji_we;
  logic [15:0]   llr_data, llr_wdata, lji_wdata;
  logic [2:0]    col_slot, col_cnt, col_rslot, u_rcnt;
  logic [RW-1:0] col_row;
  logic [EW-1:0] lji_waddr;
  logic [15:0]   src [N];
  logic [15:0]   llr [N];
  logic [15:0]   lji [E];
  int            nl [N];
  int            nwr [E];
  int checks = 0, failures = 0;

  spa_hmatrix #(.M(M)) u_h (.clk, .rst_n, .en(1'b1), .gen_done,
    .row_idx('0), .row_slot('0), .row_cnt(u_rcnt), .row_col(u_rc),
    .col_idx, .col_slot, .col_cnt, .col_row, .col_rslot);

  spa_init #(.M(M)) dut (.clk, .rst_n, .en(1'b1), .start, .busy, .done,
    .llr_addr, .llr_rd, .llr_data, .col_idx, .col_slot, .col_cnt, .col_row, .col_rslot,
    .llr_we, .llr_waddr, .llr_wdata, .lji_we, .lji_waddr, .lji_wdata);

  always #5 clk = ~clk;
  always_ff @(posedge clk) llr_data <= src[llr_addr];
  always_ff @(posedge clk) begin
    if (rst_n && llr_we) begin llr[llr_waddr] <= llr_wdata; nl[llr_waddr]++; end
    if (rst_n && lji_we) begin lji[lji_waddr] <= lji_wdata; nwr[lji_waddr]++; end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int rc [R];
    int rl [R][6];
    int cc [N];
    int cyc, expcyc;
    foreach (rc[r]) rc[r] = 0;
    foreach (cc[c]) cc[c] = 0;
    for (int t = 0; t < 15; t++)
      for (int i = 0; i < M; i++) begin
        int r, c;
        r = term_row(M, t, i);
        c = term_col(M, t, i);
        rl[r][rc[r]] = c;
        rc[r]++;
        cc[c]++;
      end
    for (int c = 0; c < N; c++) begin src[c] = 16'($urandom); nl[c] = 0; end
    for (int e = 0; e < E; e++) nwr[e] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    while (!gen_done) @(negedge clk);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    expcyc = 1;
    for (int c = 0; c < N; c++) expcyc += 3 + 2 * cc[c];
    checks++;
    if (cyc != expcyc) begin
      failures++;
      $display("pass took %0d cycles, expected %0d", cyc, expcyc);
    end
    @(negedge clk);
    for (int c = 0; c < N; c++) begin
      checks++;
      if (nl[c] != 1 || llr[c] !== src[c]) begin
        failures++;
        $display("LLR %0d: %h (%0d writes) expected %h", c, llr[c], nl[c], src[c]);
      end
    end
    for (int r = 0; r < R; r++)
      for (int s = 0; s < 6; s++) begin
        checks++;
        if (nwr[r * 6 + s] != ((s < rc[r]) ? 1 : 0)) begin
          failures++;
          $display("edge %0d written %0d times", r * 6 + s, nwr[r * 6 + s]);
        end else if (s < rc[r] && lji[r * 6 + s] !== src[rl[r][s]]) begin
          failures++;
          if (failures < 10) $display("edge %0d: Lji %h expected %h", r * 6 + s, lji[r * 6 + s], src[rl[r][s]]);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
