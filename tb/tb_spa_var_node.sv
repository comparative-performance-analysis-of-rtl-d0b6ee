// tb_spa_var_node: runs one variable-node pass on a small code (M = 16)
// with random channel LLRs and check-to-variable messages and compares
// every written variable-to-check message with the reference fp16 sum
// Lj + sum of the other edges' Lij in column-list order. Also checks that
// each edge is written once and the pass length
// 2 + sum over columns of 3 + d*(4 + 5*(d-1)) cycles.
module tb_spa_var_node;
  import tb_spa_ref::*;
  localparam int M  = 16;
  localparam int R  = 3 * M;
  localparam int N  = 5 * M;
  localparam int E  = R * 6;
  localparam int RW = $clog2(R);
  localparam int NW = $clog2(N);
  localparam int EW = $clog2(E);

  logic clk = 0, rst_n = 0, start = 0, busy, done, gen_done;
  logic [NW-1:0] col_idx, llr_raddr, u_rc;
  logic [2:0]    col_slot, col_cnt, col_rslot, u_rcnt;
  logic [RW-1:0] col_row;
  logic [EW-1:0] lij_raddr, lji_waddr;
  logic [15:0]   lij_rdata, llr_rdata, lji_wdata;
  logic          lji_we;
  logic [15:0]   llr [N];
  logic [15:0]   lij [E];
  logic [15:0]   lji [E];
  int            nwr [E];
  int checks = 0, failures = 0;

  spa_hmatrix #(.M(M)) u_h (.clk, .rst_n, .en(1'b1), .gen_done,
    .row_idx('0), .row_slot('0), .row_cnt(u_rcnt), .row_col(u_rc),
    .col_idx, .col_slot, .col_cnt, .col_row, .col_rslot);

  spa_var_node #(.M(M)) dut (.clk, .rst_n, .en(1'b1), .start, .busy, .done,
    .col_idx, .col_slot, .col_cnt, .col_row, .col_rslot,
    .llr_raddr, .llr_rdata, .lij_raddr, .lij_rdata, .lji_we, .lji_waddr, .lji_wdata);

  always #5 clk = ~clk;
  always_ff @(posedge clk) lij_rdata <= lij[lij_raddr];
  always_ff @(posedge clk) llr_rdata <= llr[llr_raddr];
  always_ff @(posedge clk) if (rst_n && lji_we) begin lji[lji_waddr] <= lji_wdata; nwr[lji_waddr]++; end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int rc [R];
    int cc [N];
    int ce [N][6];
    int cyc, expcyc;
    foreach (rc[r]) rc[r] = 0;
    foreach (cc[c]) cc[c] = 0;
    for (int t = 0; t < 15; t++)
      for (int i = 0; i < M; i++) begin
        int r, c;
        r = term_row(M, t, i);
        c = term_col(M, t, i);
        ce[c][cc[c]] = r * 6 + rc[r];
        rc[r]++;
        cc[c]++;
      end
    for (int c = 0; c < N; c++) llr[c] = from_real(20.0 * (real'($urandom % 10000) / 10000.0) - 10.0);
    for (int e = 0; e < E; e++) begin
      lij[e] = from_real(15.0 * (real'($urandom % 10000) / 10000.0) - 7.5);
      nwr[e] = 0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    while (!gen_done) @(negedge clk);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    expcyc = 1;
    for (int c = 0; c < N; c++) expcyc += 3 + cc[c] * (4 + 5 * (cc[c] - 1));
    checks++;
    if (cyc != expcyc) begin
      failures++;
      $display("pass took %0d cycles, expected %0d", cyc, expcyc);
    end
    @(negedge clk);
    for (int c = 0; c < N; c++)
      for (int s = 0; s < cc[c]; s++) begin
        fp16_t sum;
        sum = llr[c];
        for (int o = 0; o < cc[c]; o++)
          if (o != s) sum = add(sum, lij[ce[c][o]]);
        checks += 2;
        if (nwr[ce[c][s]] != 1) begin
          failures++;
          $display("edge %0d written %0d times", ce[c][s], nwr[ce[c][s]]);
        end
        if (lji[ce[c][s]] !== sum) begin
          failures++;
          if (failures < 10) $display("col %0d slot %0d: Lji %h expected %h", c, s, lji[ce[c][s]], sum);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
