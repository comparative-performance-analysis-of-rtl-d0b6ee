// tb_spa_hmatrix: builds the rate-1/2 parity-check matrix independently
// (row lists in term order) and reads back every row and column list of
// the generator through its two ports. Checks the generation time
// (15*M cycles), the row weights (3 and 6), column weights (2, 3, 1, 3, 6
// per column block), the total of 15*M ones (7680 at M = 512) and that the
// column lists point back at the right row slots.
module tb_spa_hmatrix;
  import tb_spa_ref::*;
  localparam int M = 512;
  localparam int R = 3 * M;
  localparam int N = 5 * M;

  logic        clk = 0, rst_n = 0, gen_done;
  logic [10:0] row_idx;
  logic [2:0]  row_slot, row_cnt, col_slot, col_cnt, col_rslot;
  logic [11:0] row_col, col_idx;
  logic [10:0] col_row;
  int checks = 0, failures = 0;

  int rl [R][6];
  int rc [R];
  int cr [N][6];
  int cs [N][6];
  int cc [N];

  spa_hmatrix #(.M(M)) dut (.clk, .rst_n, .en(1'b1), .gen_done,
    .row_idx, .row_slot, .row_cnt, .row_col,
    .col_idx, .col_slot, .col_cnt, .col_row, .col_rslot);

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, nz;
    int cw [5] = '{2, 3, 1, 3, 6};
    foreach (rc[r]) rc[r] = 0;
    foreach (cc[c]) cc[c] = 0;
    for (int t = 0; t < 15; t++)
      for (int i = 0; i < M; i++) begin
        int r, c;
        r = term_row(M, t, i);
        c = term_col(M, t, i);
        rl[r][rc[r]] = c;
        cr[c][cc[c]] = r;
        cs[c][cc[c]] = rc[r];
        rc[r]++;
        cc[c]++;
      end
    row_idx = 0; row_slot = 0; col_idx = 0; col_slot = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    cyc = 0;
    while (!gen_done) begin @(negedge clk); cyc++; end
    check("generation cycles", cyc, 15 * M);
    nz = 0;
    for (int r = 0; r < R; r++) begin
      check("row weight", rc[r], (r < M) ? 3 : 6);
      for (int s = 0; s < 6; s++) begin
        @(negedge clk) begin row_idx = 11'(r); row_slot = 3'(s); end
        @(negedge clk);
        if (s == 0) begin check("row count", int'(row_cnt), rc[r]); nz += int'(row_cnt); end
        if (s < rc[r]) check("row list", int'(row_col), rl[r][s]);
      end
    end
    check("ones in H", nz, 15 * M);
    for (int c = 0; c < N; c++) begin
      check("column weight", cc[c], cw[c / M]);
      for (int s = 0; s < cc[c] || s == 0; s++) begin
        @(negedge clk) begin col_idx = 12'(c); col_slot = 3'(s); end
        @(negedge clk);
        if (s == 0) check("col count", int'(col_cnt), cc[c]);
        check("col row", int'(col_row), cr[c][s]);
        check("col row slot", int'(col_rslot), cs[c][s]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
