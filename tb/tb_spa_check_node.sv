// tb_spa_check_node: runs one check-node pass on a small code (M = 16,
// H 48 x 80) with random variable-to-check messages and compares every
// check-to-variable message with the quantised sum-product update computed
// by the reference model (tanh table step 0.01, product clamp 0.999, atanh
// step 0.005). Also checks that each edge is written exactly once, that the
// values stay close to the exact 2*atanh(prod tanh(L/2)), and the pass
// length 2 + sum over rows of 3 + d*(8 + 9*(d-1)) cycles.
module tb_spa_check_node;
  import tb_spa_ref::*;
  localparam int M  = 16;
  localparam int R  = 3 * M;
  localparam int E  = R * 6;
  localparam int RW = $clog2(R);
  localparam int EW = $clog2(E);

  logic clk = 0, rst_n = 0, start = 0, busy, done, gen_done;
  logic [RW-1:0] row_idx;
  logic [2:0]    row_slot, row_cnt;
  logic [EW-1:0] lji_raddr, lij_waddr;
  logic [15:0]   lji_rdata, lij_wdata;
  logic          lij_we;
  logic [15:0]   lji [E];
  logic [15:0]   lij [E];
  int            nwr [E];
  int checks = 0, failures = 0;

  logic [$clog2(5*M)-1:0] u_col_idx;
  logic [2:0] u_cs, u_cc, u_crs;
  logic [RW-1:0] u_cr;
  logic [$clog2(5*M)-1:0] u_rc;

  spa_hmatrix #(.M(M)) u_h (.clk, .rst_n, .en(1'b1), .gen_done,
    .row_idx, .row_slot, .row_cnt, .row_col(u_rc),
    .col_idx('0), .col_slot('0), .col_cnt(u_cc), .col_row(u_cr), .col_rslot(u_crs));

  spa_check_node #(.M(M)) dut (.clk, .rst_n, .en(1'b1), .start, .busy, .done,
    .row_idx, .row_slot, .row_cnt, .lji_raddr, .lji_rdata, .lij_we, .lij_waddr, .lij_wdata);

  always #5 clk = ~clk;
  always_ff @(posedge clk) lji_rdata <= lji[lji_raddr];
  always_ff @(posedge clk) if (rst_n && lij_we) begin lij[lij_waddr] <= lij_wdata; nwr[lij_waddr]++; end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int rc [R];
    int cyc, expcyc;
    foreach (rc[r]) rc[r] = 0;
    for (int t = 0; t < 15; t++)
      for (int i = 0; i < M; i++) rc[term_row(M, t, i)]++;
    for (int e = 0; e < E; e++) begin
      real v;
      v = 24.0 * (real'($urandom % 10000) / 10000.0) - 12.0;
      if (e % 17 == 0) v = 0.0;
      if (e % 23 == 0) v = 40.0;
      lji[e] = from_real(v);
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
    for (int r = 0; r < R; r++) expcyc += 3 + rc[r] * (8 + 9 * (rc[r] - 1));
    checks++;
    if (cyc != expcyc) begin
      failures++;
      $display("pass took %0d cycles, expected %0d", cyc, expcyc);
    end
    @(negedge clk);
    for (int r = 0; r < R; r++)
      for (int s = 0; s < 6; s++) begin
        int e;
        e = r * 6 + s;
        checks++;
        if (nwr[e] != ((s < rc[r]) ? 1 : 0)) begin
          failures++;
          $display("edge %0d written %0d times", e, nwr[e]);
        end
        if (s < rc[r]) begin
          fp16_t others [$];
          fp16_t expv;
          real ideal, p;
          others = {};
          p = 1.0;
          for (int o = 0; o < rc[r]; o++)
            if (o != s) begin
              others.push_back(lji[r * 6 + o]);
              p = p * $tanh(to_real(lji[r * 6 + o]) / 2.0);
            end
          expv = cn_update(others);
          checks++;
          if (lij[e] !== expv) begin
            failures++;
            if (failures < 10) $display("row %0d slot %0d: Lij %h expected %h", r, s, lij[e], expv);
          end
          // loose agreement with the exact update while |prod| < 0.95 (the atanh table is coarse beyond)
          if (p < 0.95 && p > -0.95) begin
            ideal = $ln((1.0 + p) / (1.0 - p));
            checks++;
            if (to_real(lij[e]) - ideal > 0.15 || ideal - to_real(lij[e]) > 0.15) begin
              failures++;
              if (failures < 10) $display("row %0d slot %0d: %f far from exact %f", r, s, to_real(lij[e]), ideal);
            end
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
