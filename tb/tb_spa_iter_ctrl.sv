// tb_spa_iter_ctrl: drives decision results into the iteration control
// (MAX_ITER = 5) and checks: a frame whose parity holds at iteration 3 ends
// converged after 3 iterations with two intermediate Start Cn pulses; a
// frame that never satisfies the parity check ends unconverged after
// exactly MAX_ITER iterations; a new frame clears the count; a pause
// (en = 0) delays but does not lose a result.
module tb_spa_iter_ctrl;
  localparam int MAXI = 5;
  logic clk = 0, rst_n = 0, en = 1, frame_start = 0, next_itr = 0, parity_ok = 0;
  logic start_cn, done, converged;
  logic [2:0] iterations;
  int checks = 0, failures = 0;
  int n_start, n_done;

  spa_iter_ctrl #(.MAX_ITER(MAXI)) dut (.clk, .rst_n, .en, .frame_start, .next_itr,
    .parity_ok, .start_cn, .done, .converged, .iterations);

  always #5 clk = ~clk;
  // pulses are counted only out of reset (registers start at random values)
  always @(posedge clk) begin
    if (rst_n && start_cn) n_start++;
    if (rst_n && done)     n_done++;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic pulse_result(logic ok);
    @(negedge clk) begin next_itr = 1; parity_ok = ok; end
    @(negedge clk) next_itr = 0;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    n_start = 0; n_done = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // frame A: converges at iteration 3
    @(negedge clk) frame_start = 1;
    @(negedge clk) frame_start = 0;
    pulse_result(0);
    pulse_result(0);
    pulse_result(1);
    check("A start_cn pulses", n_start, 2);
    check("A done pulses", n_done, 1);
    check("A iterations", int'(iterations), 3);
    check("A converged", int'(converged), 1);
    // frame B: never converges
    n_start = 0; n_done = 0;
    @(negedge clk) frame_start = 1;
    @(negedge clk) frame_start = 0;
    check("B cleared", int'(iterations), 0);
    check("B converged cleared", int'(converged), 0);
    for (int k = 0; k < MAXI; k++) pulse_result(0);
    check("B start_cn pulses", n_start, MAXI - 1);
    check("B done pulses", n_done, 1);
    check("B iterations", int'(iterations), MAXI);
    check("B converged", int'(converged), 0);
    // frame C: result arrives during a pause
    n_start = 0; n_done = 0;
    @(negedge clk) frame_start = 1;
    @(negedge clk) frame_start = 0;
    @(negedge clk) begin en = 0; next_itr = 1; parity_ok = 0; end
    repeat (3) @(negedge clk);
    check("C nothing while paused", n_start, 0);
    en = 1;
    @(negedge clk) next_itr = 0;
    repeat (2) @(negedge clk);
    check("C start_cn after pause", n_start, 1);
    check("C iterations", int'(iterations), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
