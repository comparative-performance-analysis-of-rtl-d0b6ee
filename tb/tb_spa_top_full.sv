// tb_spa_top_full: one complete frame through the decoder at its default
// size (CCSDS rate 1/2, k = 1024, H 1536 x 2560, 512 punctured bits) and
// default iteration limit. A random codeword is BPSK-modulated and sent
// through Gaussian noise at Eb/N0 = 3 dB (sigma^2 = 1/(2 R Eb/N0) with
// R = 1/2); the decoder must converge to the transmitted codeword. The
// cycles per iteration are reported and must stay below 2,000,000, the
// 20 ms per iteration at 100 MHz measured for the original sequential
// implementation of this architecture.
module tb_spa_top_full;
  import tb_spa_ref::*;
  localparam int M  = 512;
  localparam int N  = 5 * M;

  logic clk = 0, rst_n = 0, start = 0, ready, debug = 0;
  logic [11:0] llr_addr, dec_addr;
  logic        llr_rd, dec_valid, dec_data, done, converged;
  logic [15:0] llr_data, dbg_lji, dbg_lij;
  logic [13:0] dbg_addr = '0;
  logic [3:0]  iterations;
  logic [15:0] src [N];
  logic        dec [N];
  int checks = 0, failures = 0;

  spa_top dut (.clk, .rst_n, .start, .ready,
    .llr_addr, .llr_rd, .llr_data, .debug, .dbg_addr, .dbg_lji, .dbg_lij,
    .dec_valid, .dec_addr, .dec_data, .done, .converged, .iterations);

  always #5 clk = ~clk;
  always_ff @(posedge clk) llr_data <= src[llr_addr];
  always_ff @(posedge clk) if (dec_valid) dec[dec_addr] <= dec_data;

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    logic [5*MAXM-1:0] cw, bits;
    real sigma;
    int cyc, errs_in;
    sigma = $sqrt(1.0 / (2.0 * 0.5 * (10.0 ** 0.3)));
    cw = random_codeword(M);
    check("reference codeword satisfies H", syndrome_weight(M, cw) == 0);
    errs_in = 0;
    for (int c = 0; c < N; c++) begin
      real y;
      if (c < 4 * M) begin
        y = (cw[c] ? -1.0 : 1.0) + sigma * gauss();
        if ((y < 0.0) != cw[c]) errs_in++;
        src[c] = from_real(2.0 * y / (sigma * sigma));
      end else begin
        src[c] = 16'h0000;
      end
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    while (!ready) @(negedge clk);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    for (int c = 0; c < N; c++) bits[c] = dec[c];
    $display("channel bit errors %0d, iterations %0d, converged %0d, %0d cycles (%0d per iteration)",
             errs_in, iterations, converged, cyc, cyc / ((iterations == 0) ? 1 : int'(iterations)));
    check("frame converges", converged);
    check("decoded word satisfies H", syndrome_weight(M, bits) == 0);
    check("decoded word is the transmitted codeword", bits[N-1:0] == cw[N-1:0]);
    check("cycles per iteration below 2,000,000", cyc / ((iterations == 0) ? 1 : int'(iterations)) < 2000000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
