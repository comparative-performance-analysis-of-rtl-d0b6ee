// tb_spa_workload: the RTL evaluation workload of the decoder, shortened.
// The decoder at its default size (CCSDS rate 1/2, k = 1024, H 1536 x 2560,
// iteration limit 15) decodes FRAMES random codewords at each Eb/N0 of
// 2, 3, 4, 5 and 6 dB. The original evaluation used 20 frames per point;
// this bench uses FRAMES (default 4) to keep simulation time short, and
// prints per point the channel and decoded bit errors, the bit errors of
// the decisions streamed in the 5th iteration (or the final ones for a
// frame that stopped earlier) and the average iteration count: the data of
// a BER plot, with early-iteration BER, and of an iterations-versus-SNR
// plot.
//
// Checked for every frame: the converged flag equals "decoded word
// satisfies H"; a frame that does not converge reports the iteration
// limit; a converged frame is the transmitted codeword; from 3 dB up the
// 1024 information bits are decoded without error. Checked across the
// sweep: from 3 dB up most frames converge; at 5 and 6 dB most frames
// converge within 5 iterations; the average iteration count of the
// converged frames at 6 dB is no larger than at 3 dB.
//
// A frame can fail to converge even at high SNR while its information bits
// are right: the check-node output is limited to 2 atanh(0.999) = 7.6 by
// the product clamp, so a weight-1 parity bit (column block 2) whose
// channel LLR points the wrong way with magnitude above 7.6 can never be
// flipped. The bench therefore does not demand convergence of every frame.
module tb_spa_workload;
  import tb_spa_ref::*;
  localparam int M      = 512;
  localparam int N      = 5 * M;
  localparam int FRAMES = 4;
  localparam int LIMIT  = 15;

  logic clk = 0, rst_n = 0, start = 0, ready, debug = 0;
  logic [11:0] llr_addr, dec_addr;
  logic        llr_rd, dec_valid, dec_data, done, converged;
  logic [15:0] llr_data, dbg_lji, dbg_lij;
  logic [13:0] dbg_addr = '0;
  logic [3:0]  iterations;
  logic [15:0] src [N];
  logic        dec [N];
  logic        dec5 [N];     // decisions of the first 5 decision passes
  int          pass_cnt;
  int checks = 0, failures = 0;

  spa_top dut (.clk, .rst_n, .start, .ready,
    .llr_addr, .llr_rd, .llr_data, .debug, .dbg_addr, .dbg_lji, .dbg_lij,
    .dec_valid, .dec_addr, .dec_data, .done, .converged, .iterations);

  always #5 clk = ~clk;
  always_ff @(posedge clk) llr_data <= src[llr_addr];
  always @(posedge clk)
    if (dec_valid) begin
      dec[dec_addr] <= dec_data;
      if (pass_cnt < 5) dec5[dec_addr] <= dec_data;
      if (int'(dec_addr) == N - 1) pass_cnt <= pass_cnt + 1;
    end

  initial begin
    repeat (FRAMES * 5 * 10000000) @(posedge clk);   // a frame needs < 9e6 cycles
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
    real sigma, avg_it [7];
    int errs_in, errs_out, errs5, it_sum, n_conv, n_fast, conv_it, f_err;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    $display("Eb/N0  frames  channel-BER  BER-iter-5  decoded-BER  avg-iter  converged");
    $display("(BER over the information bits; avg-iter over all frames)");
    for (int snr = 2; snr <= 6; snr++) begin
      sigma = $sqrt(1.0 / (2.0 * 0.5 * (10.0 ** (real'(snr) / 10.0))));
      errs_in = 0; errs_out = 0; errs5 = 0; it_sum = 0; n_conv = 0; n_fast = 0; conv_it = 0;
      for (int f = 0; f < FRAMES; f++) begin
        cw = random_codeword(M);
        for (int c = 0; c < N; c++) begin
          real y;
          if (c < 4 * M) begin
            y = (cw[c] ? -1.0 : 1.0) + sigma * gauss();
            if ((y < 0.0) != cw[c] && c < 2 * M) errs_in++;
            src[c] = from_real(2.0 * y / (sigma * sigma));
          end else begin
            src[c] = 16'h0000;
          end
        end
        while (!ready) @(negedge clk);
        pass_cnt = 0;
        @(negedge clk) start = 1;
        @(negedge clk) start = 0;
        while (!done) @(negedge clk);
        for (int c = 0; c < N; c++) bits[c] = dec[c];
        f_err = 0;
        for (int c = 0; c < 2 * M; c++) if (bits[c] != cw[c]) f_err++;
        errs_out += f_err;
        for (int c = 0; c < 2 * M; c++) if (dec5[c] != cw[c]) errs5++;
        it_sum += int'(iterations);
        n_conv += int'(converged);
        if (converged) conv_it += int'(iterations);
        if (converged && iterations <= 5) n_fast++;
        check($sformatf("%0d dB frame %0d: converged flag matches the syndrome", snr, f),
              converged == (syndrome_weight(M, bits) == 0));
        if (!converged)
          check($sformatf("%0d dB frame %0d: failed frame ran to the limit", snr, f),
                int'(iterations) == LIMIT);
        if (converged)
          check($sformatf("%0d dB frame %0d: converged word is the codeword", snr, f),
                bits[N-1:0] == cw[N-1:0]);
        if (snr >= 3)
          check($sformatf("%0d dB frame %0d: information bits without error", snr, f),
                f_err == 0);
      end
      if (snr >= 3)
        check($sformatf("%0d dB: most frames converge", snr), 2 * n_conv > FRAMES);
      if (snr >= 5)
        check($sformatf("%0d dB: most frames converge within 5 iterations", snr),
              2 * n_fast > FRAMES);
      avg_it[snr] = real'(conv_it) / real'((n_conv == 0) ? 1 : n_conv);
      $display("%2d dB  %6d  %11.2e  %10.2e  %11.2e  %8.2f  %0d/%0d", snr, FRAMES,
               real'(errs_in) / real'(FRAMES * 2 * M), real'(errs5) / real'(FRAMES * 2 * M),
               real'(errs_out) / real'(FRAMES * 2 * M), real'(it_sum) / real'(FRAMES),
               n_conv, FRAMES);
    end
    check("converged frames need no more iterations at 6 dB than at 3 dB",
          avg_it[6] <= avg_it[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
