// tb_spa_top: end-to-end test of the decoder on a reduced code (M = 16,
// H 48 x 80, 16 punctured bits) with MAX_ITER = 15.
// Random codewords are BPSK-modulated (bit 0 -> +1), sent through Gaussian
// noise and turned into LLRs 2y/sigma^2; punctured positions get LLR 0.
// Frames:
//   clean     small noise: must converge in the first iteration
//   noisy     moderate noise: most must converge (more than one iteration
//             expected for some of them) to the transmitted codeword; one
//             that does not must stop at MAX_ITER with a word failing H
//   hopeless  noise far beyond the code's reach: must stop unconverged
//             after exactly MAX_ITER iterations
//   debug     the noisy frames again with random debug pauses; in the
//             first check-node pass the Lji memory is read through the
//             debug port and must hold the channel LLRs; the decoded bits
//             and iteration counts must equal the undisturbed run
// Every converged result must satisfy all parity checks. The frame length
// in cycles must lie within the bounds given by the unit pass lengths.
// Each mechanism (first-iteration convergence, repeated iterations, the
// iteration limit, debug pause, punctured-bit recovery) is counted and a
// failure is counted for one that never occurred.
module tb_spa_top;
  import tb_spa_ref::*;
  localparam int M    = 16;
  localparam int MAXI = 15;
  localparam int R    = 3 * M;
  localparam int N    = 5 * M;
  localparam int NW   = $clog2(N);
  localparam int EW   = $clog2(R * 6);
  localparam int IW   = $clog2(MAXI + 1);

  logic clk = 0, rst_n = 0, start = 0, ready, debug = 0;
  logic [NW-1:0] llr_addr, dec_addr;
  logic          llr_rd, dec_valid, dec_data, done, converged;
  logic [15:0]   llr_data, dbg_lji, dbg_lij;
  logic [EW-1:0] dbg_addr = '0;
  logic [IW-1:0] iterations;
  logic [15:0]   src [N];
  logic          dec [N];

  int checks = 0, failures = 0;
  int n_first = 0, n_multi = 0, n_limit = 0, n_pause = 0, n_dbg_reads = 0, n_punct = 0;
  int rc [R];
  int rl [R][6];
  int cc [N];
  int t_init, t_cn, t_vn, t_dec1, t_dec2max;

  spa_top #(.M(M), .MAX_ITER(MAXI)) dut (.clk, .rst_n, .start, .ready,
    .llr_addr, .llr_rd, .llr_data, .debug, .dbg_addr, .dbg_lji, .dbg_lij,
    .dec_valid, .dec_addr, .dec_data, .done, .converged, .iterations);

  always #5 clk = ~clk;
  always_ff @(posedge clk) llr_data <= src[llr_addr];
  always_ff @(posedge clk) if (dec_valid) dec[dec_addr] <= dec_data;

  initial begin
    repeat (3000000) @(posedge clk);
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

  task automatic make_frame(real sigma, output logic [5*MAXM-1:0] cw);
    cw = random_codeword(M);
    for (int c = 0; c < N; c++) begin
      real y;
      if (c < 4 * M) begin
        y = (cw[c] ? -1.0 : 1.0) + sigma * gauss();
        src[c] = from_real(2.0 * y / (sigma * sigma));
      end else begin
        src[c] = 16'h0000;                      // punctured
      end
    end
  endtask

  // decode the frame in src; with pauses, debug is raised at random
  task automatic decode(input bit pauses, output int iters, output logic conv,
                        output logic [5*MAXM-1:0] bits, output int cycles);
    bit checked_lji;
    checked_lji = 0;
    while (!ready) @(negedge clk);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cycles = 1;
    while (!done) begin
      if (pauses && ($urandom % 300 == 0 ||
                     (!checked_lji && dut.cn_busy && iterations == 0))) begin
        int len;
        len = 1 + $urandom % 4;
        n_pause++;
        for (int k = 0; k < len; k++) begin
          int r, s;
          r = $urandom % R;
          s = $urandom % rc[r];
          debug    = 1;
          dbg_addr = EW'(r * 6 + s);
          @(negedge clk);
          if (dut.cn_busy && iterations == 0) begin
            checked_lji = 1;
            n_dbg_reads++;
            check($sformatf("debug read of Lji[%0d] = %h, LLR %h", r * 6 + s, dbg_lji, src[rl[r][s]]),
                  dbg_lji === src[rl[r][s]]);
          end
        end
        debug = 0;
      end
      @(negedge clk);
      cycles++;
    end
    iters = int'(iterations);
    conv  = converged;
    bits  = '0;
    for (int c = 0; c < N; c++) bits[c] = dec[c];
  endtask

  initial begin
    logic [5*MAXM-1:0] cw, bits, bits2;
    logic [5*MAXM-1:0] saved_cw [4];
    logic [15:0] saved [4][N];
    int it, it2, cyc, cyc2, lo, hi;
    int n_noisy_conv = 0;
    logic conv, conv2;

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
    t_init = 1; t_cn = 2; t_vn = 2; t_dec1 = 1; t_dec2max = 0;
    for (int c = 0; c < N; c++) begin
      t_init += 3 + 2 * cc[c];
      t_vn   += 3 + cc[c] * (4 + 5 * (cc[c] - 1));
      t_dec1 += 3 + 5 * cc[c];
    end
    for (int r = 0; r < R; r++) begin
      t_cn      += 3 + rc[r] * (8 + 9 * (rc[r] - 1));
      t_dec2max += 3 + 2 * rc[r];
    end

    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // clean frame
    make_frame(0.3, cw);
    decode(0, it, conv, bits, cyc);
    check("clean frame converges", conv);
    check($sformatf("clean frame in one iteration (took %0d)", it), it == 1);
    check("clean frame decoded to the codeword", bits[N-1:0] == cw[N-1:0]);
    if (conv && it == 1) n_first++;

    // noisy frames
    for (int f = 0; f < 4; f++) begin
      make_frame(0.7, cw);
      saved_cw[f] = cw;
      for (int c = 0; c < N; c++) saved[f][c] = src[c];
      decode(0, it, conv, bits, cyc);
      if (conv) n_noisy_conv++;
      check($sformatf("noisy frame %0d: converged flag matches the syndrome", f),
            conv == (syndrome_weight(M, bits) == 0));
      if (!conv)
        check($sformatf("unconverged noisy frame %0d stops at the limit (%0d)", f, it), it == MAXI);
      if (conv) begin
        check("noisy frame satisfies H", syndrome_weight(M, bits) == 0);
        check($sformatf("noisy frame %0d decoded to the codeword", f), bits[N-1:0] == cw[N-1:0]);
        if (bits[N-1:4*M] == cw[N-1:4*M]) n_punct++;
      end
      if (conv && it == 1) n_first++;
      if (conv && it > 1)  n_multi++;
      lo = 1 + t_init + it * (t_cn + t_vn + t_dec1);
      hi = lo + it * (t_dec2max + 4) + 4;
      check($sformatf("frame length %0d within [%0d, %0d]", cyc, lo, hi), cyc >= lo && cyc <= hi);
      // the same frame again, with debug pauses
      decode(1, it2, conv2, bits2, cyc2);
      check("pauses leave the iteration count unchanged", it2 == it);
      check("pauses leave the result unchanged", conv2 == conv && bits2[N-1:0] == bits[N-1:0]);
      check("pauses lengthen the frame", cyc2 > cyc);
    end

    // hopeless frame
    make_frame(3.0, cw);
    decode(0, it, conv, bits, cyc);
    check("hopeless frame does not converge", !conv);
    check($sformatf("hopeless frame stops at the limit (%0d)", it), it == MAXI);
    if (!conv && it == MAXI) n_limit++;
    check($sformatf("most noisy frames converge (%0d of 4)", n_noisy_conv), n_noisy_conv >= 2);

    $display("mechanisms: first-iteration=%0d repeated-iterations=%0d limit=%0d pauses=%0d debug-reads=%0d punctured-recovered=%0d",
             n_first, n_multi, n_limit, n_pause, n_dbg_reads, n_punct);
    check("first-iteration convergence seen", n_first > 0);
    check("repeated iterations seen", n_multi > 0);
    check("iteration limit seen", n_limit > 0);
    check("debug pause seen", n_pause > 0);
    check("debug reads seen", n_dbg_reads > 0);
    check("punctured bits recovered", n_punct > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
