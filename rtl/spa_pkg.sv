// spa_pkg: types, constants and helper functions shared by the sum-product
// LDPC decoder.
//
// Messages and LLRs are IEEE half-precision floats (fp16_t), as in the
// decoder this RTL implements. The helpers here are the cheap fp16
// operations that need no arithmetic unit (halving, doubling, sign and
// magnitude handling, comparison of magnitudes), the CCSDS AR4JA
// permutation of the rate-1/2 parity-check matrix, and the integer
// fixed-point functions that fill the tanh and atanh tables at elaboration.
//
// The parity-check matrix H (3M x 5M) is the rate-1/2 CCSDS construction
//
//        | 0   0   I   0   I+P1       |
//   H =  | I   I   0   I   P2+P3+P4   |
//        | I   P5+P6 0 P7+P8  I       |
//
// where '+' is the modulo-2 sum of M x M permutation matrices. Row i of Pk
// has its one in column
//   pi_k(i) = M/4 * ((theta_k + floor(4i/M)) mod 4)
//           + ((phi_k(floor(4i/M)) + i) mod M/4).
// The structure and the formula follow the decoder's description; the
// theta/phi constants for M = 512 are the CCSDS table values as recalled for
// this design and should be checked against CCSDS 131.0-B before use on a
// real link (any values give a valid code, the structure test only needs
// the modulo-2 sums to have no overlaps).
package spa_pkg;

  typedef logic [15:0] fp16_t;

  localparam fp16_t FP16_ONE  = 16'h3C00;
  localparam fp16_t FP16_ZERO = 16'h0000;
  localparam fp16_t FP16_MAX  = 16'h7BFF;   // largest finite value

  // Maximum row and column weight of H: every row and column list has this
  // many slots; a count tells how many are used.
  localparam int unsigned ROW_DEG = 6;
  localparam int unsigned COL_DEG = 6;

  // Number of (row block, column block, permutation) terms of H.
  // Permutation 0 stands for the identity.
  localparam int unsigned N_TERMS = 15;

  typedef struct packed {
    logic [1:0] rb;   // row block 0..2
    logic [2:0] cb;   // column block 0..4
    logic [3:0] k;    // 0 = identity, 1..8 = Pk
  } hterm_t;

  localparam hterm_t H_TERMS [N_TERMS] = '{
    '{2'd0, 3'd2, 4'd0}, '{2'd0, 3'd4, 4'd0}, '{2'd0, 3'd4, 4'd1},
    '{2'd1, 3'd0, 4'd0}, '{2'd1, 3'd1, 4'd0}, '{2'd1, 3'd3, 4'd0},
    '{2'd1, 3'd4, 4'd2}, '{2'd1, 3'd4, 4'd3}, '{2'd1, 3'd4, 4'd4},
    '{2'd2, 3'd0, 4'd0}, '{2'd2, 3'd1, 4'd5}, '{2'd2, 3'd1, 4'd6},
    '{2'd2, 3'd3, 4'd7}, '{2'd2, 3'd3, 4'd8}, '{2'd2, 3'd4, 4'd0}
  };

  // theta_k, k = 1..8 (index 0 unused).
  localparam int THETA [9] = '{0, 3, 0, 1, 2, 2, 3, 0, 1};
  // phi_k(j) for M = 512, j = 0..3, k = 1..8 (index 0 unused).
  localparam int PHI [4][9] = '{
    '{0,  16, 103, 105,   0,  50,  29, 115,  30},
    '{0,   0,  53,  74,  45,  47,   0,  59, 102},
    '{0,   0,   8, 119,  89,  31, 122,   1,  69},
    '{0,   0,  35,  97, 112,  64,  93,  99,  94}
  };

  // Column (within its block) of the one in row i of permutation k.
  // m is the sub-matrix size M, a power of two >= 4.
  function automatic int unsigned pi_col(int unsigned m, int unsigned k,
                                         int unsigned i);
    int unsigned q, j;
    q = m / 4;
    j = (4 * i) / m;
    if (k == 0) return i;
    return q * ((THETA[k] + j) % 4) + ((PHI[j][k] % q + i) % q);
  endfunction

  // ---- fp16 helpers (no rounding needed) ----
  function automatic logic fp16_sign(fp16_t x);
    return x[15];
  endfunction

  function automatic fp16_t fp16_abs(fp16_t x);
    return {1'b0, x[14:0]};
  endfunction

  function automatic logic fp16_is_zero(fp16_t x);
    return x[14:10] == 5'd0;
  endfunction

  // Negative means sign set and magnitude non-zero (-0 counts as 0).
  function automatic logic fp16_is_neg(fp16_t x);
    return x[15] && !fp16_is_zero(x);
  endfunction

  // x/2: exponent minus one, flushed to zero below the normal range.
  function automatic fp16_t fp16_div2(fp16_t x);
    if (x[14:10] <= 5'd1) return {x[15], 15'd0};
    return {x[15], x[14:10] - 5'd1, x[9:0]};
  endfunction

  // 2x: exponent plus one, saturated at the largest finite value.
  function automatic fp16_t fp16_mul2(fp16_t x);
    if (x[14:10] == 5'd0) return {x[15], 15'd0};
    if (x[14:10] >= 5'd30) return {x[15], FP16_MAX[14:0]};
    return {x[15], x[14:10] + 5'd1, x[9:0]};
  endfunction

  // Clamp |x| to lim (lim positive); the sign of x is kept. Positive fp16
  // values order like unsigned integers.
  function automatic fp16_t fp16_clamp(fp16_t x, fp16_t lim);
    if (x[14:0] > lim[14:0]) return {x[15], lim[14:0]};
    return x;
  endfunction

  // ---- table generation (elaboration time, integer arithmetic only) ----
  // Fixed-point constants with 62 fraction bits.
  localparam logic [127:0] FIX_ONE  = 128'd1 << 62;
  localparam logic [127:0] EXP_M002 = 128'h3ebb93375bd8b6e4;  // exp(-0.02)
  localparam logic [127:0] LN2      = 128'h2c5c85fdf473de6a;  // ln(2)

  // v / 2^frac (v >= 0) to fp16, rounded to nearest, ties to even;
  // results below the normal range become zero, above it saturate.
  function automatic fp16_t fp16_from_fix(logic [127:0] v, int frac);
    int          p, e;
    logic [11:0] mant;
    logic [127:0] rest, half;
    if (v == '0) return FP16_ZERO;
    p = 127;
    while (!v[p]) p--;
    e = p - frac;
    if (p > 10) begin
      mant = 12'(v >> (p - 10));
      rest = v & ((128'd1 << (p - 10)) - 128'd1);
      half = 128'd1 << (p - 11);
      if (rest > half || (rest == half && mant[0])) mant = mant + 12'd1;
    end else begin
      mant = 12'(v << (10 - p));
    end
    if (mant[11]) begin
      mant = mant >> 1;
      e++;
    end
    if (e < -14) return FP16_ZERO;
    if (e > 15)  return FP16_MAX;
    return {1'b0, 5'(e + 15), mant[9:0]};
  endfunction

  // tanh(x) = (1 - t) / (1 + t) with t = exp(-2x), t given with 62
  // fraction bits.
  function automatic fp16_t tanh_from_exp(logic [127:0] t);
    logic [127:0] q;
    q = ((FIX_ONE - t) << 64) / (FIX_ONE + t);
    return fp16_from_fix(q, 64);
  endfunction

  // 0.5 * ln(a / b) for a >= b > 0 (a < 2^20). log2 is found bit by bit:
  // the mantissa m in [1, 2) is squared, and each time the square reaches
  // 2 the next fraction bit is 1 and m is halved.
  function automatic fp16_t half_ln_ratio(int unsigned a, int unsigned b);
    logic [127:0] m, l2;
    int           e;
    if (a == b) return FP16_ZERO;
    m = (128'(a) << 62) / 128'(b);
    e = 0;
    while (m >= (FIX_ONE << 1)) begin
      m = m >> 1;
      e++;
    end
    l2 = '0;
    for (int i = 0; i < 60; i++) begin
      m  = (m * m) >> 62;
      l2 = l2 << 1;
      if (m >= (FIX_ONE << 1)) begin
        m  = m >> 1;
        l2 = l2 | 128'd1;
      end
    end
    l2 = l2 | (128'(e) << 60);            // log2(a/b), 60 fraction bits
    return fp16_from_fix((l2 * LN2) >> 62, 61);   // ln / 2
  endfunction

endpackage
