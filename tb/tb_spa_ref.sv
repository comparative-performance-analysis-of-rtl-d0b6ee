// tb_spa_ref: reference models shared by the decoder testbenches.
//
// Everything here is computed independently of the RTL: fp16 rounding to
// nearest-even from exact double-precision values, the fp16 product and
// sum built on it, the quantised check-node update (tanh table step 0.01,
// atanh step 0.005, product clamp 0.999) and the rate-1/2 parity-check
// matrix built straight from its definition, as row lists in term order.
package tb_spa_ref;

  typedef logic [15:0] fp16_t;

  localparam int MAXM = 512;
  localparam int TERM_RB [15] = '{0,0,0, 1,1,1,1,1,1, 2,2,2,2,2,2};
  localparam int TERM_CB [15] = '{2,4,4, 0,1,3,4,4,4, 0,1,1,3,3,4};
  localparam int TERM_K  [15] = '{0,0,1, 0,0,0,2,3,4, 0,5,6,7,8,0};
  localparam int TH  [8]    = '{3, 0, 1, 2, 2, 3, 0, 1};
  localparam int PH  [4][8] = '{
    '{ 16, 103, 105,   0,  50,  29, 115,  30},
    '{  0,  53,  74,  45,  47,   0,  59, 102},
    '{  0,   8, 119,  89,  31, 122,   1,  69},
    '{  0,  35,  97, 112,  64,  93,  99,  94}};

  // column of the one in row i of term t (sub-matrix size m)
  function automatic int term_col(int m, int t, int i);
    int k, q, j, c;
    k = TERM_K[t];
    q = m / 4;
    j = i / q;
    if (k == 0) c = i;
    else        c = q * ((TH[k-1] + j) % 4) + ((PH[j][k-1] % q + i) % q);
    return TERM_CB[t] * m + c;
  endfunction

  function automatic int term_row(int m, int t, int i);
    return TERM_RB[t] * m + i;
  endfunction

  function automatic real pow2(int e);
    real v;
    v = 1.0;
    for (int n = 0; n < e; n++)  v = v * 2.0;
    for (int n = 0; n < -e; n++) v = v / 2.0;
    return v;
  endfunction

  function automatic real to_real(fp16_t x);
    real v;
    if (x[14:10] == 0) return 0.0;
    v = (1.0 + real'(x[9:0]) / 1024.0) * pow2(int'(x[14:10]) - 15);
    return x[15] ? -v : v;
  endfunction

  // exact round-to-nearest-even, flush below 2^-14, saturate at 65504
  function automatic fp16_t from_real(real r);
    logic s;
    real a, f, fl;
    int e, m;
    s = (r < 0.0);
    a = s ? -r : r;
    if (a == 0.0) return {s, 15'd0};
    e = 0;
    while (a >= 2.0) begin a = a / 2.0; e++; end
    while (a < 1.0)  begin a = a * 2.0; e--; end
    f  = (a - 1.0) * 1024.0;
    fl = $floor(f);
    m  = int'(fl);
    if (f - fl > 0.5 || (f - fl == 0.5 && (m % 2) == 1)) m++;
    if (m == 1024) begin m = 0; e++; end
    if (e < -14) return {s, 15'd0};
    if (e > 15)  return {s, 15'h7BFF};
    return {s, 5'(e + 15), 10'(m)};
  endfunction

  function automatic fp16_t mul(fp16_t a, fp16_t b);
    fp16_t y;
    y = from_real(to_real(a) * to_real(b));
    if (y[14:0] == 0) y[15] = a[15] ^ b[15];
    return y;
  endfunction

  function automatic fp16_t add(fp16_t a, fp16_t b);
    fp16_t y;
    real r;
    r = to_real(a) + to_real(b);
    if (r == 0.0) begin
      if (a[14:10] == 0 && b[14:10] == 0) return {a[15] & b[15], 15'd0};
      return 16'h0000;
    end
    return from_real(r);
  endfunction

  function automatic logic is_neg(fp16_t x);
    return x[15] && (x[14:10] != 0);
  endfunction

  // floor(|x| * 1024), saturated to 16 bits
  function automatic int to_fix(fp16_t x);
    real v;
    v = to_real({1'b0, x[14:0]}) * 1024.0;
    if (v >= 65535.0) return 65535;
    return int'($floor(v));
  endfunction

  function automatic int lut_idx(int fix, int scale, int depth);
    int q;
    q = (fix * scale + 512) / 1024;
    return (q > depth - 1) ? depth - 1 : q;
  endfunction

  function automatic fp16_t tanh_tab(int k);
    real x;
    x = real'(k) * 0.01;
    return from_real((($exp(2.0 * x) - 1.0) / ($exp(2.0 * x) + 1.0)));
  endfunction

  function automatic fp16_t atanh_tab(int k);
    real p;
    p = real'(k) * 0.005;
    if (p > 0.999) p = 0.999;
    return from_real(0.5 * $ln((1.0 + p) / (1.0 - p)));
  endfunction

  // check-node message from the other edges' Lji values, in slot order
  function automatic fp16_t cn_update(fp16_t lji[$]);
    fp16_t prod, h, t, a;
    prod = 16'h3C00;
    foreach (lji[n]) begin
      // halve (exponent - 1, flushed), limit to 5.109
      if (lji[n][14:10] <= 1) h = {lji[n][15], 15'd0};
      else                    h = {lji[n][15], lji[n][14:10] - 5'd1, lji[n][9:0]};
      if (h[14:0] > 15'h451C) h = {h[15], 15'h451C};
      t = tanh_tab(lut_idx(to_fix(h), 100, 512));
      t = {h[15], t[14:0]};
      prod = mul(prod, t);
    end
    if (prod[14:0] > 15'h3BFE) prod = {prod[15], 15'h3BFE};
    a = atanh_tab(lut_idx(to_fix(prod), 200, 256));
    if (a[14:10] == 0)       a = 16'h0000;
    else if (a[14:10] >= 30) a = {1'b0, 15'h7BFF};
    else                     a = {1'b0, a[14:10] + 5'd1, a[9:0]};
    return {prod[15], a[14:0]};
  endfunction

  // standard normal sample
  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom % 1000000) + 1.0) / 1000001.0;
    u2 = real'($urandom % 1000000) / 1000000.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  // A random codeword of the code with sub-matrix size m (m <= MAXM):
  // H is brought to reduced row-echelon form over GF(2), the non-pivot
  // bits are drawn at random and each pivot bit is the parity of the free
  // bits in its row.
  function automatic logic [5*MAXM-1:0] random_codeword(int m);
    logic [5*MAXM-1:0] h [$];
    logic [5*MAXM-1:0] x, row;
    int piv [$];
    int rank, n, r;
    n = 5 * m;
    for (int i = 0; i < 3 * m; i++) h.push_back('0);
    for (int t = 0; t < 15; t++)
      for (int i = 0; i < m; i++) begin
        row = h[term_row(m, t, i)];
        row[term_col(m, t, i)] = 1'b1;
        h[term_row(m, t, i)] = row;
      end
    rank = 0;
    for (int c = 0; c < n && rank < 3 * m; c++) begin
      r = -1;
      for (int k = rank; k < 3 * m; k++) if (h[k][c]) begin r = k; break; end
      if (r < 0) continue;
      row = h[r]; h[r] = h[rank]; h[rank] = row;
      for (int k = 0; k < 3 * m; k++) if (k != rank && h[k][c]) h[k] ^= row;
      piv.push_back(c);
      rank++;
    end
    x = '0;
    for (int c = 0; c < n; c++) x[c] = 1'($urandom);
    for (int k = 0; k < rank; k++) x[piv[k]] = 1'b0;
    for (int k = 0; k < rank; k++) x[piv[k]] = ^(h[k] & x);
    return x;
  endfunction

  // modulo-2 syndrome weight of word x
  function automatic int syndrome_weight(int m, logic [5*MAXM-1:0] x);
    logic [3*MAXM-1:0] syn;
    int w;
    syn = '0;
    for (int t = 0; t < 15; t++)
      for (int i = 0; i < m; i++) syn[term_row(m, t, i)] ^= x[term_col(m, t, i)];
    w = 0;
    for (int r = 0; r < 3 * m; r++) w += int'(syn[r]);
    return w;
  endfunction

endpackage
