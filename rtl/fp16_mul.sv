// fp16_mul: combinational half-precision floating-point multiplier.
//
// It is the "float product" unit of the check node, which multiplies the
// tanh values of the incoming messages. The two 11-bit significands are
// multiplied, the 22-bit product is normalised by at most one place and
// rounded to nearest, ties to even.
//
// Choices of this design (the decoder description only names the unit):
// subnormal inputs and results are flushed to signed zero, a result beyond
// the largest finite value saturates to +-65504, and infinities and NaNs are
// not produced (inputs with exponent 31 are treated as ordinary numbers).
//
// Interface: y = a * b, no clock, no latency.
module fp16_mul
  import spa_pkg::*;
(
  input  fp16_t a,
  input  fp16_t b,
  output fp16_t y
);

  logic        s;
  logic [21:0] prod;
  logic [10:0] mant;
  logic        guard, sticky, rnd;
  logic [11:0] mant_r;
  logic signed [7:0] exp;

  always_comb begin
    s      = a[15] ^ b[15];
    prod   = {1'b1, a[9:0]} * {1'b1, b[9:0]};
    exp    = 8'(signed'({3'b000, a[14:10]})) + 8'(signed'({3'b000, b[14:10]})) - 8'sd15;
    if (prod[21]) begin
      mant   = prod[21:11];
      guard  = prod[10];
      sticky = |prod[9:0];
      exp    = exp + 8'sd1;
    end else begin
      mant   = prod[20:10];
      guard  = prod[9];
      sticky = |prod[8:0];
    end
    rnd    = guard & (sticky | mant[0]);
    mant_r = {1'b0, mant} + 12'(rnd);
    if (mant_r[11]) begin
      mant_r = mant_r >> 1;
      exp    = exp + 8'sd1;
    end
    if (a[14:10] == 5'd0 || b[14:10] == 5'd0 || exp <= 8'sd0)
      y = {s, 15'd0};
    else if (exp >= 8'sd31)
      y = {s, FP16_MAX[14:0]};
    else
      y = {s, exp[4:0], mant_r[9:0]};
  end

endmodule
