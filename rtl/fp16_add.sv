// fp16_add: combinational half-precision floating-point adder.
//
// It is the adder of the variable-node and decision units, which sum the
// channel LLR and the check-to-variable messages. The operand of larger
// magnitude is kept, the smaller significand is shifted right into three
// extra bits (guard, round and a sticky bit collecting everything shifted
// out), the two are added or subtracted, the result is normalised with a
// leading-zero count and rounded to nearest, ties to even.
//
// Choices of this design (the decoder description only says that fp16
// additions are used): subnormals are flushed to zero, an exact
// cancellation gives +0, an underflow gives a zero of the result's sign,
// overflow saturates to +-65504, and there are no infinities or NaNs.
//
// Interface: y = a + b, no clock, no latency.
module fp16_add
  import spa_pkg::*;
(
  input  fp16_t a,
  input  fp16_t b,
  output fp16_t y
);

  fp16_t       big, sml;
  logic [4:0]  d;
  logic [13:0] mb, ms;         // 1.ffffffffff + 3 extra bits
  logic [14:0] sum;
  logic        sub;
  logic [4:0]  lz;
  logic signed [6:0] exp;
  logic [10:0] mant;
  logic        guard, sticky, rnd;
  logic [11:0] mant_r;

  always_comb begin
    // zero operands
    if (a[14:0] > b[14:0]) begin big = a; sml = b; end
    else                   begin big = b; sml = a; end
    sub = a[15] ^ b[15];
    d   = big[14:10] - sml[14:10];
    mb  = {1'b1, big[9:0], 3'b000};
    ms  = (sml[14:10] == 5'd0) ? 14'd0 : {1'b1, sml[9:0], 3'b000};
    if (d > 5'd13) begin
      ms = {13'd0, |ms};
    end else if (d != 5'd0) begin
      // shift right, folding the shifted-out bits into bit 0
      ms = (ms >> d) | 14'(|(ms & ((14'd1 << d) - 14'd1)));
    end
    exp = 7'(signed'({2'b00, big[14:10]}));
    if (sub) sum = {1'b0, mb} - {1'b0, ms};
    else     sum = {1'b0, mb} + {1'b0, ms};
    lz = 5'd0;
    if (sum[14]) begin
      sum = {1'b0, sum[14:2], sum[1] | sum[0]};
      exp = exp + 7'sd1;
    end else begin
      for (int i = 13; i >= 0; i--) begin
        if (sum[i]) break;
        lz = lz + 5'd1;
      end
      if (lz != 5'd0 && lz < 5'd14) begin
        sum = sum << lz;
        exp = exp - 7'(signed'({2'b00, lz}));
      end
    end
    mant   = sum[13:3];
    guard  = sum[2];
    sticky = sum[1] | sum[0];
    rnd    = guard & (sticky | mant[0]);
    mant_r = {1'b0, mant} + 12'(rnd);
    if (mant_r[11]) begin
      mant_r = mant_r >> 1;
      exp    = exp + 7'sd1;
    end
    if (big[14:10] == 5'd0)
      y = {a[15] & b[15], 15'd0};           // both operands zero
    else if (lz >= 5'd14)
      y = 16'h0000;                         // exact cancellation
    else if (exp <= 7'sd0)
      y = {big[15], 15'd0};                 // underflow, flushed
    else if (exp >= 7'sd31)
      y = {big[15], FP16_MAX[14:0]};
    else
      y = {big[15], exp[4:0], mant_r[9:0]};
  end

endmodule
