// fp16_to_fixed: magnitude of a half-precision float as unsigned fixed point.
//
// This is the "float to fixed" step the check node takes before it indexes
// its tanh and atanh tables. The output has INT_W integer and FRAC_W
// fraction bits; the significand is shifted by (exponent - 25 + FRAC_W)
// places, bits below the fixed-point resolution are truncated and a value
// too large for the format saturates to all ones. The sign is ignored (the
// tables hold odd functions, the caller keeps the sign). The format is a
// choice of this design: the decoder description does not give it.
//
// Interface: combinational, y = min(|x|, max) in units of 2^-FRAC_W.
module fp16_to_fixed
  import spa_pkg::*;
#(
  parameter int unsigned INT_W  = 6,
  parameter int unsigned FRAC_W = 10
) (
  input  fp16_t                    x,
  output logic [INT_W+FRAC_W-1:0]  y
);

  localparam int unsigned W = INT_W + FRAC_W;

  logic [10:0]  sig;
  int           sh;
  logic [W+31:0] wide;

  always_comb begin
    sig  = {1'b1, x[9:0]};
    sh   = int'(x[14:10]) - 25 + int'(FRAC_W);
    wide = '0;
    if (x[14:10] == 5'd0) begin
      y = '0;
    end else if (sh >= 0) begin
      wide = (W + 32)'(sig) << sh;
      if (|wide[W+31:W]) y = '1;
      else               y = wide[W-1:0];
    end else if (sh > -11) begin
      y = W'(sig >> (-sh));
    end else begin
      y = '0;
    end
  end

endmodule
