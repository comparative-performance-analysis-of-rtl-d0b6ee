// lut_index: address of a function table from a fixed-point magnitude.
//
// The check node's tanh table has a step of 0.01 and its atanh table a step
// of 0.005, so the address of x is round(x / step) = round(x * SCALE) with
// SCALE = 100 or 200. The fixed-point input x has FRAC_W fraction bits; the
// product x * SCALE is rounded by adding one half before dropping the
// fraction, and the result is clamped to DEPTH-1. The steps are the
// decoder's; rounding to the nearest table point is a choice of this design.
//
// Interface: combinational.
module lut_index #(
  parameter int unsigned X_W    = 16,
  parameter int unsigned FRAC_W = 10,
  parameter int unsigned SCALE  = 100,
  parameter int unsigned DEPTH  = 512,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic [X_W-1:0] x,
  output logic [AW-1:0]  idx
);

  logic [X_W+15:0] p;
  logic [X_W+15:0] q;

  always_comb begin
    p = (X_W + 16)'(x) * (X_W + 16)'(SCALE) + (X_W + 16)'(1 << (FRAC_W - 1));
    q = p >> FRAC_W;
    if (q >= (X_W + 16)'(DEPTH - 1)) idx = AW'(DEPTH - 1);
    else                             idx = q[AW-1:0];
  end

endmodule
