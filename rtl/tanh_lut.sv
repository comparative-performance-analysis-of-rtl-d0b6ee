// tanh_lut: read-only table of tanh(k * 0.01), k = 0 .. DEPTH-1, in fp16.
//
// The check node looks up tanh(|L|/2) here instead of computing it. The
// 0.01 step is the decoder's; the 512-entry range (up to tanh(5.11), which
// rounds to 1.0 in fp16 well after the product is clamped at 0.999) is a
// choice of this design. The contents are computed at elaboration by the
// initial block in integer fixed point: t_k = exp(-0.02 k) by repeated
// multiplication, then tanh = (1 - t)/(1 + t) rounded to fp16, so no data
// file is needed and a synthesis tool turns the array into a block ROM.
//
// Interface: synchronous read, data is valid the cycle after addr.
module tanh_lut
  import spa_pkg::*;
#(
  parameter int unsigned DEPTH = 512,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output fp16_t         data
);

  fp16_t rom [DEPTH];

  initial begin
    logic [127:0] t;
    t = FIX_ONE;
    for (int k = 0; k < DEPTH; k++) begin
      rom[k] = tanh_from_exp(t);
      t = (t * EXP_M002) >> 62;
    end
  end

  always_ff @(posedge clk) data <= rom[addr];

endmodule
