// atanh_lut: read-only table of atanh(k * 0.005), k = 0 .. DEPTH-1, in fp16.
//
// The check node turns its clamped tanh product back into a message with
// this table (the result is then doubled). The 0.005 step is the decoder's.
// The product is clamped to 0.999 before the lookup, so from index 200 on
// the table holds atanh(0.999) = 3.80 rather than the unbounded atanh(1);
// the 256-entry depth is a choice of this design. The contents are computed
// in the initial block in integer fixed point, from
// atanh(k/200) = 0.5 ln((200 + k)/(200 - k)) and atanh(0.999) = 0.5 ln(1999).
//
// Interface: synchronous read, data is valid the cycle after addr.
module atanh_lut
  import spa_pkg::*;
#(
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output fp16_t         data
);

  fp16_t rom [DEPTH];

  initial begin
    for (int k = 0; k < DEPTH; k++)
      rom[k] = (k < 200) ? half_ln_ratio(200 + k, 200 - k) : half_ln_ratio(1999, 1);
  end

  always_ff @(posedge clk) data <= rom[addr];

endmodule
