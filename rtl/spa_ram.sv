// spa_ram: simple dual-port synchronous RAM (one write port, one read port).
//
// The decoder keeps its variable-to-check messages (Lji), check-to-variable
// messages (Lij) and channel LLRs in memories of this kind, one word per
// edge of the parity-check matrix or per code bit. Block RAM needs a clock
// to read, so rdata is registered: it shows mem[raddr] one cycle after raddr
// is presented. A read of the address being written returns the old word.
//
// Interface: we/waddr/wdata written at the rising edge; raddr -> rdata one
// cycle later.
module spa_ram #(
  parameter int unsigned DEPTH = 9216,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
