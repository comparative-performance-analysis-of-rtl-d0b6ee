// spa_iter_ctrl: iteration control of the decoder.
//
// It counts decoding iterations. When a frame starts the count is cleared.
// Each time the decision unit finishes (next_itr) the count goes up by one;
// if the parity check held, the frame ends as converged; if the count has
// reached MAX_ITER, the frame ends unconverged; otherwise start_cn pulses
// and the next check-node pass begins. The counting and the two stopping
// rules are the decoder's; the limit default of 15 is the one used for its
// hardware evaluation, and the one-cycle registered outputs are this
// design's choice.
//
// Interface: frame_start and next_itr are one-cycle pulses; start_cn and
// done are one-cycle pulses one cycle later; converged and iterations hold
// until the next frame. en = 0 freezes the unit.
module spa_iter_ctrl #(
  parameter int unsigned MAX_ITER = 15,
  localparam int unsigned IW      = $clog2(MAX_ITER + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          frame_start,
  input  logic          next_itr,
  input  logic          parity_ok,
  output logic          start_cn,
  output logic          done,
  output logic          converged,
  output logic [IW-1:0] iterations
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      start_cn   <= 1'b0;
      done       <= 1'b0;
      converged  <= 1'b0;
      iterations <= '0;
    end else if (en) begin
      start_cn <= 1'b0;
      done     <= 1'b0;
      if (frame_start) begin
        converged  <= 1'b0;
        iterations <= '0;
      end else if (next_itr) begin
        iterations <= iterations + 1'b1;
        if (parity_ok) begin
          converged <= 1'b1;
          done      <= 1'b1;
        end else if (iterations + 1'b1 == IW'(MAX_ITER)) begin
          done      <= 1'b1;
        end else begin
          start_cn  <= 1'b1;
        end
      end
    end
  end

endmodule
