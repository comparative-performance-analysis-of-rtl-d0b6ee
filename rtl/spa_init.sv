// spa_init: LLR initialisation unit ("Initialize Lji").
//
// On start it reads the N channel LLRs of a frame from an external source,
// one per column: it puts out llr_addr = j with llr_rd, takes llr_data one
// cycle later, stores it in the channel LLR memory at j and copies it into
// the variable-to-check message of every edge of column j (Lji = Lj, the
// first step of the sum-product algorithm), walking the column list of H.
// When the last column is done it pulses done, which starts the first
// check-node pass. Reading the source over an address/data pair follows the
// decoder's block diagram; the one-cycle source latency and the
// column-by-column order are choices of this design.
//
// Timing: a column of weight d takes 3 + 2*d cycles; the whole frame that
// sum plus 2 cycles.
//
// en = 0 freezes the unit with llr_addr held.
module spa_init
  import spa_pkg::*;
#(
  parameter int unsigned M   = 512,
  localparam int unsigned R  = 3 * M,
  localparam int unsigned N  = 5 * M,
  localparam int unsigned RW = $clog2(R),
  localparam int unsigned NW = $clog2(N),
  localparam int unsigned EW = $clog2(R * ROW_DEG)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          start,
  output logic          busy,
  output logic          done,
  // external LLR source
  output logic [NW-1:0] llr_addr,
  output logic          llr_rd,
  input  fp16_t         llr_data,
  // H column port
  output logic [NW-1:0] col_idx,
  output logic [2:0]    col_slot,
  input  logic [2:0]    col_cnt,
  input  logic [RW-1:0] col_row,
  input  logic [2:0]    col_rslot,
  // channel LLR memory write
  output logic          llr_we,
  output logic [NW-1:0] llr_waddr,
  output fp16_t         llr_wdata,
  // Lji memory write
  output logic          lji_we,
  output logic [EW-1:0] lji_waddr,
  output fp16_t         lji_wdata
);

  typedef enum logic [2:0] {IDLE, REQ, LATCH, ENT_REQ, ENT_WR, NEXT, DONE} init_state_t;

  init_state_t   st;
  logic [NW-1:0] col;
  logic [2:0]    cnt, s;
  fp16_t         llr_q;

  assign busy      = (st != IDLE);
  assign done      = (st == DONE);
  assign llr_addr  = col;
  assign llr_rd    = (st == REQ);
  assign col_idx   = col;
  assign col_slot  = s;
  assign llr_we    = en && (st == LATCH);
  assign llr_waddr = col;
  assign llr_wdata = llr_data;
  assign lji_we    = en && (st == ENT_WR);
  assign lji_waddr = EW'(int'(col_row) * ROW_DEG + int'(col_rslot));
  assign lji_wdata = llr_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st    <= IDLE;
      col   <= '0;
      cnt   <= '0;
      s     <= '0;
      llr_q <= '0;
    end else if (en) begin
      unique case (st)
        IDLE: if (start) begin
          col <= '0;
          s   <= '0;
          st  <= REQ;
        end
        REQ: st <= LATCH;
        LATCH: begin
          llr_q <= llr_data;
          cnt   <= col_cnt;
          s     <= '0;
          st    <= (col_cnt == 3'd0) ? NEXT : ENT_REQ;
        end
        ENT_REQ: st <= ENT_WR;
        ENT_WR: begin
          s  <= s + 3'd1;
          st <= (s + 3'd1 < cnt) ? ENT_REQ : NEXT;
        end
        NEXT: begin
          col <= col + 1'b1;
          s   <= '0;
          st  <= (col == NW'(N - 1)) ? DONE : REQ;
        end
        DONE:    st <= IDLE;
        default: st <= IDLE;
      endcase
    end
  end

endmodule
