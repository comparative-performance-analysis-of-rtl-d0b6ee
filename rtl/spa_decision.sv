// spa_decision: decision unit ("Decision (Decode)") of the decoder.
//
// Pass 1, over the columns: the total LLR of bit j is the channel LLR plus
// all check-to-variable messages of the column, Lj + sum_i Lij; the bit is
// decoded as 1 when the total is negative and 0 otherwise (a negative zero
// counts as 0). Each decoded bit is put out on dec_valid/dec_addr/dec_data
// and kept in a bit register.
// Pass 2, over the rows: the modulo-2 sum of the decoded bits of every row
// of H is formed from the row lists; the pass stops at the first row whose
// sum is 1 (parity_ok = 0) or after the last row (parity_ok = 1). done then
// pulses for one cycle (Next Itr) with parity_ok valid.
// The total-LLR rule, hard decision and parity test are the decoder's; the
// two-pass order, the early stop in pass 2 and the bit stream are choices
// of this design.
//
// Timing: pass 1 takes 3 + 5*d cycles per column of weight d, pass 2
// 2 + 2*d + 1 cycles per row checked, plus 2 cycles.
// en = 0 freezes the unit.
module spa_decision
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
  output logic          parity_ok,
  // H column port
  output logic [NW-1:0] col_idx,
  output logic [2:0]    col_slot,
  input  logic [2:0]    col_cnt,
  input  logic [RW-1:0] col_row,
  input  logic [2:0]    col_rslot,
  // H row port
  output logic [RW-1:0] row_idx,
  output logic [2:0]    row_slot,
  input  logic [2:0]    row_cnt,
  input  logic [NW-1:0] row_col,
  // channel LLR memory read
  output logic [NW-1:0] llr_raddr,
  input  fp16_t         llr_rdata,
  // Lij memory read
  output logic [EW-1:0] lij_raddr,
  input  fp16_t         lij_rdata,
  // decoded bits
  output logic          dec_valid,
  output logic [NW-1:0] dec_addr,
  output logic          dec_data
);

  typedef enum logic [3:0] {
    IDLE, LOAD, GET_EDGE, GET_LIJ, ADD, DECIDE, CHK_ROW, CHK_ENT, CHK_END, DONE
  } dec_state_t;

  dec_state_t    st;
  logic [NW-1:0] col;
  logic [RW-1:0] row;
  logic [2:0]    cnt, s;
  logic          wt, par;
  fp16_t         sum, x;
  logic [EW-1:0] edge_a;
  logic [N-1:0]  bits;
  fp16_t         add_y;

  fp16_add u_add (.a(sum), .b(x), .y(add_y));

  assign busy      = (st != IDLE);
  assign done      = (st == DONE);
  assign col_idx   = col;
  assign col_slot  = s;
  assign row_idx   = row;
  assign row_slot  = s;
  assign llr_raddr = col;
  assign lij_raddr = edge_a;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st        <= IDLE;
      col       <= '0;
      row       <= '0;
      cnt       <= '0;
      s         <= '0;
      wt        <= 1'b0;
      par       <= 1'b0;
      sum       <= '0;
      x         <= '0;
      edge_a    <= '0;
      bits      <= '0;
      parity_ok <= 1'b0;
      dec_valid <= 1'b0;
      dec_addr  <= '0;
      dec_data  <= 1'b0;
    end else if (en) begin
      dec_valid <= 1'b0;
      unique case (st)
        IDLE: if (start) begin
          col <= '0;
          s   <= '0;
          wt  <= 1'b0;
          st  <= LOAD;
        end
        LOAD: begin
          wt <= ~wt;
          if (wt) begin
            cnt <= col_cnt;
            sum <= llr_rdata;
            s   <= '0;
            st  <= (col_cnt == 3'd0) ? DECIDE : GET_EDGE;
          end
        end
        GET_EDGE: begin
          wt <= ~wt;
          if (wt) begin
            edge_a <= EW'(int'(col_row) * ROW_DEG + int'(col_rslot));
            st     <= GET_LIJ;
          end
        end
        GET_LIJ: begin
          wt <= ~wt;
          if (wt) begin
            x  <= lij_rdata;
            st <= ADD;
          end
        end
        ADD: begin
          sum <= add_y;
          s   <= s + 3'd1;
          st  <= (s + 3'd1 < cnt) ? GET_EDGE : DECIDE;
        end
        DECIDE: begin
          bits[col] <= fp16_is_neg(sum);
          dec_valid <= 1'b1;
          dec_addr  <= col;
          dec_data  <= fp16_is_neg(sum);
          s         <= '0;
          if (col == NW'(N - 1)) begin
            row <= '0;
            st  <= CHK_ROW;
          end else begin
            col <= col + 1'b1;
            st  <= LOAD;
          end
        end
        CHK_ROW: begin
          wt <= ~wt;
          if (wt) begin
            cnt <= row_cnt;
            par <= 1'b0;
            s   <= '0;
            st  <= (row_cnt == 3'd0) ? CHK_END : CHK_ENT;
          end
        end
        CHK_ENT: begin
          wt <= ~wt;
          if (wt) begin
            par <= par ^ bits[row_col];
            s   <= s + 3'd1;
            st  <= (s + 3'd1 < cnt) ? CHK_ENT : CHK_END;
          end
        end
        CHK_END: begin
          s <= '0;
          if (par) begin
            parity_ok <= 1'b0;
            st        <= DONE;
          end else if (row == RW'(R - 1)) begin
            parity_ok <= 1'b1;
            st        <= DONE;
          end else begin
            row <= row + 1'b1;
            st  <= CHK_ROW;
          end
        end
        DONE:    st <= IDLE;
        default: st <= IDLE;
      endcase
    end
  end

endmodule
