// spa_var_node: variable-node unit of the sequential sum-product decoder.
//
// For every column j of H and every edge (i, j) of that column it computes
// the variable-to-check message
//     Lji = Lj + sum_{i' != i} Li'j
// starting from the channel LLR Lj and adding the check-to-variable
// messages of all other edges of the column in slot order, one fp16
// addition per step, and writes it back to the Lji memory. It runs only
// after the check-node pass has finished, as in the decoder it implements.
// The exclusion sum (rather than total minus own message) and the one-step-
// at-a-time schedule follow the decoder; the state sequence and the
// one-cycle memory waits are this design's.
//
// Timing: a column of weight d takes 3 + d*(4 + 5*(d-1)) cycles; a pass
// takes that sum plus 2 (start and done cycles).
//
// Interface: start (Start Vn) is taken in IDLE; done pulses one cycle
// (Start Decode). The column port of spa_hmatrix gives, for each slot, the
// row and row slot of the edge, i.e. its message address row*ROW_DEG+slot.
// en = 0 freezes the unit.
module spa_var_node
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
  // H column port
  output logic [NW-1:0] col_idx,
  output logic [2:0]    col_slot,
  input  logic [2:0]    col_cnt,
  input  logic [RW-1:0] col_row,
  input  logic [2:0]    col_rslot,
  // channel LLR memory read
  output logic [NW-1:0] llr_raddr,
  input  fp16_t         llr_rdata,
  // Lij memory read
  output logic [EW-1:0] lij_raddr,
  input  fp16_t         lij_rdata,
  // Lji memory write
  output logic          lji_we,
  output logic [EW-1:0] lji_waddr,
  output fp16_t         lji_wdata
);

  typedef enum logic [3:0] {
    IDLE, LOAD_VN, SET_T, GET_EDGE, GET_LIJ, ADD, WRITE_LJI, NEXT_T,
    NEXT_COL, DONE
  } vn_state_t;

  vn_state_t     st;
  logic [NW-1:0] col;
  logic [2:0]    cnt, tgt, oth;
  logic          wt;
  fp16_t         lj, sum, x;
  logic [EW-1:0] tedge, edge_a;
  fp16_t         add_y;

  fp16_add u_add (.a(sum), .b(x), .y(add_y));

  function automatic logic [2:0] next_oth(logic [2:0] s, logic [2:0] t);
    logic [2:0] n;
    n = s + 3'd1;
    if (n == t) n = n + 3'd1;
    return n;
  endfunction

  assign busy      = (st != IDLE);
  assign done      = (st == DONE);
  assign col_idx   = col;
  assign col_slot  = (st == SET_T) ? tgt : oth;
  assign llr_raddr = col;
  assign lij_raddr = edge_a;
  assign lji_we    = en && (st == WRITE_LJI);
  assign lji_waddr = tedge;
  assign lji_wdata = sum;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st     <= IDLE;
      col    <= '0;
      cnt    <= '0;
      tgt    <= '0;
      oth    <= '0;
      wt     <= 1'b0;
      lj     <= '0;
      sum    <= '0;
      x      <= '0;
      tedge  <= '0;
      edge_a <= '0;
    end else if (en) begin
      unique case (st)
        IDLE: if (start) begin
          col <= '0;
          wt  <= 1'b0;
          st  <= LOAD_VN;
        end
        LOAD_VN: begin
          wt <= ~wt;
          if (wt) begin
            cnt <= col_cnt;
            lj  <= llr_rdata;
            tgt <= '0;
            st  <= (col_cnt == 3'd0) ? NEXT_COL : SET_T;
          end
        end
        SET_T: begin
          wt <= ~wt;
          if (wt) begin
            tedge <= EW'(int'(col_row) * ROW_DEG + int'(col_rslot));
            sum   <= lj;
            oth   <= (tgt == 3'd0) ? 3'd1 : 3'd0;
            st    <= (((tgt == 3'd0) ? 3'd1 : 3'd0) < cnt) ? GET_EDGE : WRITE_LJI;
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
          oth <= next_oth(oth, tgt);
          st  <= (next_oth(oth, tgt) < cnt) ? GET_EDGE : WRITE_LJI;
        end
        WRITE_LJI: st <= NEXT_T;
        NEXT_T: begin
          tgt <= tgt + 3'd1;
          st  <= (tgt + 3'd1 < cnt) ? SET_T : NEXT_COL;
        end
        NEXT_COL: begin
          col <= col + 1'b1;
          st  <= (col == NW'(N - 1)) ? DONE : LOAD_VN;
        end
        DONE:    st <= IDLE;
        default: st <= IDLE;
      endcase
    end
  end

endmodule
