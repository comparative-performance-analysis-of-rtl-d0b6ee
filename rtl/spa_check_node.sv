// spa_check_node: check-node unit of the sequential sum-product decoder.
//
// For every row i of H and every edge (i, j) of that row it computes the
// check-to-variable message
//     Lij = 2 * atanh( prod_{j' != j} tanh(Lj'i / 2) )
// from the variable-to-check messages Lji, one arithmetic step per clock
// cycle under a single FSM, as the decoder prescribes: fetch Lji, halve it,
// limit it to the tanh table's range, convert it to fixed point, form the
// table address, look up tanh, multiply it into the running product; when
// all other edges are in, clamp the product to +-0.999, convert, look up
// atanh, double, and write Lij. tanh and atanh are odd, so the tables hold
// magnitudes and the sign travels with the value.
//
// The states carry the names of the decoder's check-node state diagram;
// the order in which they follow each other, the one-cycle waits on the
// synchronous memories and tables, and the Check Limit bound (5.11, the end
// of the tanh table) are this design's reading of it. The tanh table step
// (0.01), atanh step (0.005) and the 0.999 clamp are the decoder's.
//
// Timing: one row of weight d takes 3 + d*(8 + 9*(d-1)) cycles; a pass
// over all rows takes that sum plus 2 (start and done cycles).
//
// Interface: start (Start Cn) is taken in IDLE; done pulses for one cycle
// at the end (Start Vn). Messages live at edge address row*ROW_DEG + slot.
// The row port of spa_hmatrix supplies the row weights. en = 0 freezes the
// unit (all reads it waits for are re-issued by holding their addresses).
module spa_check_node
  import spa_pkg::*;
#(
  parameter int unsigned M   = 512,
  localparam int unsigned R  = 3 * M,
  localparam int unsigned RW = $clog2(R),
  localparam int unsigned EW = $clog2(R * ROW_DEG)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          start,
  output logic          busy,
  output logic          done,
  // H row port
  output logic [RW-1:0] row_idx,
  output logic [2:0]    row_slot,
  input  logic [2:0]    row_cnt,
  // Lji memory read
  output logic [EW-1:0] lji_raddr,
  input  fp16_t         lji_rdata,
  // Lij memory write
  output logic          lij_we,
  output logic [EW-1:0] lij_waddr,
  output fp16_t         lij_wdata
);

  localparam fp16_t TANH_LIM = 16'h451C;   // 5.109 (last tanh table point)
  localparam fp16_t PROD_LIM = 16'h3BFE;   // 0.999

  typedef enum logic [4:0] {
    IDLE, LOAD_CN, SET_I, GET_LJI, DIVIDE_2, CHECK_LIMIT, CONV_FIX_T,
    COMPUTE_IDX, GET_TANH, INIT_PRODUCT, COMPARE, CONV_FIX_A,
    COMPUTE_ATANH, MULTIPLY_2, WRITE_LIJ, NEXT_I, NEXT_J, DONE
  } cn_state_t;

  cn_state_t     st;
  logic [RW-1:0] row;
  logic [2:0]    cnt, tgt, oth;
  logic          wt;
  fp16_t         val, prod;
  logic [15:0]   fix;
  logic [8:0]    tidx;

  fp16_t         mul_y, tanh_d, atanh_d;
  logic [15:0]   fix_y;
  logic [8:0]    tidx_y;
  logic [7:0]    aidx_y;

  fp16_mul u_mul (.a(prod), .b(val), .y(mul_y));
  fp16_to_fixed #(.INT_W(6), .FRAC_W(10)) u_fix (
    .x(st == CONV_FIX_T ? val : prod), .y(fix_y));
  lut_index #(.X_W(16), .FRAC_W(10), .SCALE(100), .DEPTH(512)) u_tidx (
    .x(fix), .idx(tidx_y));
  lut_index #(.X_W(16), .FRAC_W(10), .SCALE(200), .DEPTH(256)) u_aidx (
    .x(fix), .idx(aidx_y));
  tanh_lut  #(.DEPTH(512)) u_tanh  (.clk, .addr(tidx),   .data(tanh_d));
  atanh_lut #(.DEPTH(256)) u_atanh (.clk, .addr(aidx_y), .data(atanh_d));

  // next "other" slot after s, skipping the target slot
  function automatic logic [2:0] next_oth(logic [2:0] s, logic [2:0] t);
    logic [2:0] n;
    n = s + 3'd1;
    if (n == t) n = n + 3'd1;
    return n;
  endfunction

  assign busy      = (st != IDLE);
  assign done      = (st == DONE);
  assign row_idx   = row;
  assign row_slot  = 3'd0;
  assign lji_raddr = EW'(int'(row) * ROW_DEG + int'(oth));
  assign lij_we    = en && (st == WRITE_LIJ);
  assign lij_waddr = EW'(int'(row) * ROW_DEG + int'(tgt));
  assign lij_wdata = val;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st   <= IDLE;
      row  <= '0;
      cnt  <= '0;
      tgt  <= '0;
      oth  <= '0;
      wt   <= 1'b0;
      val  <= '0;
      prod <= '0;
      fix  <= '0;
      tidx <= '0;
    end else if (en) begin
      unique case (st)
        IDLE: if (start) begin
          row <= '0;
          wt  <= 1'b0;
          st  <= LOAD_CN;
        end
        LOAD_CN: begin
          wt <= ~wt;
          if (wt) begin
            cnt <= row_cnt;
            tgt <= '0;
            st  <= (row_cnt == 3'd0) ? NEXT_J : SET_I;
          end
        end
        SET_I: begin
          prod <= FP16_ONE;
          oth  <= (tgt == 3'd0) ? 3'd1 : 3'd0;
          wt   <= 1'b0;
          st   <= (((tgt == 3'd0) ? 3'd1 : 3'd0) < cnt) ? GET_LJI : COMPARE;
        end
        GET_LJI: begin
          wt <= ~wt;
          if (wt) begin
            val <= lji_rdata;
            st  <= DIVIDE_2;
          end
        end
        DIVIDE_2:    begin val <= fp16_div2(val);           st <= CHECK_LIMIT; end
        CHECK_LIMIT: begin val <= fp16_clamp(val, TANH_LIM); st <= CONV_FIX_T; end
        CONV_FIX_T:  begin fix <= fix_y;                     st <= COMPUTE_IDX; end
        COMPUTE_IDX: begin tidx <= tidx_y; wt <= 1'b0;       st <= GET_TANH; end
        GET_TANH: begin
          wt <= ~wt;
          if (wt) begin
            val <= {val[15], tanh_d[14:0]};
            st  <= INIT_PRODUCT;
          end
        end
        INIT_PRODUCT: begin
          prod <= mul_y;
          oth  <= next_oth(oth, tgt);
          wt   <= 1'b0;
          st   <= (next_oth(oth, tgt) < cnt) ? GET_LJI : COMPARE;
        end
        COMPARE:    begin prod <= fp16_clamp(prod, PROD_LIM); st <= CONV_FIX_A; end
        CONV_FIX_A: begin fix <= fix_y; wt <= 1'b0;          st <= COMPUTE_ATANH; end
        COMPUTE_ATANH: begin
          wt <= ~wt;
          if (wt) begin
            val <= {prod[15], atanh_d[14:0]};
            st  <= MULTIPLY_2;
          end
        end
        MULTIPLY_2: begin val <= fp16_mul2(val); st <= WRITE_LIJ; end
        WRITE_LIJ:  st <= NEXT_I;
        NEXT_I: begin
          tgt <= tgt + 3'd1;
          st  <= (tgt + 3'd1 < cnt) ? SET_I : NEXT_J;
        end
        NEXT_J: begin
          row <= row + 1'b1;
          wt  <= 1'b0;
          st  <= (row == RW'(R - 1)) ? DONE : LOAD_CN;
        end
        DONE:    st <= IDLE;
        default: st <= IDLE;
      endcase
    end
  end

endmodule
