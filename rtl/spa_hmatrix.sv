// spa_hmatrix: sparse parity-check matrix of the CCSDS rate-1/2 code.
//
// Storing the full 3M x 5M matrix (1536 x 2560 for M = 512) would waste
// memory, so H is kept in sparse form, as the decoder prescribes: for every
// row a list of the columns holding a one, for every column a list of the
// rows holding a one, and the number of ones of every row and column. Each
// list has a fixed number of slots (ROW_DEG, COL_DEG = 6, the largest
// weights); the count says how many are used.
//
// The lists are built by this module after reset rather than loaded: it
// walks the 15 identity/permutation terms of H (see spa_pkg), and for each
// of the M rows of a term computes the column with the pi_k formula and
// appends it, one matrix entry per clock cycle (15*M cycles, 7680 for
// M = 512), then raises gen_done. A column-list entry holds the row and the
// slot that the entry occupies in that row's list, so that the per-edge
// message memories (address row*ROW_DEG + slot) can be reached from a
// column directly; this is a choice of this design.
//
// Read ports (registered, one cycle latency, valid after gen_done):
//   row port:    row_idx, row_slot  -> row_cnt, row_col
//   column port: col_idx, col_slot  -> col_cnt, col_row, col_rslot
// en = 0 freezes the generator (debug pause); reads go on regardless.
module spa_hmatrix
  import spa_pkg::*;
#(
  parameter int unsigned M   = 512,
  localparam int unsigned R  = 3 * M,
  localparam int unsigned N  = 5 * M,
  localparam int unsigned RW = $clog2(R),
  localparam int unsigned NW = $clog2(N),
  localparam int unsigned MW = $clog2(M)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  output logic          gen_done,
  // row port
  input  logic [RW-1:0] row_idx,
  input  logic [2:0]    row_slot,
  output logic [2:0]    row_cnt,
  output logic [NW-1:0] row_col,
  // column port
  input  logic [NW-1:0] col_idx,
  input  logic [2:0]    col_slot,
  output logic [2:0]    col_cnt,
  output logic [RW-1:0] col_row,
  output logic [2:0]    col_rslot
);

  typedef struct packed {
    logic [RW-1:0] row;
    logic [2:0]    slot;
  } col_ent_t;

  logic [NW-1:0] row_list [R * ROW_DEG];
  col_ent_t      col_list [N * COL_DEG];
  logic [2:0]    rcnt [R];
  logic [2:0]    ccnt [N];

  logic [3:0]    t;          // term being generated
  logic [MW-1:0] i;          // row within the term
  logic [RW-1:0] gr;         // generated row
  logic [NW-1:0] gc;         // generated column

  always_comb begin
    hterm_t ht;
    ht = H_TERMS[t];
    gr = RW'(int'(ht.rb) * M + int'(i));
    gc = NW'(int'(ht.cb) * M + int'(pi_col(M, int'(ht.k), int'(i))));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      t        <= '0;
      i        <= '0;
      gen_done <= 1'b0;
      for (int r = 0; r < R; r++) rcnt[r] <= '0;
      for (int c = 0; c < N; c++) ccnt[c] <= '0;
    end else if (en && !gen_done) begin
      rcnt[gr] <= rcnt[gr] + 3'd1;
      ccnt[gc] <= ccnt[gc] + 3'd1;
      if (i == MW'(M - 1)) begin
        i <= '0;
        if (t == 4'(N_TERMS - 1)) gen_done <= 1'b1;
        else                      t <= t + 4'd1;
      end else begin
        i <= i + 1'b1;
      end
    end
  end

  // list memories (no reset: every slot read is written first)
  always_ff @(posedge clk) begin
    if (rst_n && en && !gen_done) begin
      row_list[int'(gr) * ROW_DEG + int'(rcnt[gr])] <= gc;
      col_list[int'(gc) * COL_DEG + int'(ccnt[gc])] <= '{row: gr, slot: rcnt[gr]};
    end
  end

  // read ports
  always_ff @(posedge clk) begin
    col_ent_t ce;
    ce        = col_list[int'(col_idx) * COL_DEG + int'(col_slot)];
    row_cnt   <= rcnt[row_idx];
    row_col   <= row_list[int'(row_idx) * ROW_DEG + int'(row_slot)];
    col_cnt   <= ccnt[col_idx];
    col_row   <= ce.row;
    col_rslot <= ce.slot;
  end

endmodule
