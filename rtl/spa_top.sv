// spa_top: sequential sum-product (SPA) LDPC decoder for the CCSDS
// rate-1/2 AR4JA code with k = 1024 information bits (M = 512: H is
// 1536 x 2560, 7680 ones).
//
// After reset the parity-check matrix is built in sparse form (7680
// cycles), then ready rises. A start pulse runs one frame through the
// units, each starting the next, as in the decoder's block diagram:
//   Initialize Lji --Start Cn--> Check node --Start Vn--> Variable node
//   --Start Decode--> Decision --Next Itr--> Iteration control
//   --Start next Cn--> Check node ...
// until the decoded word satisfies every parity check or MAX_ITER
// iterations have run; done then pulses with converged and iterations.
// Exactly one unit is active at a time; the memories (Lji messages, Lij
// messages, channel LLRs) and the two read ports of the H store go to that
// unit. Messages are fp16 and stored one per edge at row*6 + slot.
//
// Channel LLRs (fp16, negative means bit 1) are read from an external
// source: llr_addr/llr_rd out, llr_data in one cycle later, for all N = 5M
// code positions; the source supplies 0 for punctured positions.
// Decoded bits stream out on dec_valid/dec_addr/dec_data during every
// decision pass; the last pass before done is the decoder's output.
//
// Debug mode (debug = 1) pauses every unit and lets the Lji and Lij
// memories be read at dbg_addr (edge address); dbg_lji/dbg_lij follow one
// cycle later. Processing resumes one cycle after debug falls so that
// every read a unit was waiting for is issued again.
//
// The structure, number format, tables and stopping rule follow the
// decoder this RTL implements; the port protocol, edge-address layout,
// debug read port and the on-chip generation of H are this design's
// choices.
module spa_top
  import spa_pkg::*;
#(
  parameter int unsigned M        = 512,
  parameter int unsigned MAX_ITER = 15,
  localparam int unsigned R       = 3 * M,
  localparam int unsigned N       = 5 * M,
  localparam int unsigned RW      = $clog2(R),
  localparam int unsigned NW      = $clog2(N),
  localparam int unsigned EW      = $clog2(R * ROW_DEG),
  localparam int unsigned IW      = $clog2(MAX_ITER + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          ready,
  // channel LLR source
  output logic [NW-1:0] llr_addr,
  output logic          llr_rd,
  input  fp16_t         llr_data,
  // debug mode
  input  logic          debug,
  input  logic [EW-1:0] dbg_addr,
  output fp16_t         dbg_lji,
  output fp16_t         dbg_lij,
  // decoded bits
  output logic          dec_valid,
  output logic [NW-1:0] dec_addr,
  output logic          dec_data,
  // status
  output logic          done,
  output logic          converged,
  output logic [IW-1:0] iterations
);

  // ---- pause control ----
  logic debug_q, en;
  always_ff @(posedge clk) begin
    if (!rst_n) debug_q <= 1'b0;
    else        debug_q <= debug;
  end
  assign en = !debug && !debug_q;

  // ---- H store ----
  logic          gen_done;
  logic [RW-1:0] h_row_idx;
  logic [2:0]    h_row_slot, h_row_cnt;
  logic [NW-1:0] h_row_col;
  logic [NW-1:0] h_col_idx;
  logic [2:0]    h_col_slot, h_col_cnt, h_col_rslot;
  logic [RW-1:0] h_col_row;

  spa_hmatrix #(.M(M)) u_h (
    .clk, .rst_n, .en, .gen_done,
    .row_idx(h_row_idx), .row_slot(h_row_slot), .row_cnt(h_row_cnt), .row_col(h_row_col),
    .col_idx(h_col_idx), .col_slot(h_col_slot), .col_cnt(h_col_cnt),
    .col_row(h_col_row), .col_rslot(h_col_rslot)
  );

  // ---- memories ----
  logic          lji_we, lij_we, llr_we;
  logic [EW-1:0] lji_waddr, lji_raddr, lij_waddr, lij_raddr;
  logic [NW-1:0] llr_waddr, llr_raddr;
  fp16_t         lji_wdata, lji_rdata, lij_wdata, lij_rdata, llr_wdata, llr_rdata;

  spa_ram #(.DEPTH(R * ROW_DEG), .WIDTH(16)) u_lji (
    .clk, .we(lji_we), .waddr(lji_waddr), .wdata(lji_wdata), .raddr(lji_raddr), .rdata(lji_rdata));
  spa_ram #(.DEPTH(R * ROW_DEG), .WIDTH(16)) u_lij (
    .clk, .we(lij_we), .waddr(lij_waddr), .wdata(lij_wdata), .raddr(lij_raddr), .rdata(lij_rdata));
  spa_ram #(.DEPTH(N), .WIDTH(16)) u_llr (
    .clk, .we(llr_we), .waddr(llr_waddr), .wdata(llr_wdata), .raddr(llr_raddr), .rdata(llr_rdata));

  assign dbg_lji = lji_rdata;
  assign dbg_lij = lij_rdata;

  // ---- units ----
  logic in_busy, in_done, cn_busy, cn_done, vn_busy, vn_done, dc_busy, dc_done;
  logic dc_parity_ok, it_start_cn, it_done;

  logic [NW-1:0] in_col_idx, vn_col_idx, dc_col_idx;
  logic [2:0]    in_col_slot, vn_col_slot, dc_col_slot;
  logic [RW-1:0] cn_row_idx, dc_row_idx;
  logic [2:0]    cn_row_slot, dc_row_slot;
  logic          in_lji_we, vn_lji_we, cn_lij_we;
  logic [EW-1:0] in_lji_waddr, vn_lji_waddr, cn_lji_raddr, cn_lij_waddr;
  logic [EW-1:0] vn_lij_raddr, dc_lij_raddr;
  fp16_t         in_lji_wdata, vn_lji_wdata;
  logic [NW-1:0] vn_llr_raddr, dc_llr_raddr;

  logic frame_start;
  assign frame_start = start && ready;

  spa_init #(.M(M)) u_init (
    .clk, .rst_n, .en, .start(frame_start), .busy(in_busy), .done(in_done),
    .llr_addr, .llr_rd, .llr_data,
    .col_idx(in_col_idx), .col_slot(in_col_slot), .col_cnt(h_col_cnt),
    .col_row(h_col_row), .col_rslot(h_col_rslot),
    .llr_we, .llr_waddr, .llr_wdata,
    .lji_we(in_lji_we), .lji_waddr(in_lji_waddr), .lji_wdata(in_lji_wdata)
  );

  spa_check_node #(.M(M)) u_cn (
    .clk, .rst_n, .en, .start(in_done || it_start_cn), .busy(cn_busy), .done(cn_done),
    .row_idx(cn_row_idx), .row_slot(cn_row_slot), .row_cnt(h_row_cnt),
    .lji_raddr(cn_lji_raddr), .lji_rdata,
    .lij_we(cn_lij_we), .lij_waddr(cn_lij_waddr), .lij_wdata
  );

  spa_var_node #(.M(M)) u_vn (
    .clk, .rst_n, .en, .start(cn_done), .busy(vn_busy), .done(vn_done),
    .col_idx(vn_col_idx), .col_slot(vn_col_slot), .col_cnt(h_col_cnt),
    .col_row(h_col_row), .col_rslot(h_col_rslot),
    .llr_raddr(vn_llr_raddr), .llr_rdata,
    .lij_raddr(vn_lij_raddr), .lij_rdata,
    .lji_we(vn_lji_we), .lji_waddr(vn_lji_waddr), .lji_wdata(vn_lji_wdata)
  );

  spa_decision #(.M(M)) u_dec (
    .clk, .rst_n, .en, .start(vn_done), .busy(dc_busy), .done(dc_done),
    .parity_ok(dc_parity_ok),
    .col_idx(dc_col_idx), .col_slot(dc_col_slot), .col_cnt(h_col_cnt),
    .col_row(h_col_row), .col_rslot(h_col_rslot),
    .row_idx(dc_row_idx), .row_slot(dc_row_slot), .row_cnt(h_row_cnt), .row_col(h_row_col),
    .llr_raddr(dc_llr_raddr), .llr_rdata,
    .lij_raddr(dc_lij_raddr), .lij_rdata,
    .dec_valid, .dec_addr, .dec_data
  );

  spa_iter_ctrl #(.MAX_ITER(MAX_ITER)) u_it (
    .clk, .rst_n, .en, .frame_start, .next_itr(dc_done), .parity_ok(dc_parity_ok),
    .start_cn(it_start_cn), .done(it_done), .converged, .iterations
  );

  assign done  = it_done;
  assign ready = gen_done && !in_busy && !cn_busy && !vn_busy && !dc_busy && !it_start_cn;

  // ---- port sharing: only one unit is busy at a time ----
  always_comb begin
    h_col_idx  = dc_busy ? dc_col_idx  : vn_busy ? vn_col_idx  : in_col_idx;
    h_col_slot = dc_busy ? dc_col_slot : vn_busy ? vn_col_slot : in_col_slot;
    h_row_idx  = dc_busy ? dc_row_idx  : cn_row_idx;
    h_row_slot = dc_busy ? dc_row_slot : cn_row_slot;

    lji_we    = in_lji_we || vn_lji_we;
    lji_waddr = vn_busy ? vn_lji_waddr : in_lji_waddr;
    lji_wdata = vn_busy ? vn_lji_wdata : in_lji_wdata;
    lji_raddr = debug ? dbg_addr : cn_lji_raddr;

    lij_we    = cn_lij_we;
    lij_waddr = cn_lij_waddr;
    lij_raddr = debug ? dbg_addr : dc_busy ? dc_lij_raddr : vn_lij_raddr;

    llr_raddr = dc_busy ? dc_llr_raddr : vn_llr_raddr;
  end

  // one unit at a time
  assert property (@(posedge clk) disable iff (!rst_n)
                   $onehot0({in_busy, cn_busy, vn_busy, dc_busy}))
    else $error("spa_top: two units active at once");
  // no memory writes while paused
  assert property (@(posedge clk) disable iff (!rst_n)
                   !en |-> !(lji_we || lij_we || llr_we))
    else $error("spa_top: write during debug pause");

endmodule
