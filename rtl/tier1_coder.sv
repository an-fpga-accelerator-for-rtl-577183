// tier1_coder: EBCOT tier-1 coder of one JPEG2000 code block.
//
// Block memory -> bit-plane coder (BPC) -> CX/D FIFO -> MQ coder -> byte-out
// FIFO. The quantised wavelet coefficients of an H x W code block are loaded
// in sign-magnitude form through the load port (blk_clear first, then one
// sample per cycle). A start pulse then codes the block: the BPC controller
// walks bit planes, passes, stripes and columns; the stripe generator and
// column information generator present one 4-sample column with its
// neighbourhood; the context modeller codes the whole column in one cycle
// in the current pass; the context sequencer writes the resulting CX/D pairs
// one per cycle into the FIFO; the MQ coder turns them into bytes. The BPC
// pauses while the sequencer is busy or the FIFO is full, the MQ coder waits
// while the byte FIFO is full. After the last pass and once every pair has
// been coded, the MQ coder flushes; done then stays high until the next
// start. Bytes are read from the byte FIFO with out_valid/out_rd
// (first-word fall-through).
// Structure and block names follow the design; FIFO depths, the load port
// and the start/done protocol are this implementation's choices.
module tier1_coder
  import jp2k_pkg::*;
#(
  parameter int unsigned W          = 32,
  parameter int unsigned H          = 32,
  parameter int unsigned NBP        = 9,
  parameter int unsigned CXD_DEPTH  = 32,
  parameter int unsigned BYTE_DEPTH = 32
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // block load
  input  logic                  blk_clear,
  input  logic                  ld_en,
  input  logic [$clog2(H)-1:0]  ld_row,
  input  logic [$clog2(W)-1:0]  ld_col,
  input  logic                  ld_sign,
  input  logic [NBP-1:0]        ld_mag,
  // control
  input  band_e                 band,
  input  logic                  start,
  output logic                  busy,
  output logic                  done,
  // byte stream
  output logic                  out_valid,
  output logic [7:0]            out_byte,
  input  logic                  out_rd,
  // event strobes for monitoring
  output logic                  ev_stall,   // BPC holds a column (sequencer busy or FIFO full)
  output logic                  ev_run,     // cleanup column coded in run mode
  output logic                  ev_lps,     // MQ coder codes an LPS
  output logic                  ev_switch,  // MPS of a context switches
  output logic                  ev_carry,   // carry propagated into the waiting byte
  output logic                  ev_stuff    // byte after 0xFF carries 7 bits (bit stuffing)
);
  // memories
  logic [5:0][$clog2(H)-1:0] rd_row;
  logic [5:0][W-1:0]         bp_row, sgn_row, sig_row, eta_row, refd_row;
  logic [$clog2(NBP)-1:0]    msb_plane, plane;
  logic                      nonzero;

  // controller
  pass_e                     pass;
  logic [$clog2(H)-3:0]      stripe;
  logic [$clog2(W)-1:0]      col;
  logic                      col_valid, col_ready, st_wr;
  logic                      clear_all, clear_eta, bpc_busy, bpc_done;

  // stripe / column
  logic [5:0][W-1:0]         s_sig, s_sgn;
  logic [3:0][W-1:0]         s_bit, s_eta, s_refd;
  logic [5:0]                s_valid;
  col_info_t                 ci;
  col_result_t               res;
  logic                      run_used;

  // pair path
  logic                      seq_wr, seq_idle, cxd_full, cxd_empty;
  cxd_t                      seq_pair, cxd_head;
  logic                      mq_ready, mq_end, mq_done, mq_busy;
  logic                      mq_out_valid, byte_full, byte_empty;
  logic [7:0]                mq_out_byte;
  logic [$clog2(CXD_DEPTH):0]  cxd_count;
  logic [$clog2(BYTE_DEPTH):0] byte_count;

  code_block_mem #(.W(W), .H(H), .NBP(NBP)) u_cbmem (
    .clk(clk), .rst_n(rst_n), .clear(blk_clear),
    .wr_en(ld_en), .wr_row(ld_row), .wr_col(ld_col), .wr_sign(ld_sign), .wr_mag(ld_mag),
    .plane(plane), .rd_row(rd_row), .bp_row(bp_row), .sgn_row(sgn_row),
    .msb_plane(msb_plane), .nonzero(nonzero));

  state_mem #(.W(W), .H(H)) u_state (
    .clk(clk), .rst_n(rst_n), .clear_all(clear_all), .clear_eta(clear_eta),
    .wr_en(st_wr), .wr_stripe(stripe), .wr_col(col),
    .wr_sig(res.sig_new), .wr_eta(res.eta_new), .wr_refd(res.refd_new),
    .rd_row(rd_row), .sig_row(sig_row), .eta_row(eta_row), .refd_row(refd_row));

  bpc_controller #(.W(W), .H(H), .NBP(NBP)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(start), .nonzero(nonzero), .msb_plane(msb_plane),
    .pass(pass), .plane(plane), .stripe(stripe), .col(col),
    .col_valid(col_valid), .col_ready(col_ready), .st_wr(st_wr),
    .clear_all(clear_all), .clear_eta(clear_eta), .busy(bpc_busy), .done(bpc_done));

  stripe_generator #(.W(W), .H(H)) u_stripe (
    .stripe(stripe), .rd_row(rd_row),
    .bp_row(bp_row), .sgn_row(sgn_row), .sig_row(sig_row), .eta_row(eta_row), .refd_row(refd_row),
    .s_sig(s_sig), .s_sgn(s_sgn), .s_bit(s_bit), .s_eta(s_eta), .s_refd(s_refd), .s_valid(s_valid));

  column_info_gen #(.W(W)) u_colinfo (
    .col(col), .s_sig(s_sig), .s_sgn(s_sgn), .s_bit(s_bit), .s_eta(s_eta),
    .s_refd(s_refd), .s_valid(s_valid), .ci(ci));

  context_modeler u_cm (.pass(pass), .band(band), .ci(ci), .res(res), .run_used(run_used));

  context_sequencer u_seq (
    .clk(clk), .rst_n(rst_n), .in_valid(col_valid), .in_ready(col_ready),
    .in_pairs(res.pairs), .in_npairs(res.npairs),
    .out_wr(seq_wr), .out_pair(seq_pair), .fifo_full(cxd_full), .idle(seq_idle));

  sync_fifo #(.WIDTH($bits(cxd_t)), .DEPTH(CXD_DEPTH)) u_cxd_fifo (
    .clk(clk), .rst_n(rst_n), .clear(start),
    .wr_en(seq_wr), .wr_data(seq_pair),
    .rd_en(!cxd_empty && mq_ready), .rd_data(cxd_head),
    .full(cxd_full), .empty(cxd_empty), .count(cxd_count));

  assign mq_end = bpc_done && seq_idle && cxd_empty;

  mq_coder u_mq (
    .clk(clk), .rst_n(rst_n), .init(start),
    .in_valid(!cxd_empty), .in_ready(mq_ready), .in_pair(cxd_head), .end_i(mq_end),
    .out_valid(mq_out_valid), .out_byte(mq_out_byte), .out_ready(!byte_full),
    .done(mq_done), .busy(mq_busy),
    .ev_lps(ev_lps), .ev_switch(ev_switch), .ev_carry(ev_carry), .ev_stuff(ev_stuff));

  sync_fifo #(.WIDTH(8), .DEPTH(BYTE_DEPTH)) u_byte_fifo (
    .clk(clk), .rst_n(rst_n), .clear(start),
    .wr_en(mq_out_valid && !byte_full), .wr_data(mq_out_byte),
    .rd_en(out_rd), .rd_data(out_byte),
    .full(byte_full), .empty(byte_empty), .count(byte_count));

  assign out_valid = !byte_empty;
  assign busy      = bpc_busy || !seq_idle || !cxd_empty || mq_busy || (bpc_done && !mq_done);
  assign done      = mq_done;
  assign ev_stall  = col_valid && !col_ready;
  assign ev_run    = col_valid && col_ready && run_used;
endmodule
