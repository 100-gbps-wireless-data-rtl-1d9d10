// dll_lane: one 10 Gbit/s lane of the data link layer, with its two clock
// domains.
//
// The lane's interfaces (user data towards the MAC processor or a frame
// generator, coded words towards the physical layer) run on the 156.25 MHz
// interface clock, where a 64-bit word per clock is 10 Gbit/s. The coder
// core (lane_tx, lane_rx with their eight RS encoders and decoders) runs on
// the faster coder clock, nominally 200 MHz: 8 RS instances x 8 bit x 200
// MHz = 12.8 Gbit/s peak, which leaves room for the parity, header and
// padding cycles and for the decoder's gaps between codewords.
// Four dual-clock FIFOs connect the domains:
//   user TX  (interface -> coder)  512 words, holds more than a full frame
//   line TX  (coder -> interface)   32 words, coded words plus sof flag
//   line RX  (interface -> coder)   64 words; the physical layer cannot be
//                                   stalled, so a word arriving on a full
//                                   FIFO is dropped and counted
//   user RX  (coder -> interface)  512 words, commit/discard: a frame's words
//                                   become visible only once all its
//                                   codewords decoded and it was in sequence
// Line output: line_tx_valid marks a word (idle otherwise), line_tx_sof the
// first header word of a frame, as a physical-layer control code would.
//
// The reset also disables the assertions, which lint reports as a
// synchronous use of the reset net; every flop here resets asynchronously.
// The FIFOs' fill counts and the user TX empty flag are not needed here
// (lane_tx works from the read-side count) and are left unused.
//
// The two clock domains, their frequencies and the 64-bit word of 10
// Gbit/s follow the design description; the FIFO depths and the sof
// sideband are this design's own.
module dll_lane
  import rs_pkg::*;
#(
  parameter int WIN         = 4,
  parameter int TIMEOUT     = 8192,
  parameter int FLUSH       = 1024,
  parameter int DOWN_FRAMES = 8
) (
  input  logic              clk_if,      // 156.25 MHz interface clock
  input  logic              rst_if_n,
  input  logic              clk_fec,     // 200 MHz coder clock
  input  logic              rst_fec_n,
  // user data, interface clock
  input  logic              utx_valid,
  output logic              utx_ready,
  input  logic [LANE_W-1:0] utx_data,
  output logic              urx_valid,
  input  logic              urx_ready,
  output logic [LANE_W-1:0] urx_data,
  // physical layer, interface clock
  output logic              line_tx_valid,
  output logic              line_tx_sof,
  output logic [LANE_W-1:0] line_tx_data,
  input  logic              line_rx_valid,
  input  logic              line_rx_sof,
  input  logic [LANE_W-1:0] line_rx_data,
  // statistics
  output logic              ev_rx_overflow,   // interface clock
  output logic [N_EV-1:0]   ev_fec,           // coder clock, bit order of lane_ev_e
  output tsel_t             cur_tx_t,         // code used by our transmitter
  output tsel_t             cur_req_t,        // code our receiver asks for
  output logic [7:0]        corr_syms
);

  // ------------------------------------------------------------ user TX FIFO
  logic [LANE_W-1:0] u_data;
  logic [9:0]        u_count;
  logic              u_rd, utx_full, u_empty;
  logic [9:0]        utx_wcount;

  assign utx_ready = !utx_full;

  async_fifo #(.W(LANE_W), .AW(9)) u_utx_fifo (
    .wr_clk(clk_if), .wr_rst_n(rst_if_n), .wr_en(utx_valid), .wr_data(utx_data),
    .wr_commit(1'b1), .wr_discard(1'b0), .wr_full(utx_full), .wr_count(utx_wcount),
    .rd_clk(clk_fec), .rd_rst_n(rst_fec_n), .rd_en(u_rd), .rd_data(u_data),
    .rd_empty(u_empty), .rd_count(u_count)
  );

  // ------------------------------------------------------------ TX core
  logic              o_valid, o_ready, o_sof;
  logic [LANE_W-1:0] o_data;
  logic              fb_valid, fb_nack, loc_nack, nack_sent;
  logic [SEQ_W-1:0]  fb_ack, loc_ack;
  tsel_t             tx_t, loc_req_t;
  logic              ltx_full;
  logic [5:0]        ltx_wcount;

  assign o_ready = !ltx_full;

  lane_tx #(.WIN(WIN), .TIMEOUT(TIMEOUT), .FLUSH(FLUSH), .UAW(9)) u_tx (
    .clk(clk_fec), .rst_n(rst_fec_n),
    .u_data(u_data), .u_count(u_count), .u_rd(u_rd),
    .o_valid(o_valid), .o_ready(o_ready), .o_data(o_data), .o_sof(o_sof),
    .fb_valid(fb_valid), .fb_ack(fb_ack), .fb_nack(fb_nack), .tx_t(tx_t),
    .loc_ack(loc_ack), .loc_nack(loc_nack), .loc_req_t(loc_req_t), .nack_sent(nack_sent),
    .ev_data_frame(ev_fec[0]), .ev_retx_frame(ev_fec[1]), .ev_idle_frame(ev_fec[2]),
    .ev_goback_nack(ev_fec[3]), .ev_goback_timeout(ev_fec[4]), .ev_pad_word(ev_fec[5])
  );

  // ------------------------------------------------------------ line TX FIFO
  logic [LANE_W:0] ltx_rdata;
  logic            ltx_empty;
  logic [5:0]      ltx_rcount;

  async_fifo #(.W(LANE_W + 1), .AW(5)) u_ltx_fifo (
    .wr_clk(clk_fec), .wr_rst_n(rst_fec_n), .wr_en(o_valid && o_ready), .wr_data({o_sof, o_data}),
    .wr_commit(1'b1), .wr_discard(1'b0), .wr_full(ltx_full), .wr_count(ltx_wcount),
    .rd_clk(clk_if), .rd_rst_n(rst_if_n), .rd_en(!ltx_empty), .rd_data(ltx_rdata),
    .rd_empty(ltx_empty), .rd_count(ltx_rcount)
  );

  assign line_tx_valid = !ltx_empty;
  assign line_tx_sof   = !ltx_empty && ltx_rdata[LANE_W];
  assign line_tx_data  = ltx_rdata[LANE_W-1:0];

  // ------------------------------------------------------------ line RX FIFO
  logic            lrx_full, l_empty, l_rd;
  logic [LANE_W:0] lrx_rdata;
  logic [6:0]      lrx_wcount, lrx_rcount;

  assign ev_rx_overflow = line_rx_valid && lrx_full;

  async_fifo #(.W(LANE_W + 1), .AW(6)) u_lrx_fifo (
    .wr_clk(clk_if), .wr_rst_n(rst_if_n), .wr_en(line_rx_valid && !lrx_full),
    .wr_data({line_rx_sof, line_rx_data}),
    .wr_commit(1'b1), .wr_discard(1'b0), .wr_full(lrx_full), .wr_count(lrx_wcount),
    .rd_clk(clk_fec), .rd_rst_n(rst_fec_n), .rd_en(l_rd), .rd_data(lrx_rdata),
    .rd_empty(l_empty), .rd_count(lrx_rcount)
  );

  // ------------------------------------------------------------ RX core
  logic              u_wr, u_commit, u_discard, urx_wfull;
  logic [LANE_W-1:0] u_wdata;

  lane_rx #(.DOWN_FRAMES(DOWN_FRAMES)) u_rx (
    .clk(clk_fec), .rst_n(rst_fec_n),
    .l_data(lrx_rdata[LANE_W-1:0]), .l_sof(lrx_rdata[LANE_W]), .l_empty(l_empty), .l_rd(l_rd),
    .u_wr(u_wr), .u_data(u_wdata), .u_commit(u_commit), .u_discard(u_discard), .u_full(urx_wfull),
    .fb_valid(fb_valid), .fb_ack(fb_ack), .fb_nack(fb_nack), .tx_t(tx_t),
    .loc_ack(loc_ack), .loc_nack(loc_nack), .loc_req_t(loc_req_t), .nack_sent(nack_sent),
    .ev_hdr_ok(ev_fec[6]), .ev_hdr_fail(ev_fec[7]), .ev_hdr_vote_only(ev_fec[8]),
    .ev_hdr_copy_only(ev_fec[9]), .ev_frame_ok(ev_fec[10]), .ev_frame_bad(ev_fec[11]),
    .ev_frame_dup(ev_fec[12]), .ev_code_up(ev_fec[13]), .ev_code_down(ev_fec[14]),
    .corr_syms(corr_syms)
  );

  assign cur_tx_t  = tx_t;
  assign cur_req_t = loc_req_t;

  // ------------------------------------------------------------ user RX FIFO
  logic       urx_empty;
  logic [9:0] urx_wcount, urx_rcount;

  async_fifo #(.W(LANE_W), .AW(9)) u_urx_fifo (
    .wr_clk(clk_fec), .wr_rst_n(rst_fec_n), .wr_en(u_wr), .wr_data(u_wdata),
    .wr_commit(u_commit), .wr_discard(u_discard), .wr_full(urx_wfull), .wr_count(urx_wcount),
    .rd_clk(clk_if), .rd_rst_n(rst_if_n), .rd_en(urx_ready), .rd_data(urx_data),
    .rd_empty(urx_empty), .rd_count(urx_rcount)
  );

  assign urx_valid = !urx_empty;

endmodule
