// dll_top: the data link layer of one board of the 100 Gbit/s wireless
// link: N_LANES independent 10 Gbit/s lanes (10 in the demonstrator, 97
// Gbit/s of continuous user data) next to each other.
//
// The 100 Gbit/s stream is too fast for one FPGA datapath, so it is split
// over parallel lanes, each with its own framing, ARQ, adaptive RS coding and
// triple-redundancy headers (dll_lane). Lanes share nothing but the coder
// clock; each has its own interface clock, as each is tied to its own
// transceiver. Per lane, gen_en selects the user data source: the external
// user port (a 10G Ethernet MAC towards the software processor) or the
// internal PRBS frame generator, used on lanes that have no processor port.
// On a lane in generator mode the received words go to a PRBS checker
// (and are shown on urx_* without waiting for urx_ready); otherwise to the
// user port.
//
// Ports are arrays indexed by lane; line_* go to the physical layer,
// utx_*/urx_* to the user side, all on the lane's interface clock; ev_fec
// (bit order rs_pkg::lane_ev_e) is on the coder clock.
//
// rst_fec_n also disables the lanes' assertions, which lint reports as a
// synchronous use of a reset net; every flop resets asynchronously.
//
// The lane count, the lane structure, the two clocks and the frame
// generators follow the design description; the port format is this
// design's own.
module dll_top
  import rs_pkg::*;
#(
  parameter int N_LANES     = 10,
  parameter int WIN         = 4,
  parameter int TIMEOUT     = 8192,
  parameter int FLUSH       = 1024,
  parameter int DOWN_FRAMES = 8
) (
  input  logic                   clk_fec,
  input  logic                   rst_fec_n,
  input  logic [N_LANES-1:0]     clk_if,
  input  logic [N_LANES-1:0]     rst_if_n,
  input  logic [N_LANES-1:0]     gen_en,
  // user side
  input  logic [N_LANES-1:0]     utx_valid,
  output logic [N_LANES-1:0]     utx_ready,
  input  logic [LANE_W-1:0]      utx_data  [N_LANES],
  output logic [N_LANES-1:0]     urx_valid,
  input  logic [N_LANES-1:0]     urx_ready,
  output logic [LANE_W-1:0]      urx_data  [N_LANES],
  // physical layer
  output logic [N_LANES-1:0]     line_tx_valid,
  output logic [N_LANES-1:0]     line_tx_sof,
  output logic [LANE_W-1:0]      line_tx_data [N_LANES],
  input  logic [N_LANES-1:0]     line_rx_valid,
  input  logic [N_LANES-1:0]     line_rx_sof,
  input  logic [LANE_W-1:0]      line_rx_data [N_LANES],
  // status
  output logic [N_LANES-1:0]     ev_rx_overflow,
  output logic [N_EV-1:0]        ev_fec    [N_LANES],
  output tsel_t                  cur_tx_t  [N_LANES],
  output tsel_t                  cur_req_t [N_LANES],
  output logic [7:0]             corr_syms [N_LANES],
  output logic [31:0]            chk_words [N_LANES],
  output logic [31:0]            chk_errors[N_LANES]
);

  for (genvar l = 0; l < N_LANES; l++) begin : g_lane
    logic              s_valid, s_ready, g_valid, r_valid, r_ready;
    logic [LANE_W-1:0] s_data, g_data, r_data;

    prbs_gen u_gen (
      .clk(clk_if[l]), .rst_n(rst_if_n[l]), .en(gen_en[l]),
      .valid(g_valid), .ready(s_ready), .data(g_data)
    );

    assign s_valid      = gen_en[l] ? g_valid : utx_valid[l];
    assign s_data       = gen_en[l] ? g_data  : utx_data[l];
    assign utx_ready[l] = !gen_en[l] && s_ready;

    dll_lane #(.WIN(WIN), .TIMEOUT(TIMEOUT), .FLUSH(FLUSH), .DOWN_FRAMES(DOWN_FRAMES)) u_lane (
      .clk_if(clk_if[l]), .rst_if_n(rst_if_n[l]), .clk_fec(clk_fec), .rst_fec_n(rst_fec_n),
      .utx_valid(s_valid), .utx_ready(s_ready), .utx_data(s_data),
      .urx_valid(r_valid), .urx_ready(r_ready), .urx_data(r_data),
      .line_tx_valid(line_tx_valid[l]), .line_tx_sof(line_tx_sof[l]), .line_tx_data(line_tx_data[l]),
      .line_rx_valid(line_rx_valid[l]), .line_rx_sof(line_rx_sof[l]), .line_rx_data(line_rx_data[l]),
      .ev_rx_overflow(ev_rx_overflow[l]), .ev_fec(ev_fec[l]),
      .cur_tx_t(cur_tx_t[l]), .cur_req_t(cur_req_t[l]), .corr_syms(corr_syms[l])
    );

    // in generator mode the checker consumes the received words
    assign r_ready      = gen_en[l] ? 1'b1 : urx_ready[l];
    assign urx_valid[l] = r_valid;
    assign urx_data[l]  = r_data;

    prbs_chk u_chk (
      .clk(clk_if[l]), .rst_n(rst_if_n[l]), .valid(r_valid && r_ready), .data(r_data),
      .words(chk_words[l]), .errors(chk_errors[l])
    );
  end

endmodule
