// rs_encoder: systematic Reed-Solomon RS(255,k) encoder, one 8-bit symbol
// per clock, k = 255-2t selectable per codeword for t = 1..9 (RS(255,253)
// down to RS(255,237)).
//
// The k message symbols pass straight through (out = in, in_ready =
// out_ready) while a division LFSR accumulates the remainder modulo the
// generator polynomial g(x) = prod_{i=1..2t}(x + alpha^i). After the k-th
// message symbol the encoder emits the 2t parity symbols from the top of the
// LFSR, highest degree first; in_ready is low during those 2t cycles, which
// are the coding overhead the faster FEC clock of a lane absorbs.
// The LFSR is top-aligned: for smaller t only its upper 2t cells are used,
// so one register serves all nine codes. The generator tables are computed
// at elaboration from rs_pkg::rs_gen_pad.
//
// Interface: valid/ready streams in and out. in_t is sampled with the first
// message symbol of a codeword; codeword boundaries
// are counted inside. Latency is zero for message symbols.
//
// The 8-bit symbol, n = 255 and the set of nine codes follow the design
// description; the exact structure (LFSR, handshake) is this design's own.
//
// The reset also disables the assertions, which lint reports as a
// synchronous use of the reset net; every flop here resets asynchronously.
module rs_encoder
  import rs_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  tsel_t in_t,        // t of the codeword that starts with this symbol
  input  logic  in_valid,
  output logic  in_ready,
  input  sym_t  in_data,
  output logic  out_valid,
  input  logic  out_ready,
  output sym_t  out_data,
  output logic  out_last     // last parity symbol of the codeword
);

  typedef gpad_t [RS_T_MAX:0] gtab_t;

  function automatic gtab_t build_gtab();
    gtab_t g;
    for (int t = 0; t <= RS_T_MAX; t++) g[t] = (t == 0) ? '0 : rs_gen_pad(t);
    return g;
  endfunction

  localparam gtab_t GTAB = build_gtab();

  sym_t [RS_NR_MAX-1:0] lfsr;
  logic [7:0]  cnt;           // symbols of the current codeword already output
  tsel_t       t_q;           // t of the codeword in progress
  logic        par_phase;

  tsel_t  t_cur;
  logic [7:0] k_cur;
  assign t_cur = (cnt == 0) ? in_t : t_q;
  assign k_cur = 8'(RS_N - 2 * int'(t_cur));
  assign par_phase = (cnt >= k_cur);

  assign in_ready  = !par_phase && out_ready;
  assign out_valid = par_phase || in_valid;
  assign out_data  = par_phase ? lfsr[RS_NR_MAX-1] : in_data;
  assign out_last  = (cnt == 8'(RS_N - 1));

  gpad_t g_cur;
  sym_t  fb;
  assign g_cur = GTAB[t_cur];
  assign fb    = in_data ^ lfsr[RS_NR_MAX-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr <= '0;
      cnt  <= '0;
      t_q  <= tsel_t'(1);
    end else if (out_valid && out_ready) begin
      if (cnt == 0) t_q <= in_t;
      if (!par_phase) begin
        for (int j = RS_NR_MAX - 1; j > 0; j--) lfsr[j] <= lfsr[j-1] ^ gf_mul(fb, g_cur[j]);
        lfsr[0] <= gf_mul(fb, g_cur[0]);
      end else begin
        for (int j = RS_NR_MAX - 1; j > 0; j--) lfsr[j] <= lfsr[j-1];
        lfsr[0] <= '0;
      end
      cnt <= (cnt == 8'(RS_N - 1)) ? '0 : cnt + 8'd1;
    end
  end

  // the code selection must be one of the nine supported codes
  a_t_range: assert property (@(posedge clk) disable iff (!rst_n)
    (in_valid && cnt == 0) |-> (in_t >= tsel_t'(1) && in_t <= tsel_t'(RS_T_MAX)));

endmodule
