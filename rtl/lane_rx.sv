// lane_rx: receive side of one lane in the 200 MHz coder clock domain:
// frame parser, triple-redundancy header decoder, eight RS decoders, ARQ
// receiver and adaptive code selection.
//
// Line words arrive from a first-word-fall-through FIFO (l_data, l_sof,
// l_empty, l_rd). The parser waits for a word flagged sof, collects the
// three header copies and hands them to hdr_tmr_decoder, which decides in
// one clock. A header no branch can confirm is dropped and the parser hunts
// for the next sof. From a good header it takes the far end's feedback
// (acknowledged sequence number, nack, requested code) for the local
// transmitter, and for a data frame it queues {seq, len, t} and feeds the
// next 255 words, byte i to decoder i, into the eight RS decoders.
//
// The decoders return the k corrected data words of each frame; the first
// len of them are written to the user FIFO, tentatively, and checked
// against the CRC-32 word that follows them, when the frame
// carries the next expected sequence number. When all eight codewords are
// decoded the frame is committed (all decodable and CRC correct: the
// expected number advances) or discarded. A frame that finds the user FIFO full is
// discarded too, so the receiver never stalls the line. A frame that could not be decoded, or that
// arrives ahead of the expected number (one was lost), raises a nack, once
// per expected number; duplicates of delivered frames are dropped silently.
// Every decoded frame also updates code_adapt, whose request goes back to
// the far transmitter in our headers.
//
// Timing: the header is decided in the clock after its third copy, which
// already takes the next word; payload at one
// word per clock while the decoders accept; results 2t+2 clocks after the
// last payload word when the decoders are free.
//
// The reset also disables the assertions, which lint reports as a
// synchronous use of the reset net; every flop here resets asynchronously.
// The decoders run in lock step, so only decoder 0's handshake is used;
// the reserved header bits and the fields of a queued frame that are
// already consumed are left unused.
//
// Following the design description: header sent three times and decoded by
// four parallel checks in one clock, eight RS decoders per lane,
// retransmission requests, code adaptation. This design's own: frame
// layout, sof framing, nack rules, the commit/discard output.
module lane_rx
  import rs_pkg::*;
#(
  parameter int DOWN_FRAMES = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  // line words
  input  logic [LANE_W-1:0]  l_data,
  input  logic               l_sof,
  input  logic               l_empty,
  output logic               l_rd,
  // user words (to a commit/discard FIFO)
  output logic               u_wr,
  output logic [LANE_W-1:0]  u_data,
  output logic               u_commit,
  output logic               u_discard,
  input  logic               u_full,
  // feedback to the local transmitter
  output logic               fb_valid,
  output logic [SEQ_W-1:0]   fb_ack,
  output logic               fb_nack,
  output tsel_t              tx_t,
  output logic [SEQ_W-1:0]   loc_ack,
  output logic               loc_nack,
  output tsel_t              loc_req_t,
  input  logic               nack_sent,
  // events (one-clock pulses) and counts
  output logic               ev_hdr_ok,
  output logic               ev_hdr_fail,
  output logic               ev_hdr_vote_only,
  output logic               ev_hdr_copy_only,
  output logic               ev_frame_ok,
  output logic               ev_frame_bad,
  output logic               ev_frame_dup,
  output logic               ev_code_up,
  output logic               ev_code_down,
  output logic [7:0]         corr_syms      // symbols corrected in the last frame
);

  typedef enum logic [1:0] {R_HUNT, R_HDR, R_DEC, R_PAY} rstate_t;
  rstate_t state;

  hdr_t       hcopy [3];
  logic [1:0] hcnt;
  logic [7:0] pcnt;

  // ------------------------------------------------------------ header
  logic        h_in_valid, h_valid, h_ok;
  hdr_t        h_in [3];

  assign h_in[0]    = hcopy[0];
  assign h_in[1]    = hcopy[1];
  assign h_in[2]    = l_data;
  assign h_in_valid = (state == R_HDR) && !l_empty && (hcnt == 2'd2) && !l_sof;
  hdr_fields_t h_f;
  logic [3:0]  h_branch;

  hdr_tmr_decoder u_hdr (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (h_in_valid),
    .in_copy   (h_in),
    .out_valid (h_valid),
    .out_ok    (h_ok),
    .out_fields(h_f),
    .out_branch(h_branch)
  );

  // ------------------------------------------------------------ frame queue
  typedef struct packed {
    logic [SEQ_W-1:0] seq;
    logic [LEN_W-1:0] len;
    tsel_t            t;
  } meta_t;

  meta_t      mq [4];
  logic [2:0] mq_wp, mq_rp;
  logic       mq_full;
  meta_t      cur_pay, head;

  assign mq_full = (mq_wp - mq_rp) == 3'd4;
  assign head    = mq[mq_rp[1:0]];

  // ------------------------------------------------------------ decoders
  logic [N_RS-1:0] d_in_ready, d_out_valid, d_out_last, d_done, d_ok;
  logic            d_in_valid, d_out_ready;
  tsel_t           pay_t;
  logic [7:0]      d_nerr [N_RS];
  logic [LANE_W-1:0] d_out_data;

  logic take_pay;
  assign d_in_valid = (state == R_PAY || take_pay) && !l_empty;
  assign pay_t      = take_pay ? h_f.t : cur_pay.t;

  for (genvar i = 0; i < N_RS; i++) begin : g_dec
    rs_decoder u_dec (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_t     (pay_t),
      .in_valid (d_in_valid),
      .in_ready (d_in_ready[i]),
      .in_data  (l_data[8*i +: 8]),
      .out_valid(d_out_valid[i]),
      .out_ready(d_out_ready),
      .out_data (d_out_data[8*i +: 8]),
      .out_last (d_out_last[i]),
      .done     (d_done[i]),
      .ok       (d_ok[i]),
      .n_err    (d_nerr[i])
    );
  end

  // ------------------------------------------------------------ ARQ receiver
  logic [SEQ_W-1:0] expected;
  logic             nack_pending, nack_armed;
  logic [7:0]       ocnt;
  logic             deliver;
  logic [SEQ_W-1:0] ahead;

  assign deliver     = (head.seq == expected);
  assign ahead       = head.seq - expected;
  // The decoders never wait for the user FIFO: a frame that does not fit
  // is dropped (and later resent), so the line side is never stalled.
  logic want_wr, ovf_q;
  assign d_out_ready = 1'b1;
  assign want_wr     = d_out_valid[0] && deliver && (ocnt < 8'(head.len)) && !ovf_q;
  assign u_wr        = want_wr && !u_full;
  assign u_data      = d_out_data;
  assign loc_ack     = expected;
  assign loc_nack    = nack_pending;

  logic [7:0] max_err;
  always_comb begin
    max_err = '0;
    for (int i = 0; i < N_RS; i++) if (d_nerr[i] > max_err) max_err = d_nerr[i];
  end

  // a frame is good when every codeword decoded and the CRC-32 matches
  logic all_ok, crc_ok;
  logic [31:0] crc;
  assign all_ok = (&d_ok) && crc_ok;

  code_adapt #(.DOWN_FRAMES(DOWN_FRAMES)) u_adapt (
    .clk          (clk),
    .rst_n        (rst_n),
    .frame_valid  (d_done[0]),
    .frame_ok     (all_ok),
    .frame_t      (head.t),
    .frame_max_err(max_err),
    .req_t        (loc_req_t),
    .step_up      (ev_code_up),
    .step_down    (ev_code_down)
  );

  // ------------------------------------------------------------ parser
  // a good data-frame header: its payload starts with the word after it
  assign take_pay = (state == R_DEC) && h_valid && h_ok && h_f.data
                    && h_f.t >= tsel_t'(1) && h_f.t <= tsel_t'(RS_T_MAX)
                    && h_f.len != '0 && int'(h_f.len) < RS_N - 2 * int'(h_f.t) && !mq_full;

  assign l_rd = !l_empty && (
                  (state == R_HUNT) ||
                  (state == R_HDR) ||
                  (state == R_DEC && !take_pay) ||
                  ((state == R_PAY || take_pay) && d_in_ready[0]));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= R_HUNT;
      hcnt     <= '0;
      pcnt     <= '0;
      for (int i = 0; i < 3; i++) hcopy[i] <= '0;
      for (int i = 0; i < 4; i++) mq[i] <= '0;
      mq_wp    <= '0;
      mq_rp    <= '0;
      cur_pay  <= '0;
      expected <= '0;
      nack_pending <= 1'b0;
      nack_armed   <= 1'b1;
      ocnt     <= '0;
      ovf_q    <= 1'b0;
      crc      <= 32'hFFFF_FFFF;
      crc_ok   <= 1'b0;
      fb_valid <= 1'b0;
      fb_ack   <= '0;
      fb_nack  <= 1'b0;
      tx_t     <= tsel_t'(RS_T_MAX);
      ev_hdr_ok <= 1'b0;
      ev_hdr_fail <= 1'b0;
      ev_hdr_vote_only <= 1'b0;
      ev_hdr_copy_only <= 1'b0;
      ev_frame_ok  <= 1'b0;
      ev_frame_bad <= 1'b0;
      ev_frame_dup <= 1'b0;
      corr_syms    <= '0;
    end else begin
      fb_valid <= 1'b0;
      ev_hdr_ok <= 1'b0;
      ev_hdr_fail <= 1'b0;
      ev_hdr_vote_only <= 1'b0;
      ev_hdr_copy_only <= 1'b0;
      ev_frame_ok  <= 1'b0;
      ev_frame_bad <= 1'b0;
      ev_frame_dup <= 1'b0;
      if (nack_sent) nack_pending <= 1'b0;

      case (state)
        R_HUNT: if (!l_empty && l_sof) begin
          hcopy[0] <= l_data;
          hcnt     <= 2'd1;
          state    <= R_HDR;
        end
        R_HDR: if (!l_empty) begin
          if (l_sof) begin                 // a new frame began: restart
            hcopy[0] <= l_data;
            hcnt     <= 2'd1;
          end else begin
            hcopy[hcnt] <= l_data;
            hcnt        <= hcnt + 2'd1;
            if (hcnt == 2'd2) state <= R_DEC;
          end
        end
        R_DEC: begin
          // header decided (h_valid); this clock also takes the next word
          if (!h_ok) ev_hdr_fail <= 1'b1;
          else begin
            ev_hdr_ok        <= 1'b1;
            ev_hdr_vote_only <= (h_branch == 4'b0001);
            ev_hdr_copy_only <= !h_branch[0];
            fb_valid <= 1'b1;
            fb_ack   <= h_f.ack;
            fb_nack  <= h_f.nack;
            if (h_f.req_t >= tsel_t'(1) && h_f.req_t <= tsel_t'(RS_T_MAX)) tx_t <= h_f.req_t;
          end
          if (take_pay) begin
            cur_pay <= '{seq: h_f.seq, len: h_f.len, t: h_f.t};
            mq[mq_wp[1:0]] <= '{seq: h_f.seq, len: h_f.len, t: h_f.t};
            mq_wp <= mq_wp + 3'd1;
            pcnt  <= l_rd ? 8'd1 : 8'd0;
            state <= R_PAY;
          end else if (!l_empty && l_sof) begin
            hcopy[0] <= l_data;
            hcnt     <= 2'd1;
            state    <= R_HDR;
          end else begin
            state <= R_HUNT;
          end
        end
        R_PAY: if (l_rd) begin
          pcnt <= pcnt + 8'd1;
          if (pcnt == 8'(RS_N - 1)) state <= R_HUNT;
        end
        default: state <= R_HUNT;
      endcase

      // decoder results, in frame order
      if (d_out_valid[0] && d_out_ready) ocnt <= ocnt + 8'd1;
      if (want_wr && u_full) ovf_q <= 1'b1;
      if (d_out_valid[0] && ocnt < 8'(head.len)) crc <= crc32_w64(crc, d_out_data);
      if (d_out_valid[0] && ocnt == 8'(head.len)) crc_ok <= (d_out_data == LANE_W'(crc));
      if (d_done[0]) begin
        ocnt  <= '0;
        ovf_q <= 1'b0;
        crc   <= 32'hFFFF_FFFF;
        mq_rp <= mq_rp + 3'd1;
        corr_syms <= max_err;
        if (deliver && all_ok && !ovf_q) begin
          expected    <= expected + 1'b1;
          nack_armed  <= 1'b1;
          ev_frame_ok <= 1'b1;
        end else if (!all_ok || ovf_q || (ahead != '0 && ahead < SEQ_W'(1 << (SEQ_W - 1)))) begin
          ev_frame_bad <= 1'b1;
          if (nack_armed) begin
            nack_pending <= 1'b1;
            nack_armed   <= 1'b0;
          end
        end else begin
          ev_frame_dup <= 1'b1;
        end
      end
    end
  end

  assign u_commit  = d_done[0] && deliver && all_ok && !ovf_q;
  assign u_discard = d_done[0] && deliver && !(all_ok && !ovf_q);

  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    (d_done == '0 || d_done == '1) && (d_out_valid == '0 || d_out_valid == '1));

endmodule
