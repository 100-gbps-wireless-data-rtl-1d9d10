// lane_tx: transmit side of one lane in the 200 MHz coder clock domain:
// frame builder, go-back-N ARQ sender and eight interleaved RS encoders.
//
// A frame on the lane is a sequence of 64-bit words:
//   3 header words   the same 64-bit header (fields + CRC-16) three times,
//                    the first word flagged with sof;
//   255 payload words (data frames only) one Reed-Solomon codeword per byte
//                    lane: byte i of every word belongs to encoder i, so the
//                    eight encoders run in lock step and a burst of errors on
//                    the link is spread over eight codewords. The first k
//                    words carry the len user words (len <= k-1), then one
//                    word with the CRC-32 of those words, then zero padding
//                    up to k words; the last 255-k words carry the parity.
//                    The CRC lets the receiver catch the rare frame whose
//                    errors the RS decoders "correct" into wrong data.
// Header-only frames (data = 0) are sent whenever there is nothing else to
// send, so acknowledgements keep flowing in both directions.
//
// ARQ (go-back-N): every data frame gets a sequence number and its user
// words are kept in a retransmission buffer of WIN frame slots. At most WIN
// frames are unacknowledged. The far receiver returns, in its headers, the
// next sequence number it expects (cumulative acknowledgement) and a nack
// flag when it saw a frame it could not use; a nack, or no progress for
// TIMEOUT clocks, rewinds the send pointer to the oldest unacknowledged
// frame, which is then resent from the buffer with its original code.
//
// A new data frame starts when a full frame of user words (k-1 for the code
// in use) is waiting, or when some words have waited FLUSH clocks; its length
// is fixed in the header before the payload is sent.
//
// Interfaces: user words from a first-word-fall-through FIFO (u_data,
// u_count, u_rd); line words to a FIFO (o_valid/o_ready, o_sof); feedback
// from the local receiver: fb_* (what the far receiver reported), tx_t (the
// code the far receiver asked for) and loc_* (what our receiver reports,
// carried in our headers); nack_sent tells the receiver its nack is out.
//
// The reset also disables the assertions, which lint reports as a
// synchronous use of the reset net; every flop here resets asynchronously.
// The eight encoders run in lock step (an assertion checks it), so only
// encoder 0's handshake and last flags are used.
//
// Following the design description: three header copies, eight RS
// instances per 64-bit lane, padding at the end of the coded block,
// retransmission of frames that could not be delivered, adaptive code.
// This design's own: the frame layout, go-back-N with cumulative
// acknowledgement, WIN, TIMEOUT and FLUSH.
module lane_tx
  import rs_pkg::*;
#(
  parameter int WIN     = 4,     // frames in flight (power of two)
  parameter int TIMEOUT = 8192,  // clocks without acknowledgement progress
  parameter int FLUSH   = 1024,  // clocks a partial frame may wait
  parameter int UAW     = 9      // width of u_count - 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // user data
  input  logic [LANE_W-1:0]  u_data,
  input  logic [UAW:0]       u_count,
  output logic               u_rd,
  // line
  output logic               o_valid,
  input  logic               o_ready,
  output logic [LANE_W-1:0]  o_data,
  output logic               o_sof,
  // ARQ and code feedback from the local receiver
  input  logic               fb_valid,
  input  logic [SEQ_W-1:0]   fb_ack,
  input  logic               fb_nack,
  input  tsel_t              tx_t,
  input  logic [SEQ_W-1:0]   loc_ack,
  input  logic               loc_nack,
  input  tsel_t              loc_req_t,
  output logic               nack_sent,
  // events (one-clock pulses)
  output logic               ev_data_frame,
  output logic               ev_retx_frame,
  output logic               ev_idle_frame,
  output logic               ev_goback_nack,
  output logic               ev_goback_timeout,
  output logic               ev_pad_word
);

  localparam int SLOT_W = $clog2(WIN);

  typedef enum logic [1:0] {S_IDLE, S_HDR, S_PAY} state_t;
  state_t state;

  // retransmission buffer
  logic [LANE_W-1:0] buf_mem [WIN * 256];
  logic [LEN_W-1:0]  slot_len [WIN];
  tsel_t             slot_t   [WIN];

  logic [SEQ_W-1:0] base, next_seq, tx_end;
  hdr_t             cur_hdr;
  logic [LEN_W-1:0] cur_len;
  tsel_t            cur_t;
  logic [SLOT_W-1:0] cur_slot;
  logic             from_buf;
  logic [1:0]       hcnt;
  logic [7:0]       in_cnt;
  logic [$clog2(TIMEOUT+1)-1:0] to_cnt;
  logic [$clog2(FLUSH+1)-1:0]   fl_cnt;

  // ------------------------------------------------------------ encoders
  logic [N_RS-1:0] e_in_ready, e_out_valid, e_out_last;
  logic            e_in_valid, e_out_ready;
  logic [LANE_W-1:0] e_in_data, e_out_data;
  logic [7:0]      k_cur;
  logic [31:0]     crc;
  logic [LANE_W-1:0] src_word;

  assign k_cur      = 8'(RS_N - 2 * int'(cur_t));
  assign src_word   = from_buf ? buf_mem[{cur_slot, in_cnt}] : u_data;
  assign e_in_valid = (state == S_PAY) && (in_cnt < k_cur);
  assign e_in_data  = (in_cnt < 8'(cur_len)) ? src_word :
                      (in_cnt == 8'(cur_len)) ? LANE_W'(crc) : '0;
  assign e_out_ready = (state == S_PAY) && o_ready;

  for (genvar i = 0; i < N_RS; i++) begin : g_enc
    rs_encoder u_enc (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_t     (cur_t),
      .in_valid (e_in_valid),
      .in_ready (e_in_ready[i]),
      .in_data  (e_in_data[8*i +: 8]),
      .out_valid(e_out_valid[i]),
      .out_ready(e_out_ready),
      .out_data (e_out_data[8*i +: 8]),
      .out_last (e_out_last[i])
    );
  end

  logic e_push;
  assign e_push = e_in_valid && e_in_ready[0];
  assign u_rd   = e_push && !from_buf && (in_cnt < 8'(cur_len));
  assign ev_pad_word = e_push && (in_cnt > 8'(cur_len));

  // ------------------------------------------------------------ line output
  always_comb begin
    o_valid = 1'b0;
    o_data  = e_out_data;
    o_sof   = 1'b0;
    if (state == S_HDR) begin
      o_valid = 1'b1;
      o_data  = cur_hdr;
      o_sof   = (hcnt == 2'd0);
    end else if (state == S_PAY) begin
      o_valid = e_out_valid[0];
    end
  end

  // ------------------------------------------------------------ frame decision
  logic [SEQ_W-1:0] outstanding;
  logic             win_open, flush_due, full_frame, start_new, start_retx;
  logic [7:0]       k_tx;
  logic [LEN_W-1:0] new_len;

  assign outstanding = tx_end - base;
  assign win_open    = (outstanding < SEQ_W'(WIN));
  assign k_tx        = 8'(RS_N - 2 * int'(tx_t));
  assign full_frame  = (u_count >= (UAW+1)'(k_tx - 8'd1));
  assign flush_due   = (u_count != '0) && (int'(fl_cnt) >= FLUSH);
  assign start_retx  = (state == S_IDLE) && (next_seq != tx_end);
  assign start_new   = (state == S_IDLE) && !start_retx && win_open && (full_frame || flush_due);
  assign new_len     = full_frame ? LEN_W'(k_tx - 8'd1) : LEN_W'(u_count);

  function automatic hdr_fields_t fields(logic data, logic [SEQ_W-1:0] seq, tsel_t t,
                                         logic [LEN_W-1:0] len, logic [SEQ_W-1:0] ack,
                                         logic nack, tsel_t req);
    hdr_fields_t f;
    f       = '0;
    f.data  = data;
    f.seq   = seq;
    f.ack   = ack;
    f.nack  = nack;
    f.t     = t;
    f.req_t = req;
    f.len   = len;
    return f;
  endfunction

  // is a inside the half-open range (lo, hi] modulo 2^SEQ_W
  function automatic logic in_range(logic [SEQ_W-1:0] a, logic [SEQ_W-1:0] lo, logic [SEQ_W-1:0] hi);
    return (SEQ_W'(a - lo) <= SEQ_W'(hi - lo));
  endfunction

  always_ff @(posedge clk) begin
    if (u_rd) buf_mem[{cur_slot, in_cnt}] <= u_data;
  end

  // next window pointers: base (oldest unacknowledged), next_seq (next to
  // send) and tx_end (next new sequence number)
  logic [SEQ_W-1:0]  nb, nn, ne;
  logic              timeout;
  logic [SLOT_W-1:0] retx_slot, new_slot;
  assign retx_slot = SLOT_W'(next_seq);
  assign new_slot  = SLOT_W'(tx_end);

  always_comb begin
    nb = base;
    nn = next_seq;
    ne = tx_end;
    if (start_retx || start_new) nn = nn + 1'b1;
    if (start_new) ne = ne + 1'b1;
    // cumulative acknowledgement from the far receiver
    if (fb_valid && in_range(fb_ack, base, ne)) nb = fb_ack;
    if (!in_range(nn, nb, ne)) nn = nb;   // send pointer fell behind the window base
    timeout = (nb != ne) && (int'(to_cnt) >= TIMEOUT);
    if ((fb_valid && fb_nack) || timeout) nn = nb;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      base     <= '0;
      next_seq <= '0;
      tx_end   <= '0;
      cur_hdr  <= '0;
      cur_len  <= '0;
      cur_t    <= tsel_t'(RS_T_MAX);
      cur_slot <= '0;
      from_buf <= 1'b0;
      hcnt     <= '0;
      in_cnt   <= '0;
      crc      <= 32'hFFFF_FFFF;
      to_cnt   <= '0;
      fl_cnt   <= '0;
      nack_sent <= 1'b0;
      ev_data_frame <= 1'b0;
      ev_retx_frame <= 1'b0;
      ev_idle_frame <= 1'b0;
      ev_goback_nack <= 1'b0;
      ev_goback_timeout <= 1'b0;
      for (int s = 0; s < WIN; s++) begin
        slot_len[s] <= '0;
        slot_t[s]   <= tsel_t'(RS_T_MAX);
      end
    end else begin
      nack_sent <= 1'b0;
      ev_data_frame <= 1'b0;
      ev_retx_frame <= 1'b0;
      ev_idle_frame <= 1'b0;
      ev_goback_nack <= 1'b0;
      ev_goback_timeout <= 1'b0;

      case (state)
        S_IDLE: begin
          state  <= S_HDR;
          hcnt   <= '0;
          in_cnt <= '0;
          crc    <= 32'hFFFF_FFFF;
          nack_sent <= loc_nack;
          if (start_retx) begin
            cur_slot <= retx_slot;
            cur_len  <= slot_len[retx_slot];
            cur_t    <= slot_t[retx_slot];
            from_buf <= 1'b1;
            cur_hdr  <= make_hdr(fields(1'b1, next_seq, slot_t[retx_slot], slot_len[retx_slot],
                                        loc_ack, loc_nack, loc_req_t));
            ev_retx_frame <= 1'b1;
          end else if (start_new) begin
            cur_slot <= new_slot;
            cur_len  <= new_len;
            cur_t    <= tx_t;
            from_buf <= 1'b0;
            slot_len[new_slot] <= new_len;
            slot_t[new_slot]   <= tx_t;
            cur_hdr  <= make_hdr(fields(1'b1, tx_end, tx_t, new_len, loc_ack, loc_nack, loc_req_t));
            ev_data_frame <= 1'b1;
          end else begin
            cur_hdr  <= make_hdr(fields(1'b0, '0, tx_t, '0, loc_ack, loc_nack, loc_req_t));
            cur_len  <= '0;
            ev_idle_frame <= 1'b1;
          end
        end
        S_HDR: if (o_ready) begin
          hcnt <= hcnt + 2'd1;
          if (hcnt == 2'd2) state <= cur_hdr.f.data ? S_PAY : S_IDLE;
        end
        S_PAY: begin
          if (e_push) in_cnt <= in_cnt + 8'd1;
          if (e_push && in_cnt < 8'(cur_len)) crc <= crc32_w64(crc, src_word);
          if (o_valid && o_ready && e_out_last[0]) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase

      // partial-frame flush timer
      if (start_new || u_count == '0) fl_cnt <= '0;
      else if (int'(fl_cnt) < FLUSH) fl_cnt <= fl_cnt + 1'b1;

      if ((fb_valid && fb_nack) || timeout) begin
        ev_goback_nack    <= fb_valid && fb_nack;
        ev_goback_timeout <= timeout && !(fb_valid && fb_nack);
      end
      if (nb != base || nb == ne || (fb_valid && fb_nack) || timeout) to_cnt <= '0;
      else to_cnt <= to_cnt + 1'b1;

      base     <= nb;
      next_seq <= nn;
      tx_end   <= ne;
    end
  end

  // the eight encoders must stay in lock step
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    (e_in_ready == '0 || e_in_ready == '1) && (e_out_valid == '0 || e_out_valid == '1));

endmodule
