// rs_pkg: types, constants and functions shared by the data link layer.
//
// GF(2^8) arithmetic for the Reed-Solomon coders (8-bit symbols, codeword
// length 255), the generator polynomials of the nine selectable codes
// RS(255,253) ... RS(255,237) (t = 1..9 correctable symbols, 2t parity
// symbols), the lane frame header and its CRC-16, the frame CRC-32.
//
// The symbol size, the codeword length and the set of codes follow the
// design description. The field polynomial x^8+x^4+x^3+x^2+1 (0x11D), the
// first consecutive generator root alpha^1, the header fields and the CRC
// (CRC-16/CCITT, polynomial 0x1021, init 0xFFFF) and the frame CRC-32 are
// choices of this design.
package rs_pkg;

  localparam int RS_N      = 255;           // codeword length in symbols
  localparam int RS_T_MAX  = 9;             // strongest code RS(255,237)
  localparam int RS_NR_MAX = 2 * RS_T_MAX;  // 18 parity symbols
  localparam int RS_T_W    = 4;             // width of a t value (1..9)
  localparam logic [8:0] GF_POLY = 9'h11D;

  localparam int LANE_W    = 64;            // lane datapath width (8 symbols)
  localparam int N_RS      = LANE_W / 8;    // RS instances per lane
  localparam int SEQ_W     = 8;             // ARQ sequence number width
  localparam int LEN_W     = 8;             // user words per frame (<= 253)

  // per-lane event pulses, bit positions in dll_lane's ev_fec
  typedef enum int {
    EV_DATA_FRAME, EV_RETX_FRAME, EV_IDLE_FRAME, EV_GOBACK_NACK, EV_GOBACK_TIMEOUT,
    EV_PAD_WORD, EV_HDR_OK, EV_HDR_FAIL, EV_HDR_VOTE_ONLY, EV_HDR_COPY_ONLY,
    EV_FRAME_OK, EV_FRAME_BAD, EV_FRAME_DUP, EV_CODE_UP, EV_CODE_DOWN, N_EV
  } lane_ev_e;

  typedef logic [7:0] sym_t;
  typedef logic [RS_T_W-1:0] tsel_t;

  // Frame header: 48 bits of fields protected by a 16-bit CRC.
  typedef struct packed {
    logic             data;     // 1: an RS-coded payload follows
    logic [SEQ_W-1:0] seq;      // sequence number of this data frame
    logic [SEQ_W-1:0] ack;      // next sequence number expected by our RX
    logic             nack;     // our RX asks for a go-back retransmission
    tsel_t            t;        // t of the payload code of this frame
    tsel_t            req_t;    // t our RX wants the far transmitter to use
    logic [LEN_W-1:0] len;      // user words in the payload (rest is padding)
    logic [13:0]      rsvd;
  } hdr_fields_t;               // 48 bits

  typedef struct packed {
    hdr_fields_t f;
    logic [15:0] crc;
  } hdr_t;                      // 64 bits, one lane word

  // ---------------------------------------------------------------- GF(2^8)
  function automatic sym_t gf_mul(sym_t a, sym_t b);
    logic [7:0] p = '0;
    logic [7:0] x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= x;
      x = x[7] ? ((x << 1) ^ GF_POLY[7:0]) : (x << 1);
    end
    return p;
  endfunction

  // alpha^e for 0 <= e
  function automatic sym_t gf_alpha_pow(int e);
    sym_t r = 8'h01;
    for (int i = 0; i < (e % 255); i++) r = gf_mul(r, 8'h02);
    return r;
  endfunction

  // multiplicative inverse: a^254 (0 maps to 0)
  function automatic sym_t gf_inv(sym_t a);
    sym_t r = 8'h01;
    sym_t s = a;
    for (int i = 1; i < 8; i++) begin  // 254 = 0b11111110
      s = gf_mul(s, s);
      r = gf_mul(r, s);
    end
    return r;
  endfunction

  // Generator polynomial g(x) = prod_{i=1..2t} (x + alpha^i), returned
  // top-aligned in an RS_NR_MAX register: element RS_NR_MAX-2t+j holds g_j
  // (j = 0..2t-1, g_2t = 1 is implicit), the lower elements are zero.
  typedef sym_t [RS_NR_MAX-1:0] gpad_t;

  function automatic gpad_t rs_gen_pad(int t);
    sym_t g [RS_NR_MAX+1];
    gpad_t r;
    for (int j = 0; j <= RS_NR_MAX; j++) g[j] = '0;
    g[0] = 8'h01;
    for (int i = 1; i <= 2 * t; i++) begin
      sym_t root = gf_alpha_pow(i);
      for (int j = RS_NR_MAX; j > 0; j--) g[j] = g[j-1] ^ gf_mul(g[j], root);
      g[0] = gf_mul(g[0], root);
    end
    r = '0;
    for (int j = 0; j < 2 * t; j++) r[RS_NR_MAX - 2 * t + j] = g[j];
    return r;
  endfunction

  function automatic int rs_k(int t);
    return RS_N - 2 * t;
  endfunction

  // ---------------------------------------------------------------- CRC-16
  function automatic logic [15:0] crc16(hdr_fields_t f);
    logic [15:0] c = 16'hFFFF;
    logic [47:0] d = f;
    for (int i = 47; i >= 0; i--) begin
      logic fb = c[15] ^ d[i];
      c = {c[14:0], 1'b0} ^ (fb ? 16'h1021 : 16'h0000);
    end
    return c;
  endfunction

  // ---------------------------------------------------------------- CRC-32
  // Frame check over the user words of a frame (polynomial 0x04C11DB7,
  // MSB first, init 0xFFFFFFFF, one 64-bit word per call).
  function automatic logic [31:0] crc32_w64(logic [31:0] c, logic [LANE_W-1:0] d);
    for (int i = LANE_W - 1; i >= 0; i--) begin
      logic fb;
      fb = c[31] ^ d[i];
      c = {c[30:0], 1'b0} ^ (fb ? 32'h04C1_1DB7 : 32'h0);
    end
    return c;
  endfunction

  function automatic hdr_t make_hdr(hdr_fields_t f);
    hdr_t h;
    h.f   = f;
    h.crc = crc16(f);
    return h;
  endfunction

endpackage
