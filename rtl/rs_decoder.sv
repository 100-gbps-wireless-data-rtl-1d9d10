// rs_decoder: Reed-Solomon RS(255,k) decoder for 8-bit symbols, k = 255-2t,
// t = 1..9 selectable per codeword; corrects up to t symbol errors.
//
// Two stages work on two codeword buffers in ping-pong:
//  * Stage A takes one received symbol per clock, stores it and updates the
//    2*RS_T_MAX syndromes S_j = r(alpha^j), j = 1..18, by Horner's rule.
//  * Stage B, once stage A hands over a complete codeword, runs the
//    inversion-free Berlekamp-Massey algorithm (one iteration per clock, 2t
//    clocks) for the error locator L(x), forms the evaluator
//    W(x) = S(x)L(x) mod x^2t in one clock and then sweeps the 255 positions
//    with a Chien search, one per clock. At position p (degree 254-p) the
//    search point is x = alpha^(p+1); where L(x) = 0 the Forney value
//    e = x*W(x) / L_odd(x) is added to the stored symbol.
// While stage B works on codeword n, stage A already receives codeword n+1.
// A codeword therefore occupies stage B for 2t+257 clocks: the decoder
// accepts a continuous stream only with idle gaps of 2t+2 clocks per
// codeword, the kind of throughput loss growing with the number of parity
// symbols that the design description reports for its decoder.
//
// Interface: in_valid/in_ready stream of 255 symbols per codeword, in_t
// sampled with the first symbol. Output: the k corrected message symbols
// (out_valid/out_ready, out_last on the k-th), then, once all 255
// positions are searched, a one-clock done pulse with ok (decodable: the
// locator degree is at most t and equals the number of roots found) and
// n_err (symbols corrected). Latency from the last input symbol to the first
// output symbol is 2t+2 clocks when stage B is free.
//
// The decoder's function follows the design description; its algorithm and
// structure are this design's own choice.
module rs_decoder
  import rs_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  tsel_t      in_t,
  input  logic       in_valid,
  output logic       in_ready,
  input  sym_t       in_data,
  output logic       out_valid,
  input  logic       out_ready,
  output sym_t       out_data,
  output logic       out_last,
  output logic       done,
  output logic       ok,
  output logic [7:0] n_err
);

  localparam int NL = RS_T_MAX + 2;  // stored locator coefficients

  // ---------------------------------------------------------------- stage A
  sym_t        mem [2][256];
  logic        a_bank;
  logic [7:0]  a_cnt;
  logic        a_full;
  tsel_t       a_t;
  sym_t        syn [RS_NR_MAX];

  // ---------------------------------------------------------------- stage B
  typedef enum logic [1:0] {B_IDLE, B_BM, B_OMEGA, B_CHIEN} bstate_t;
  bstate_t     b_st;
  logic        b_bank;
  tsel_t       b_t;
  sym_t        bs   [RS_NR_MAX];  // syndromes of the codeword in stage B
  sym_t        lam  [NL];
  sym_t        bpol [NL];
  sym_t        gam;
  logic signed [6:0] kk;
  logic [4:0]  r;
  sym_t        lc   [NL];         // Chien registers of L
  sym_t        oc   [RS_T_MAX];   // Chien registers of W
  sym_t        xr;                // current search point alpha^(p+1)
  logic [7:0]  p;
  logic [7:0]  roots;
  logic [3:0]  deg;

  logic handoff;
  assign handoff  = a_full && (b_st == B_IDLE);
  assign in_ready = !a_full;

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) mem[a_bank][a_cnt] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_bank <= 1'b0;
      a_cnt  <= '0;
      a_full <= 1'b0;
      a_t    <= tsel_t'(1);
      for (int j = 0; j < RS_NR_MAX; j++) syn[j] <= '0;
    end else begin
      if (in_valid && in_ready) begin
        if (a_cnt == 0) a_t <= in_t;
        for (int j = 0; j < RS_NR_MAX; j++)
          syn[j] <= (a_cnt == 0) ? in_data : (gf_mul(syn[j], gf_alpha_pow(j + 1)) ^ in_data);
        if (a_cnt == 8'(RS_N - 1)) begin
          a_cnt  <= '0;
          a_full <= 1'b1;
        end else begin
          a_cnt <= a_cnt + 8'd1;
        end
      end
      if (handoff) begin
        a_full <= 1'b0;
        a_bank <= ~a_bank;
      end
    end
  end

  // discrepancy of the current BM iteration: sum_i lam_i * S_(r-i)
  sym_t delta;
  always_comb begin
    delta = '0;
    for (int i = 0; i < NL; i++)
      if (int'(r) - i >= 0) delta ^= gf_mul(lam[i], bs[int'(r) - i]);
  end

  // Chien search evaluation at the current point
  sym_t lam_sum, odd_sum, om_sum, err_val;
  logic is_root, out_phase;
  logic [7:0] k_b;
  always_comb begin
    lam_sum = '0;
    odd_sum = '0;
    om_sum  = '0;
    for (int j = 0; j < NL; j++) begin
      lam_sum ^= lc[j];
      if (j % 2 == 1) odd_sum ^= lc[j];
    end
    for (int i = 0; i < RS_T_MAX; i++) om_sum ^= oc[i];
    is_root = (lam_sum == '0);
    err_val = gf_mul(gf_mul(xr, om_sum), gf_inv(odd_sum));
  end

  assign k_b       = 8'(RS_N - 2 * int'(b_t));
  assign out_phase = (b_st == B_CHIEN) && (p < k_b);
  assign out_valid = out_phase;
  assign out_data  = mem[b_bank][p] ^ (is_root ? err_val : 8'h00);
  assign out_last  = out_phase && (p == k_b - 8'd1);

  logic chien_step;
  assign chien_step = (b_st == B_CHIEN) && (!out_phase || out_ready);

  // evaluator coefficients W_i = sum_{j<=i} L_j S_(i-j), i < RS_T_MAX
  sym_t om_w [RS_T_MAX];
  always_comb begin
    for (int i = 0; i < RS_T_MAX; i++) begin
      om_w[i] = '0;
      for (int j = 0; j <= i; j++) om_w[i] ^= gf_mul(lam[j], bs[i-j]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_st   <= B_IDLE;
      b_bank <= 1'b0;
      b_t    <= tsel_t'(1);
      gam    <= 8'h01;
      kk     <= '0;
      r      <= '0;
      xr     <= 8'h02;
      p      <= '0;
      roots  <= '0;
      deg    <= '0;
      done   <= 1'b0;
      ok     <= 1'b0;
      n_err  <= '0;
      for (int j = 0; j < RS_NR_MAX; j++) bs[j] <= '0;
      for (int j = 0; j < NL; j++) begin
        lam[j]  <= '0;
        bpol[j] <= '0;
        lc[j]   <= '0;
      end
      for (int i = 0; i < RS_T_MAX; i++) oc[i] <= '0;
    end else begin
      done <= 1'b0;
      case (b_st)
        B_IDLE: if (handoff) begin
          b_st   <= B_BM;
          b_bank <= a_bank;
          b_t    <= a_t;
          bs     <= syn;
          for (int j = 0; j < NL; j++) begin
            lam[j]  <= (j == 0) ? 8'h01 : 8'h00;
            bpol[j] <= (j == 0) ? 8'h01 : 8'h00;
          end
          gam <= 8'h01;
          kk  <= '0;
          r   <= '0;
        end
        B_BM: begin
          // L <- gam*L + delta*x*B
          for (int j = 0; j < NL; j++)
            lam[j] <= gf_mul(gam, lam[j]) ^ ((j > 0) ? gf_mul(delta, bpol[j-1]) : 8'h00);
          if (delta != '0 && kk >= 0) begin
            bpol <= lam;
            gam  <= delta;
            kk   <= -kk - 7'sd1;
          end else begin
            for (int j = 0; j < NL; j++) bpol[j] <= (j > 0) ? bpol[j-1] : 8'h00;
            kk <= kk + 7'sd1;
          end
          if (r == 5'(2 * int'(b_t) - 1)) b_st <= B_OMEGA;
          r <= r + 5'd1;
        end
        B_OMEGA: begin
          // W_i = sum_{j<=i} L_j S_(i-j), loaded pre-multiplied by alpha^i
          for (int i = 0; i < RS_T_MAX; i++)
            oc[i] <= (i < 2 * int'(b_t)) ? gf_mul(om_w[i], gf_alpha_pow(i)) : 8'h00;
          for (int j = 0; j < NL; j++) lc[j] <= gf_mul(lam[j], gf_alpha_pow(j));
          deg <= '0;
          for (int j = 1; j < NL; j++) if (lam[j] != '0) deg <= 4'(j);
          xr    <= 8'h02;
          p     <= '0;
          roots <= '0;
          b_st  <= B_CHIEN;
        end
        B_CHIEN: if (chien_step) begin
          for (int j = 0; j < NL; j++) lc[j] <= gf_mul(lc[j], gf_alpha_pow(j));
          for (int i = 0; i < RS_T_MAX; i++) oc[i] <= gf_mul(oc[i], gf_alpha_pow(i));
          xr <= gf_mul(xr, 8'h02);
          if (is_root) roots <= roots + 8'd1;
          if (p == 8'(RS_N - 1)) begin
            b_st  <= B_IDLE;
            done  <= 1'b1;
            ok    <= (deg <= 4'(b_t)) && ((roots + 8'(is_root)) == 8'(deg));
            n_err <= roots + 8'(is_root);
          end
          p <= p + 8'd1;
        end
        default: b_st <= B_IDLE;
      endcase
    end
  end

endmodule
