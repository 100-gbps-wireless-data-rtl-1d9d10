// tb_dll_lane: two lanes connected back to back through a channel model
// that damages line words, with random user traffic in both directions.
// The channel runs through phases: clean (the code must step down), random
// symbol errors (corrected; the code must step up again), whole codewords
// destroyed (frames not decodable: nack and retransmission), damaged
// header copies (recovered by the vote or a single copy), all three header
// copies destroyed (header lost: recovered by nack or timeout), and a
// stretch where the receiving user does not read (back-pressure).
// Every user word must arrive exactly once, in order and intact.
module tb_dll_lane;
  import rs_pkg::*;

  logic clk_if = 0, clk_fec = 0, rst_n = 1;
  always #3200 clk_if  = ~clk_if;
  always #2500 clk_fec = ~clk_fec;

  int checks = 0, failures = 0;
  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // two lanes: side 0 and side 1
  logic        utx_valid [2], utx_ready [2], urx_valid [2], urx_ready [2];
  logic [63:0] utx_data [2], urx_data [2];
  logic        ltx_valid [2], ltx_sof [2], lrx_valid [2], lrx_sof [2];
  logic [63:0] ltx_data [2], lrx_data [2];
  logic        ovf [2];
  logic [N_EV-1:0] ev [2];
  tsel_t       txt [2], reqt [2];
  logic [7:0]  corr [2];

  for (genvar s = 0; s < 2; s++) begin : g_side
    dll_lane #(.TIMEOUT(4096), .FLUSH(512)) u_lane (
      .clk_if(clk_if), .rst_if_n(rst_n), .clk_fec(clk_fec), .rst_fec_n(rst_n),
      .utx_valid(utx_valid[s]), .utx_ready(utx_ready[s]), .utx_data(utx_data[s]),
      .urx_valid(urx_valid[s]), .urx_ready(urx_ready[s]), .urx_data(urx_data[s]),
      .line_tx_valid(ltx_valid[s]), .line_tx_sof(ltx_sof[s]), .line_tx_data(ltx_data[s]),
      .line_rx_valid(lrx_valid[s]), .line_rx_sof(lrx_sof[s]), .line_rx_data(lrx_data[s]),
      .ev_rx_overflow(ovf[s]), .ev_fec(ev[s]), .cur_tx_t(txt[s]), .cur_req_t(reqt[s]),
      .corr_syms(corr[s])
    );
  end

  // ------------------------------------------------------------ channel
  typedef enum int {CH_CLEAN, CH_SYMERR, CH_KILLCW, CH_HDR1, CH_HDRALL, CH_ACKLOSS} ch_mode_e;
  ch_mode_e mode = CH_CLEAN;
  int word_in_frame [2] = '{0, 0};
  bit kill_frame [2] = '{0, 0};
  int n_hdr_killed = 0;

  function automatic logic [63:0] sym_errs(int n);
    logic [63:0] m = '0;
    for (int i = 0; i < n; i++) m[8 * $urandom_range(0, 7) +: 8] = 8'($urandom_range(1, 255));
    return m;
  endfunction

  always @(posedge clk_if) begin
    for (int s = 0; s < 2; s++) begin
      logic [63:0] m;
      int d;
      d = 1 - s;                      // side s receives what side d sends
      m = '0;
      if (ltx_valid[d]) begin
        if (ltx_sof[d]) begin
          word_in_frame[s] = 0;
          kill_frame[s] = ($urandom_range(0, 3) == 0);
        end else word_in_frame[s]++;
        case (mode)
          CH_SYMERR: if ($urandom_range(0, 99) < 8) m = sym_errs(1);
          CH_KILLCW: if (kill_frame[s] && word_in_frame[s] >= 3 && word_in_frame[s] < 40) m = {$urandom, $urandom};
          CH_ACKLOSS: if (s == 0 && word_in_frame[s] < 3) m = {$urandom, $urandom} | 64'h100;
          CH_HDR1:   if (word_in_frame[s] < 3) begin
                       if (kill_frame[s]) m = 64'h1 << $urandom_range(0, 63);   // vote repairs
                       else if (word_in_frame[s] == 1) m = {$urandom, $urandom} | 64'h100;
                     end
          CH_HDRALL: if (word_in_frame[s] < 3 && kill_frame[s]) begin
                       m = {$urandom, $urandom} | 64'h100;
                       if (word_in_frame[s] == 0) n_hdr_killed++;
                     end
          default: ;
        endcase
      end
      lrx_valid[s] <= ltx_valid[d];
      lrx_sof[s]   <= ltx_sof[d];
      lrx_data[s]  <= ltx_data[d] ^ m;
    end
  end

  // ------------------------------------------------------------ traffic
  logic [63:0] sent [2][$];
  int n_rx [2] = '{0, 0};
  int n_bad [2] = '{0, 0};
  bit src_on = 0, sink_on = 1;
  int n_bp = 0;

  always @(posedge clk_if) begin
    for (int s = 0; s < 2; s++) begin
      if (utx_valid[s] && utx_ready[s]) sent[s].push_back(utx_data[s]);
      if (urx_valid[s] && urx_ready[s]) begin
        logic [63:0] e;
        e = (sent[1-s].size() > 0) ? sent[1-s].pop_front() : ~urx_data[s];
        if (e != urx_data[s]) n_bad[s]++;
        n_rx[s]++;
      end
      if (!urx_ready[s] && urx_valid[s]) n_bp++;
    end
  end

  always @(negedge clk_if) begin
    for (int s = 0; s < 2; s++) begin
      if (!(utx_valid[s] && !utx_ready[s])) begin
        utx_valid[s] <= src_on && ($urandom_range(0, 9) != 0);
        utx_data[s]  <= {$urandom, $urandom};
      end
      urx_ready[s] <= sink_on;
    end
  end

  // ------------------------------------------------------------ event counts
  longint evc [N_EV];
  int ovf_cnt = 0;
  always @(posedge clk_fec) for (int s = 0; s < 2; s++) for (int e = 0; e < N_EV; e++) if (ev[s][e]) evc[e]++;
  always @(posedge clk_if) for (int s = 0; s < 2; s++) if (ovf[s]) ovf_cnt++;

  initial begin
    repeat (3000000) @(posedge clk_if);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_phase(ch_mode_e m, int cycles);
    mode = m;
    repeat (cycles) @(posedge clk_if);
  endtask

  initial begin
    for (int e = 0; e < N_EV; e++) evc[e] = 0;
    for (int s = 0; s < 2; s++) begin
      utx_valid[s] = 0; utx_data[s] = 0; urx_ready[s] = 1;
      lrx_valid[s] = 0; lrx_sof[s] = 0; lrx_data[s] = 0;
    end
    #1 rst_n = 0;
    repeat (5) @(posedge clk_if);
    rst_n = 1;
    repeat (5) @(posedge clk_if);
    src_on = 1;
    run_phase(CH_CLEAN, 30000);
    chk(txt[0] < 9 && txt[1] < 9, $sformatf("code did not step down on a clean link (t=%0d,%0d)", txt[0], txt[1]));
    run_phase(CH_SYMERR, 15000);
    run_phase(CH_KILLCW, 8000);
    run_phase(CH_HDR1, 6000);
    run_phase(CH_HDRALL, 6000);
    run_phase(CH_ACKLOSS, 6000);
    mode = CH_CLEAN;
    sink_on = 0;
    repeat (3000) @(posedge clk_if);
    sink_on = 1;
    // stop the sources, destroy the headers of the last frames, let the
    // timeout recover them
    src_on = 0;
    repeat (400) @(posedge clk_if);
    run_phase(CH_HDRALL, 600);
    run_phase(CH_CLEAN, 30000);
    for (int s = 0; s < 2; s++) begin
      chk(n_bad[s] == 0, $sformatf("side %0d: %0d words wrong", s, n_bad[s]));
      chk(sent[1-s].size() == 0, $sformatf("side %0d: %0d words never delivered", s, sent[1-s].size()));
      chk(n_rx[s] > 1000, $sformatf("side %0d: only %0d words", s, n_rx[s]));
    end
    chk(ovf_cnt == 0, "line FIFO overflow");
    for (int e = 0; e < N_EV; e++) begin
      lane_ev_e ee;
      ee = lane_ev_e'(e);
      $display("%-18s %0d", ee.name(), evc[e]);
      chk(evc[e] > 0, $sformatf("mechanism %s never happened", ee.name()));
    end
    $display("back-pressure cycles %0d, words delivered %0d / %0d", n_bp, n_rx[0], n_rx[1]);
    chk(n_bp > 0, "back-pressure never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
