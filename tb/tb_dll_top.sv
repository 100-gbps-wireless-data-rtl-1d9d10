// tb_dll_top: end-to-end test of the whole data link layer at its default
// size: two boards (dll_top with 10 lanes each, no parameter overrides)
// connected lane by lane through a channel model that damages line words.
// Lanes 0..3 carry user traffic from the testbench (as the lanes with a
// processor port would); lanes 4..9 run the internal PRBS frame generators
// and checkers. The channel runs through phases: clean (the code steps
// down), random symbol errors, codewords destroyed, single header copies
// damaged, all header copies destroyed, acknowledgements lost (timeout),
// and a stretch where the user sink on the user lanes does not read.
// Checks: every user word arrives once, in order and intact; the PRBS
// checkers count words and no errors; no line FIFO overflows; every
// mechanism (each rs_pkg::lane_ev_e event and back-pressure) happened.
module tb_dll_top;
  import rs_pkg::*;

  localparam int L = 10;    // lanes of the default top
  localparam int NU = 4;    // user lanes; the rest use the frame generators

  logic clk_fec = 0, rst_n = 1;
  logic [L-1:0] clk_if = '0;
  always #2500 clk_fec = ~clk_fec;
  always #3200 clk_if  = ~clk_if;

  int checks = 0, failures = 0;
  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  logic [L-1:0] rst_if_n, gen_en;
  assign rst_if_n = {L{rst_n}};
  assign gen_en   = {{(L-NU){1'b1}}, {NU{1'b0}}};

  logic [L-1:0]  utx_valid [2], utx_ready [2], urx_valid [2], urx_ready [2];
  logic [63:0]   utx_data [2][L], urx_data [2][L];
  logic [L-1:0]  ltx_valid [2], ltx_sof [2], lrx_valid [2], lrx_sof [2];
  logic [63:0]   ltx_data [2][L], lrx_data [2][L];
  logic [L-1:0]  ovf [2];
  logic [N_EV-1:0] ev [2][L];
  tsel_t         txt [2][L], reqt [2][L];
  logic [7:0]    corr [2][L];
  logic [31:0]   cw [2][L], ce [2][L];

  for (genvar s = 0; s < 2; s++) begin : g_board
    dll_top u_top (
      .clk_fec(clk_fec), .rst_fec_n(rst_n), .clk_if(clk_if), .rst_if_n(rst_if_n), .gen_en(gen_en),
      .utx_valid(utx_valid[s]), .utx_ready(utx_ready[s]), .utx_data(utx_data[s]),
      .urx_valid(urx_valid[s]), .urx_ready(urx_ready[s]), .urx_data(urx_data[s]),
      .line_tx_valid(ltx_valid[s]), .line_tx_sof(ltx_sof[s]), .line_tx_data(ltx_data[s]),
      .line_rx_valid(lrx_valid[s]), .line_rx_sof(lrx_sof[s]), .line_rx_data(lrx_data[s]),
      .ev_rx_overflow(ovf[s]), .ev_fec(ev[s]), .cur_tx_t(txt[s]), .cur_req_t(reqt[s]),
      .corr_syms(corr[s]), .chk_words(cw[s]), .chk_errors(ce[s])
    );
  end

  // ------------------------------------------------------------ channel
  typedef enum int {CH_CLEAN, CH_SYMERR, CH_KILLCW, CH_HDR1, CH_HDRALL, CH_ACKLOSS} ch_mode_e;
  ch_mode_e mode = CH_CLEAN;
  int wif [2][L];
  bit kill [2][L];

  always @(posedge clk_if[0]) begin
    for (int s = 0; s < 2; s++) begin
      for (int l = 0; l < L; l++) begin
        logic [63:0] m;
        int d;
        d = 1 - s;
        m = '0;
        if (ltx_valid[d][l]) begin
          if (ltx_sof[d][l]) begin
            wif[s][l] = 0;
            kill[s][l] = ($urandom_range(0, 3) == 0);
          end else wif[s][l]++;
          case (mode)
            CH_SYMERR:  if ($urandom_range(0, 99) < 3) m[8 * $urandom_range(0, 7) +: 8] = 8'($urandom_range(1, 255));
            CH_KILLCW:  if (kill[s][l] && wif[s][l] >= 3 && wif[s][l] < 40) m = {$urandom, $urandom};
            CH_HDR1:    if (wif[s][l] < 3) begin
                          if (kill[s][l]) m = 64'h1 << $urandom_range(0, 63);
                          else if (wif[s][l] == 1) m = {$urandom, $urandom} | 64'h100;
                        end
            CH_HDRALL:  if (wif[s][l] < 3 && kill[s][l]) m = {$urandom, $urandom} | 64'h100;
            CH_ACKLOSS: if (s == 0 && wif[s][l] < 3) m = {$urandom, $urandom} | 64'h100;
            default: ;
          endcase
        end
        lrx_valid[s][l] <= ltx_valid[d][l];
        lrx_sof[s][l]   <= ltx_sof[d][l];
        lrx_data[s][l]  <= ltx_data[d][l] ^ m;
      end
    end
  end

  // ------------------------------------------------------------ user lanes
  // each user lane sends a counter; the receiver expects the same count
  logic [63:0] nxt_tx [2][NU], nxt_rx [2][NU];
  int n_rx [2][NU], n_bad = 0, n_bp = 0;
  bit src_on = 0, sink_on = 1;

  always @(posedge clk_if[0]) begin
    for (int s = 0; s < 2; s++) begin
      for (int l = 0; l < NU; l++) begin
        if (utx_valid[s][l] && utx_ready[s][l]) nxt_tx[s][l] <= nxt_tx[s][l] + 64'd1;
        if (urx_valid[s][l] && urx_ready[s][l]) begin
          if (urx_data[s][l] != nxt_rx[s][l]) n_bad++;
          nxt_rx[s][l] <= nxt_rx[s][l] + 64'd1;
          n_rx[s][l]++;
        end
        if (urx_valid[s][l] && !urx_ready[s][l]) n_bp++;
      end
    end
  end

  always @(negedge clk_if[0]) begin
    for (int s = 0; s < 2; s++) begin
      for (int l = 0; l < NU; l++) begin
        utx_valid[s][l] <= src_on;
        utx_data[s][l]  <= nxt_tx[s][l];
        urx_ready[s][l] <= sink_on;
      end
    end
  end

  // ------------------------------------------------------------ event counts
  longint evc [N_EV];
  int ovf_cnt = 0;
  always @(posedge clk_fec)
    for (int s = 0; s < 2; s++) for (int l = 0; l < L; l++) for (int e = 0; e < N_EV; e++)
      if (ev[s][l][e]) evc[e]++;
  always @(posedge clk_if[0]) for (int s = 0; s < 2; s++) if (ovf[s] != '0) ovf_cnt++;

  initial begin
    repeat (400000) @(posedge clk_fec);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_phase(ch_mode_e m, int cycles);
    mode = m;
    repeat (cycles) @(posedge clk_if[0]);
  endtask

  initial begin
    for (int e = 0; e < N_EV; e++) evc[e] = 0;
    for (int s = 0; s < 2; s++) begin
      utx_valid[s] = '0; urx_ready[s] = '1; lrx_valid[s] = '0; lrx_sof[s] = '0;
      for (int l = 0; l < L; l++) begin
        utx_data[s][l] = '0; lrx_data[s][l] = '0; wif[s][l] = 0; kill[s][l] = 0;
      end
      for (int l = 0; l < NU; l++) begin
        nxt_tx[s][l] = '0; nxt_rx[s][l] = '0; n_rx[s][l] = 0;
      end
    end
    #1 rst_n = 0;
    repeat (5) @(posedge clk_if[0]);
    rst_n = 1;
    repeat (5) @(posedge clk_if[0]);
    src_on = 1;
    run_phase(CH_CLEAN, 30000);
    for (int s = 0; s < 2; s++) for (int l = 0; l < L; l++)
      chk(txt[s][l] < 9, $sformatf("board %0d lane %0d: code did not step down (t=%0d)", s, l, txt[s][l]));
    run_phase(CH_SYMERR, 8000);
    run_phase(CH_KILLCW, 6000);
    run_phase(CH_HDR1, 4000);
    run_phase(CH_HDRALL, 4000);
    run_phase(CH_ACKLOSS, 16000);
    mode = CH_CLEAN;
    sink_on = 0;
    repeat (3000) @(posedge clk_if[0]);
    sink_on = 1;
    src_on = 0;
    run_phase(CH_CLEAN, 20000);
    for (int s = 0; s < 2; s++) begin
      for (int l = 0; l < NU; l++) begin
        chk(nxt_rx[1-s][l] == nxt_tx[s][l],
            $sformatf("board %0d lane %0d: %0d words sent, %0d arrived", s, l, nxt_tx[s][l], nxt_rx[1-s][l]));
        chk(n_rx[1-s][l] > 5000, $sformatf("board %0d lane %0d: only %0d words", 1-s, l, n_rx[1-s][l]));
      end
      for (int l = NU; l < L; l++) begin
        chk(ce[s][l] == 0, $sformatf("board %0d lane %0d: %0d PRBS errors", s, l, ce[s][l]));
        chk(cw[s][l] > 5000, $sformatf("board %0d lane %0d: only %0d PRBS words", s, l, cw[s][l]));
      end
    end
    chk(n_bad == 0, $sformatf("%0d user words wrong", n_bad));
    chk(ovf_cnt == 0, "line FIFO overflow");
    for (int e = 0; e < N_EV; e++) begin
      lane_ev_e ee;
      ee = lane_ev_e'(e);
      $display("%-18s %0d", ee.name(), evc[e]);
      chk(evc[e] > 0, $sformatf("mechanism %s never happened", ee.name()));
    end
    $display("back-pressure cycles %0d, lane 4 PRBS words %0d/%0d", n_bp, cw[0][4], cw[1][4]);
    chk(n_bp > 0, "back-pressure never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
