// tb_rs_decoder: sends reference-encoded codewords (tb_rs_ref_pkg) with 0..t
// random symbol errors through rs_decoder for every code t = 1..9 and
// checks the corrected message, the ok flag and the error count. Codewords
// with t+1 errors (for t >= 5, where a miscorrection is very unlikely) must
// be flagged as not decodable. A final phase feeds codewords back to back
// with out_ready held high and checks the codeword period of 2t+257 clocks.
module tb_rs_decoder;
  import rs_pkg::*;
  import tb_rs_ref_pkg::*;

  logic clk = 0, rst_n = 1;
  tsel_t in_t;
  logic in_valid, in_ready, out_valid, out_ready, out_last, done, ok;
  sym_t in_data, out_data;
  logic [7:0] n_err;
  int checks = 0, failures = 0;
  bit bp_en = 1;

  always #5 clk = ~clk;

  rs_decoder dut (.*);

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expectation queue, one entry per codeword sent
  typedef struct {
    int t;
    int nerr;
    bit must_fail;
    byte unsigned msg [];
  } expect_t;
  expect_t expq [$];

  int oidx = 0;
  int bad_syms = 0;
  int n_done = 0;
  longint done_cyc [$];
  longint cyc = 0;

  always @(posedge clk) begin
    cyc++;
    if (out_valid && out_ready) begin
      if (!expq[0].must_fail && out_data != expq[0].msg[oidx]) bad_syms++;
      chk(out_last == (oidx == 254 - 2 * expq[0].t), "out_last position");
      oidx++;
    end
    if (done) begin
      expect_t e;
      e = expq.pop_front();
      done_cyc.push_back(cyc);
      n_done++;
      if (e.must_fail) chk(!ok, $sformatf("t=%0d with %0d errors not flagged", e.t, e.nerr));
      else begin
        chk(ok, $sformatf("t=%0d with %0d errors flagged as failure", e.t, e.nerr));
        chk(n_err == 8'(e.nerr), $sformatf("t=%0d n_err %0d exp %0d", e.t, n_err, e.nerr));
        chk(bad_syms == 0, $sformatf("t=%0d with %0d errors: %0d wrong symbols", e.t, e.nerr, bad_syms));
        chk(oidx == 255 - 2 * e.t, "number of message symbols");
      end
      bad_syms = 0;
      oidx = 0;
    end
    out_ready <= bp_en ? ($urandom_range(0, 5) != 0) : 1'b1;
  end

  task automatic send(int t, int nerr, bit gaps);
    expect_t e;
    byte unsigned cw [255];
    int pos [$];
    int k = 255 - 2 * t;
    e.t = t; e.nerr = nerr; e.must_fail = (nerr > t);
    e.msg = new[k];
    foreach (e.msg[i]) e.msg[i] = byte'($urandom);
    encode(t, e.msg, cw);
    while (pos.size() < nerr) begin
      int q = $urandom_range(0, 254);
      if (!(q inside {pos})) pos.push_back(q);
    end
    foreach (pos[i]) cw[pos[i]] ^= byte'($urandom_range(1, 255));
    expq.push_back(e);
    for (int i = 0; i < 255; i++) begin
      if (gaps) while ($urandom_range(0, 9) == 0) @(posedge clk);
      @(negedge clk);
      in_valid = 1; in_data = cw[i]; in_t = tsel_t'(t);
      #1;
      while (!in_ready) begin @(negedge clk); #1; end
      @(posedge clk);
      #1 in_valid = 0;
    end
  endtask

  initial begin
    in_valid = 0; in_data = 0; in_t = 1; out_ready = 1;
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 1; t <= 9; t++)
      for (int ne = 0; ne <= t; ne++) send(t, ne, 1);
    for (int t = 5; t <= 9; t++) send(t, t + 1, 1);
    wait (expq.size() == 0);
    // throughput: back-to-back codewords, no output back-pressure
    bp_en = 0;
    repeat (5) @(posedge clk);
    for (int t = 1; t <= 9; t += 4) begin
      done_cyc.delete();
      for (int n = 0; n < 4; n++) send(t, n % (t + 1), 0);
      wait (expq.size() == 0);
      @(posedge clk);
      for (int n = 2; n < 4; n++)
        chk(done_cyc[n] - done_cyc[n-1] == 2 * t + 257,
            $sformatf("t=%0d codeword period %0d exp %0d", t, done_cyc[n] - done_cyc[n-1], 2 * t + 257));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
