// tb_rs_encoder: drives random messages through rs_encoder for every code
// t = 1..9, with random gaps on the input and random back-pressure on the
// output, and compares each 255-symbol output codeword with the reference
// encoder of tb_rs_ref_pkg. Also checks that every codeword has zeros at
// alpha^1..alpha^2t and that in_ready is low for exactly 2t cycles per
// codeword (the parity overhead).
module tb_rs_encoder;
  import rs_pkg::*;
  import tb_rs_ref_pkg::*;

  logic clk = 0, rst_n = 1;
  tsel_t in_t;
  logic in_valid, in_ready, out_valid, out_ready, out_last;
  sym_t in_data, out_data;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rs_encoder dut (.*);

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte unsigned msg [];
  byte unsigned ref_cw [255];
  byte unsigned got [255];
  int got_n;
  int ready_low;

  // output collector with random back-pressure
  always @(posedge clk) begin
    if (out_valid && out_ready) begin
      got[got_n] = out_data;
      got_n++;
    end
    out_ready <= ($urandom_range(0, 9) != 0);
  end

  initial begin
    in_valid = 0; in_data = 0; in_t = 1; out_ready = 1;
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 27; rep++) begin
      int t, k;
      t = rep % 9 + 1;
      k = 255 - 2 * t;
      msg = new[k];
      foreach (msg[i]) msg[i] = byte'($urandom);
      encode(t, msg, ref_cw);
      got_n = 0;
      ready_low = 0;
      for (int i = 0; i < k; i++) begin
        while ($urandom_range(0, 7) == 0) @(posedge clk);
        @(negedge clk);
        in_valid = 1; in_data = msg[i]; in_t = tsel_t'(t);
        #1;
        while (!in_ready) begin @(negedge clk); #1; end
        @(posedge clk);
        #1 in_valid = 0;
      end
      // count cycles with in_ready low while the parity leaves
      while (got_n < 255) begin
        @(posedge clk);
        if (!in_ready && out_ready) ready_low++;
      end
      for (int i = 0; i < 255; i++)
        chk(got[i] == ref_cw[i], $sformatf("t=%0d sym %0d got %02x exp %02x", t, i, got[i], ref_cw[i]));
      chk(is_codeword(t, got), $sformatf("t=%0d output is not a codeword", t));
      chk(ready_low == 2 * t, $sformatf("t=%0d parity cycles %0d", t, ready_low));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
