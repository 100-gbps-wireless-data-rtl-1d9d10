// tb_code_adapt: walks the code selection through its range. Clean frames
// must lower req_t by one every DOWN_FRAMES frames from 9 down to 1; frames
// whose error count reaches t must raise it by one; a frame that could not
// be decoded must jump to 9; a steady error count must settle req_t at a
// value that leaves exactly one spare symbol.
module tb_code_adapt;
  import rs_pkg::*;
  logic clk = 0, rst_n = 1;
  logic frame_valid = 0, frame_ok = 0;
  tsel_t frame_t = 1, req_t;
  logic [7:0] frame_max_err = 0;
  logic step_up, step_down;
  int checks = 0, failures = 0;
  int n_up = 0, n_down = 0;

  always #5 clk = ~clk;
  code_adapt dut (.*);

  always @(posedge clk) begin
    n_up += int'(step_up);
    n_down += int'(step_down);
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one frame report, coded with the currently requested t
  task automatic frame(bit ok, int nerr);
    @(negedge clk);
    frame_valid = 1; frame_ok = ok; frame_t = req_t; frame_max_err = 8'(nerr);
    @(negedge clk);
    frame_valid = 0;
  endtask

  initial begin
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(req_t == 9, "reset value is the strongest code");
    for (int t = 9; t > 1; t--) begin
      for (int f = 0; f < 7; f++) frame(1, 0);
      chk(req_t == tsel_t'(t), $sformatf("stepped too early at t=%0d", t));
      frame(1, 0);
      chk(req_t == tsel_t'(t - 1), $sformatf("no step down from t=%0d (req %0d)", t, req_t));
    end
    repeat (20) frame(1, 0);
    chk(req_t == 1, "stays at the weakest code");
    frame(1, 1);
    chk(req_t == 2, "margin used up at t=1: step up");
    repeat (20) frame(1, 1);
    chk(req_t == 2, "one error per codeword settles at t=2");
    repeat (3) frame(1, 3);
    chk(req_t == 4, "three errors per codeword step up to t=4");
    repeat (20) frame(1, 3);
    chk(req_t == 4, "three errors per codeword settle at t=4");
    frame(0, 0);
    chk(req_t == 9, "decoding failure jumps to t=9");
    repeat (2) @(negedge clk);
    chk(n_up == 4 && n_down == 8, $sformatf("step pulses up=%0d down=%0d", n_up, n_down));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
