// tb_prbs: prbs_gen feeding prbs_chk with random stalls. The first words
// are compared with a bit-serial PRBS-31 model kept here; the checker must
// count every word and no error; a corrupted word must be counted as one
// error.
module tb_prbs;
  import rs_pkg::*;
  logic clk = 0, rst_n = 1;
  logic en = 0, valid, ready = 0, cvalid;
  logic [63:0] data, cdata;
  logic [31:0] words, errors;
  int checks = 0, failures = 0;
  logic [30:0] model = 31'h7FFF_FFFF;
  logic corrupt = 0;

  always #5 clk = ~clk;

  prbs_gen u_gen (.clk, .rst_n, .en, .valid, .ready, .data);
  assign cvalid = valid && ready;
  assign cdata  = data ^ {63'd0, corrupt};
  prbs_chk u_chk (.clk, .rst_n, .valid(cvalid), .data(cdata), .words, .errors);

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

  int n = 0;
  always @(posedge clk) if (rst_n && valid && ready) begin
    logic [63:0] w;
    for (int i = 0; i < 64; i++) begin
      logic b;
      b = model[30] ^ model[27];
      model = {model[29:0], b};
      w[63 - i] = b;
    end
    chk(data == w, $sformatf("word %0d", n));
    n++;
  end

  initial begin
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    en = 1;
    repeat (2000) begin
      @(negedge clk);
      ready = ($urandom_range(0, 3) != 0);
    end
    @(negedge clk) ready = 0;
    @(negedge clk);
    chk(words == 32'(n), $sformatf("checker counted %0d of %0d words", words, n));
    chk(errors == 0, "errors on a clean stream");
    ready = 1; corrupt = 1;
    @(negedge clk) begin ready = 0; corrupt = 0; end
    @(negedge clk);
    chk(errors == 1, "corrupted word not counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
