// tb_hdr_tmr_decoder: random headers, sent as three copies with bit errors
// of four kinds: none; one copy destroyed; scattered errors in all three
// copies in different bit positions (only the vote recovers them); two
// copies hit in the same bit (only a single-copy branch recovers it); all
// copies destroyed (must be rejected). The CRC is computed here bit by bit,
// independently of the RTL package.
module tb_hdr_tmr_decoder;
  import rs_pkg::*;

  logic clk = 0, rst_n = 1;
  logic in_valid = 0;
  hdr_t in_copy [3];
  logic out_valid, out_ok;
  hdr_fields_t out_fields;
  logic [3:0] out_branch;
  int checks = 0, failures = 0;
  int n_vote_only = 0, n_copy_only = 0;

  always #5 clk = ~clk;

  hdr_tmr_decoder dut (.*);

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

  function automatic logic [15:0] ref_crc(logic [47:0] d);
    logic [16:0] c = 17'h0FFFF;
    for (int i = 47; i >= 0; i--) begin
      c = {c[15:0], 1'b0};
      if (c[16] ^ d[i]) c[15:0] = c[15:0] ^ 16'h1021;
    end
    return c[15:0];
  endfunction

  initial begin
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      logic [47:0] f;
      hdr_t h;
      int kind;
      bit exp_ok;
      logic [63:0] m [3];
      f = {$urandom, $urandom};
      h = {f, ref_crc(f)};
      kind = n % 5;
      exp_ok = 1;
      for (int i = 0; i < 3; i++) m[i] = '0;
      case (kind)
        1: m[$urandom_range(0, 2)] = {$urandom, $urandom} | 64'h1;
        2: for (int b = 0; b < 64; b++) m[b % 3][b] = $urandom_range(0, 1);
        3: begin
             int b;
             b = $urandom_range(0, 63);
             m[0][b] = 1; m[1][b] = 1;
           end
        4: begin
             for (int i = 0; i < 3; i++) m[i] = {$urandom, $urandom} | (64'h1 << (16 + i));
             exp_ok = 0;
           end
        default: ;
      endcase
      @(negedge clk);
      in_valid = 1;
      for (int i = 0; i < 3; i++) in_copy[i] = h ^ m[i];
      @(negedge clk);
      in_valid = 0;
      chk(out_valid, "single-cycle decode");
      chk(out_ok == exp_ok, $sformatf("case %0d ok=%b", kind, out_ok));
      if (exp_ok) chk(out_fields == f, $sformatf("case %0d fields", kind));
      if (kind == 2 && out_branch == 4'b0001) n_vote_only++;
      if (kind == 3 && out_branch[0] == 0) n_copy_only++;
    end
    chk(n_vote_only > 0, "vote-only recovery never exercised");
    chk(n_copy_only > 0, "copy-only recovery never exercised");
    $display("vote-only recoveries %0d, copy-only recoveries %0d", n_vote_only, n_copy_only);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
