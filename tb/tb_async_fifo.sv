// tb_async_fifo: writer at 200 MHz, reader at 156.25 MHz.
// The writer sends packets of random length and commits or discards
// each one; the reader, reading at random times, must see exactly the
// committed packets, in order, with no word lost or repeated. Also checks
// that wr_full is reached and that the FIFO drains to empty.
module tb_async_fifo;
  localparam int W = 16, AW = 4;
  logic wr_clk = 0, rd_clk = 0, wr_rst_n = 1, rd_rst_n = 1;
  logic wr_en = 0, wr_commit = 0, wr_discard = 0, rd_en = 0;
  logic [W-1:0] wr_data = 0, rd_data;
  logic wr_full, rd_empty;
  logic [AW:0] wr_count, rd_count;
  int checks = 0, failures = 0;
  int n_full = 0, n_discard = 0, n_read = 0;
  logic [W-1:0] expq [$];
  logic [W-1:0] pend [$];
  bit writer_done = 0;

  always #2500 wr_clk = ~wr_clk;
  always #3200 rd_clk = ~rd_clk;

  async_fifo #(.W(W), .AW(AW)) dut (.*);

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge rd_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reader: random rd_en, checks the head word
  always @(posedge rd_clk) begin
    if (rd_en && !rd_empty) begin
      chk(expq.size() > 0, "read with nothing committed");
      if (expq.size() > 0) chk(rd_data == expq.pop_front(), "data mismatch");
      n_read++;
    end
  end
  always @(negedge rd_clk) rd_en <= ($urandom_range(0, 3) != 0);

  initial begin
    #1 begin wr_rst_n = 0; rd_rst_n = 0; end
    repeat (3) @(posedge rd_clk);
    wr_rst_n = 1; rd_rst_n = 1;
    for (int p = 0; p < 300; p++) begin
      int len;
      bit keep;
      len = $urandom_range(1, 12);
      keep = ($urandom_range(0, 3) != 0);
      pend.delete();
      for (int i = 0; i < len; i++) begin
        @(negedge wr_clk);
        wr_data = W'($urandom);
        wr_en = 1;
        wr_commit = 0;
        #1;
        while (wr_full) begin
          wr_en = 0; n_full++;
          @(negedge wr_clk);
          wr_en = 1;
          #1;
        end
        pend.push_back(wr_data);
        @(posedge wr_clk);
        #1 wr_en = 0;
      end
      @(negedge wr_clk);
      if (keep) begin
        wr_commit = 1;
        foreach (pend[i]) expq.push_back(pend[i]);
      end else begin
        wr_discard = 1;
        n_discard++;
      end
      @(negedge wr_clk);
      wr_commit = 0; wr_discard = 0;
    end
    // plain mode: commit with every word
    for (int i = 0; i < 40; i++) begin
      @(negedge wr_clk);
      #1;
      while (wr_full) begin @(negedge wr_clk); #1; end
      wr_data = W'($urandom); wr_en = 1; wr_commit = 1;
      expq.push_back(wr_data);
      @(posedge wr_clk);
      #1 begin wr_en = 0; wr_commit = 0; end
    end
    repeat (100) @(posedge rd_clk);
    chk(expq.size() == 0, $sformatf("%0d committed words never read", expq.size()));
    chk(rd_empty, "FIFO not empty at the end");
    chk(n_full > 0, "full never reached");
    chk(n_discard > 0, "no packet discarded");
    $display("reads %0d, full stalls %0d, discarded packets %0d", n_read, n_full, n_discard);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
