// async_fifo: dual-clock FIFO for the crossings between the 156.25 MHz
// interface clock and the 200 MHz coder clock of a lane.
//
// Classic Gray-code pointer FIFO: each side keeps a binary pointer, passes
// it to the other side in Gray code through a two-flop synchronizer and
// compares against the synchronized copy for full and empty. Reads are
// first-word fall-through (rd_data shows the head while !rd_empty).
// The write side can also build a packet before releasing it: words written
// since the last commit stay invisible to the reader until wr_commit, and
// wr_discard drops them. Tie wr_commit high for a plain FIFO. The pointer
// shown to the reader advances by at most one per write clock towards the
// committed pointer, so its Gray code changes in one bit per clock even
// when a whole packet is committed at once.
//
// Timing: a committed word is visible to the reader 3-4 read clocks after
// it was written; rd_count and wr_count are conservative.
//
// The two clock domains per lane follow the design description; the FIFO
// structure, commit/discard and depths are this design's own.
module async_fifo #(
  parameter int W  = 64,
  parameter int AW = 5    // log2 of the depth
) (
  input  logic          wr_clk,
  input  logic          wr_rst_n,
  input  logic          wr_en,
  input  logic [W-1:0]  wr_data,
  input  logic          wr_commit,   // release everything written so far (incl. this word)
  input  logic          wr_discard,  // drop everything written since the last commit
  output logic          wr_full,
  output logic [AW:0]   wr_count,    // words held, committed or not
  input  logic          rd_clk,
  input  logic          rd_rst_n,
  input  logic          rd_en,
  output logic [W-1:0]  rd_data,
  output logic          rd_empty,
  output logic [AW:0]   rd_count     // committed words available
);

  localparam int DEPTH = 1 << AW;

  logic [W-1:0] mem [DEPTH];

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = AW - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ------------------------------------------------------------ write side
  logic [AW:0] wptr, cptr, pptr, pgray;
  logic [AW:0] rgray_s1, rgray_s2, rptr_w;
  logic [AW:0] rptr, rgray_r;

  assign rptr_w   = gray2bin(rgray_s2);
  assign wr_count = wptr - rptr_w;
  assign wr_full  = (wr_count == (AW+1)'(DEPTH));

  always_ff @(posedge wr_clk) begin
    if (wr_en && !wr_full) mem[wptr[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wptr     <= '0;
      cptr     <= '0;
      pptr     <= '0;
      pgray    <= '0;
      rgray_s1 <= '0;
      rgray_s2 <= '0;
    end else begin
      rgray_s1 <= rgray_r;
      rgray_s2 <= rgray_s1;
      if (wr_discard) begin
        wptr <= cptr;
      end else begin
        if (wr_en && !wr_full) wptr <= wptr + 1'b1;
        if (wr_commit) cptr <= wptr + (AW+1)'(wr_en && !wr_full);
      end
      if (pptr != cptr) begin
        pptr  <= pptr + 1'b1;
        pgray <= bin2gray(pptr + 1'b1);
      end
    end
  end

  // ------------------------------------------------------------- read side
  logic [AW:0] wgray_s1, wgray_s2, wptr_r;

  assign wptr_r   = gray2bin(wgray_s2);
  assign rd_count = wptr_r - rptr;
  assign rd_empty = (rd_count == '0);
  assign rd_data  = mem[rptr[AW-1:0]];

  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rptr     <= '0;
      rgray_r  <= '0;
      wgray_s1 <= '0;
      wgray_s2 <= '0;
    end else begin
      wgray_s1 <= pgray;
      wgray_s2 <= wgray_s1;
      if (rd_en && !rd_empty) begin
        rptr    <= rptr + 1'b1;
        rgray_r <= bin2gray(rptr + 1'b1);
      end
    end
  end

endmodule
