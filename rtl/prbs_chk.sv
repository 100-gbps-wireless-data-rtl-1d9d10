// prbs_chk: test-frame checker, counterpart of prbs_gen.
//
// Runs the same PRBS-31 sequence from the same seed and compares every
// received word with the word it expects next; it counts received words and
// mismatching words. The data link layer delivers every word once and in
// order, so any mismatch means a delivery error.
//
// The checking of generated test traffic follows the design's demonstrator
// setup; the counters and their widths are this design's own.
module prbs_chk
  import rs_pkg::*;
#(
  parameter logic [30:0] SEED = 31'h7FFF_FFFF
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              valid,
  input  logic [LANE_W-1:0] data,
  output logic [31:0]       words,
  output logic [31:0]       errors
);

  logic [30:0] state;

  function automatic logic [30+LANE_W:0] step64(logic [30:0] s);
    logic [LANE_W-1:0] w;
    for (int i = 0; i < LANE_W; i++) begin
      logic b;
      b = s[30] ^ s[27];
      s = {s[29:0], b};
      w[LANE_W-1-i] = b;
    end
    return {s, w};
  endfunction

  logic [30:0]       nxt_state;
  logic [LANE_W-1:0] expect_w;
  assign {nxt_state, expect_w} = step64(state);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= SEED;
      words  <= '0;
      errors <= '0;
    end else if (valid) begin
      state <= nxt_state;
      words <= words + 32'd1;
      if (data != expect_w) errors <= errors + 32'd1;
    end
  end

endmodule
