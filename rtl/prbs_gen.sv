// prbs_gen: test-frame generator for lanes without a user data source.
//
// Produces an endless stream of 64-bit words from the PRBS-31 sequence
// (x^31 + x^28 + 1), 64 sequence bits per word, whenever enabled and the
// lane accepts (valid/ready). Paired with prbs_chk on the far side it lets
// a lane carry full-rate traffic whose delivery can be verified word by word.
//
// That lanes without a software-processor connection are fed by frame
// generators inside the FPGA follows the design description; the PRBS
// polynomial and the word format are this design's own.
module prbs_gen
  import rs_pkg::*;
#(
  parameter logic [30:0] SEED = 31'h7FFF_FFFF
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  output logic              valid,
  input  logic              ready,
  output logic [LANE_W-1:0] data
);

  logic [30:0] state;

  // advance the PRBS-31 register by 64 bits; the word holds the new bits
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

  logic [30:0] nxt_state;
  assign {nxt_state, data} = step64(state);
  assign valid = en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= SEED;
    else if (en && ready) state <= nxt_state;
  end

endmodule
