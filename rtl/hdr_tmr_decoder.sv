// hdr_tmr_decoder: triple-redundancy frame header decoder.
//
// The transmitter sends every 64-bit header (48 bits of fields and their
// CRC-16) three times. This block takes the three received copies at once
// and decides in a single clock: four branches run in parallel, one CRC
// check on each copy and one CRC check on the bitwise 2-of-3 majority vote
// of the three copies. The header is accepted if any branch confirms it;
// the voted header is preferred, then copy 0, 1 and 2. The vote repairs
// headers whose copies are each damaged in different bits, the single-copy
// branches repair headers where two copies are hit in the same bit.
//
// Interface: in_valid with the three copies; one clock later out_valid,
// out_ok (some branch confirmed), out_fields (the accepted fields) and
// out_branch (bit 0: vote, bits 1..3: copy 0..2, the confirming branches).
//
// The three copies, the per-copy CRC checks, the voter and the rule "any of
// four branches" follow the design description; the CRC polynomial, the
// header layout and the branch priority are this design's own choices.
module hdr_tmr_decoder
  import rs_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  hdr_t        in_copy [3],
  output logic        out_valid,
  output logic        out_ok,
  output hdr_fields_t out_fields,
  output logic [3:0]  out_branch
);

  hdr_t voted;
  logic [3:0] pass;
  hdr_fields_t sel;

  always_comb begin
    voted = (in_copy[0] & in_copy[1]) | (in_copy[0] & in_copy[2]) | (in_copy[1] & in_copy[2]);
    pass[0] = (crc16(voted.f) == voted.crc);
    for (int i = 0; i < 3; i++) pass[i+1] = (crc16(in_copy[i].f) == in_copy[i].crc);
    if (pass[0])      sel = voted.f;
    else if (pass[1]) sel = in_copy[0].f;
    else if (pass[2]) sel = in_copy[1].f;
    else              sel = in_copy[2].f;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_ok     <= 1'b0;
      out_fields <= '0;
      out_branch <= '0;
    end else begin
      out_valid  <= in_valid;
      out_ok     <= in_valid && (pass != 4'b0000);
      out_fields <= sel;
      out_branch <= in_valid ? pass : 4'b0000;
    end
  end

endmodule
