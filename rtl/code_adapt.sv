// code_adapt: adaptive choice of the Reed-Solomon code for a lane (the
// adaptive part of the hybrid ARQ).
//
// The receiver watches every decoded data frame: whether all of its
// codewords were decodable and the largest number of symbol errors
// corrected in one codeword. From that it keeps a requested error-correction
// capability req_t in 1..9 (RS(255,253) .. RS(255,237)), which travels back
// to the far transmitter in the headers:
//   * a frame that could not be decoded: jump to the strongest code, t = 9;
//   * a frame that used up the whole margin (max errors >= t - MARGIN):
//     one step stronger;
//   * DOWN_FRAMES frames in a row, coded with the requested t, that would
//     still keep a spare symbol with one parity pair less
//     (max errors <= t - 2 - MARGIN): one step weaker.
// So the coding shrinks on a clean link and grows on a noisy one.
//
// Interface: one-clock frame_valid with frame_ok, frame_t (the t the frame
// was coded with) and frame_max_err. req_t is registered and changes one
// clock after a frame report.
//
// That the code is adapted between RS(255,253) and RS(255,237) depending on
// the link quality follows the design description; the decision rule is
// this design's own, since the description does not give the algorithm.
module code_adapt
  import rs_pkg::*;
#(
  parameter int DOWN_FRAMES = 8,
  parameter int MARGIN      = 0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       frame_valid,
  input  logic       frame_ok,
  input  tsel_t      frame_t,
  input  logic [7:0] frame_max_err,
  output tsel_t      req_t,
  output logic       step_up,     // one-clock pulse: stronger code requested
  output logic       step_down    // one-clock pulse: weaker code requested
);

  logic [$clog2(DOWN_FRAMES+1)-1:0] good_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_t     <= tsel_t'(RS_T_MAX);
      good_cnt  <= '0;
      step_up   <= 1'b0;
      step_down <= 1'b0;
    end else begin
      step_up   <= 1'b0;
      step_down <= 1'b0;
      if (frame_valid) begin
        if (!frame_ok) begin
          good_cnt <= '0;
          if (req_t != tsel_t'(RS_T_MAX)) step_up <= 1'b1;
          req_t <= tsel_t'(RS_T_MAX);
        end else if (int'(frame_max_err) + MARGIN >= int'(frame_t)) begin
          good_cnt <= '0;
          if (req_t < tsel_t'(RS_T_MAX) && frame_t >= req_t) begin
            req_t   <= req_t + 1'b1;
            step_up <= 1'b1;
          end
        end else if (int'(frame_max_err) + MARGIN + 1 <= int'(frame_t) - 1 && frame_t == req_t) begin
          if (int'(good_cnt) == DOWN_FRAMES - 1) begin
            good_cnt <= '0;
            if (req_t > tsel_t'(1)) begin
              req_t     <= req_t - 1'b1;
              step_down <= 1'b1;
            end
          end else begin
            good_cnt <= good_cnt + 1'b1;
          end
        end else begin
          good_cnt <= '0;
        end
      end
    end
  end

endmodule
