// fmp_defuzzifier: weighted-mean defuzzifier with singleton output terms.
//
// Computes y = sum_j(h_j * c_j) / sum_j(h_j) over the 8 terms j of one
// output variable, where h_j is the strength of term j (from PE j through
// the multiplexer) and c_j its singleton position (then-part memory).
// One defuzzification takes 72 cycles after start:
//   cycles 0..63   multiply/accumulate: term j = cnt[5:3]; each cycle adds
//                  c_j shifted by bit cnt[2:0] when that bit of h_j is set
//                  (an 8-cycle shift-and-add multiply per term) and adds
//                  h_j to the denominator in the first cycle of the term;
//   cycles 64..71  restoring division, one quotient bit per cycle, MSB first.
// y_valid pulses for one cycle after cycle 71 with y (truncated quotient).
// A new start may be given in cycle 71, so back-to-back runs take 72
// cycles each.
// When all h_j are 0 the result is 0. h_sel and c_sel name the term whose
// h and c must be presented (combinationally) in the same cycle.
// The weighted mean and the 64 + 8 cycle split follow the document; the
// shift-and-add and restoring-division circuits, truncation and the result
// for an all-zero weight set are this design's choices.
module fmp_defuzzifier
  import fmp_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,    // pulse: begin a defuzzification
  output logic [2:0]    h_sel,    // term j being read
  input  logic [W-1:0]  h_j,
  input  logic [W-1:0]  c_j,
  output logic          busy,
  output logic          y_valid,
  output logic [W-1:0]  y
);

  logic [6:0]  cnt;
  logic [18:0] num;      // up to 8 * 255 * 255
  logic [10:0] den;      // up to 8 * 255
  logic [18:0] rem;
  logic [7:1]  quo;      // bit 0 goes straight to y
  logic [2:0]  qb;
  logic [18:0] dshift, trial;
  logic        ge;

  assign h_sel  = cnt[5:3];
  assign qb     = 3'd7 - cnt[2:0];
  assign dshift = {8'd0, den} << qb;
  assign ge     = (cnt == 7'd64 ? num : rem) >= dshift;
  assign trial  = (cnt == 7'd64 ? num : rem) - dshift;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; busy <= 1'b0; num <= '0; den <= '0; rem <= '0; quo <= '0;
      y_valid <= 1'b0; y <= '0;
    end else begin
      y_valid <= 1'b0;
      if (busy) begin
        cnt <= cnt + 7'd1;
        if (cnt < 7'd64) begin
          if (h_j[cnt[2:0]]) num <= num + ({11'd0, c_j} << cnt[2:0]);
          if (cnt[2:0] == 3'd0) den <= den + {3'd0, h_j};
        end else begin
          rem <= ge ? trial : (cnt == 7'd64 ? num : rem);
          if (qb != 3'd0) quo[qb] <= ge;
          if (cnt == 7'(DZ_CYC - 1)) begin
            busy    <= 1'b0;
            y_valid <= 1'b1;
            y       <= (den == '0) ? 8'd0 : {quo[7:1], ge};
          end
        end
      end
      // a new start may coincide with the last division cycle
      if (start) begin
        busy <= 1'b1; cnt <= '0; num <= '0; den <= '0; quo <= '0;
      end
    end
  end

endmodule
