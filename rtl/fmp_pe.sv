// fmp_pe: processing element, one MIN/MAX operator evaluating 4 rules.
//
// A rule-set period takes 72 cycles (cyc = 0..71, given by the controller):
//   cyc 0..63   MIN phase. Input i = cyc[5:3], rule r = cyc[2:1]. In the
//               first cycle of a pair the EQUAL/SELECTOR(A) pair turns the
//               fuzzifier result into G_n(x_i): the grade when the rule's
//               term number n equals the fuzzifier's active term m, else 0
//               (n = 0 means the rule ignores the input: grade 1). In the
//               second cycle the adder compares it with w_r, the head of the
//               4-stage REG(B), and the smaller value is shifted back in, so
//               REG(B) rotates once per input. For i = 0 the grade is loaded.
//   cyc 64..71  MAX phase. Four pairs of cycles fold w_1..w_4 (again taken
//               from the head of the rotating REG(B)) into REG(A):
//               h = max(w_1..w_4), or in MIN-SUM mode h = min(255, sum w).
// Odd term numbers are served by fuzzifier 1 (fz_odd), even ones by
// fuzzifier 2 (fz_even). n comes from the rule memory for (rule r, input i).
// h is final after cycle 71 and holds until cycle 65 of the next period;
// the defuzzifier reads it in cycles 0..63 of that next period. During the MAX pairs w_valid/w_rule/w_val present
// each rule strength once for the weight memory.
// The shared comparator, the 2-cycle operation, the 4-stage REG(B) and the
// 64+8 cycle budget follow the document; the n = 0 code and the saturating
// sum are this design's choices.
module fmp_pe
  import fmp_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         run,       // inside a rule-set period
  input  logic [6:0]   cyc,       // 0..71
  input  method_e      method,
  input  fz_res_t      fz_odd,    // fuzzifier 1 result for input cyc[5:3]
  input  fz_res_t      fz_even,   // fuzzifier 2 result for input cyc[5:3]
  input  logic [3:0]   n,         // rule term number for (cyc[2:1], cyc[5:3])
  output logic [W-1:0] h,
  output logic         w_valid,
  output logic [1:0]   w_rule,
  output logic [W-1:0] w_val
);

  logic [W-1:0] regb [N_RULE];    // 4-stage REG(B), regb[3] is the head
  logic [W-1:0] rega;             // REG(A)
  logic [W-1:0] opnd;             // output of SELECTOR(A), registered
  logic         min_ph, max_ph, first_in, first_rule;
  logic [W-1:0] gsel;
  fz_res_t      fz;
  logic [W-1:0] head, cmp_b, sel_b;
  logic [W:0]   diff;
  logic         c;
  logic [W:0]   sum;

  assign min_ph     = run && (cyc < 7'd64);
  assign max_ph     = run && (cyc >= 7'd64) && (cyc < 7'd72);
  assign first_in   = (cyc[5:3] == 3'd0);
  assign first_rule = (cyc[2:1] == 2'd0);
  assign head       = regb[N_RULE-1];

  // EQUAL + SELECTOR(A)
  assign fz   = n[0] ? fz_odd : fz_even;
  assign gsel = (n == 4'd0) ? GRADE_ONE : ((fz.m == n) ? fz.g : 8'd0);

  // FULL ADD with 2's complement: c = 1 when the first operand >= second
  assign cmp_b = min_ph ? head : rega;
  assign diff  = {1'b0, (min_ph ? opnd : head)} + {1'b0, ~cmp_b} + 9'd1;
  assign c     = diff[W];
  assign sum   = {1'b0, rega} + {1'b0, head};

  // SELECTOR(B)
  always_comb begin
    if (min_ph) sel_b = (first_in || !c) ? opnd : head;      // C-bar: MIN
    else        sel_b = c ? head : rega;                     // C: MAX
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < N_RULE; j++) regb[j] <= '0;
      rega <= '0;
      opnd <= '0;
    end else if (min_ph) begin
      if (!cyc[0]) opnd <= gsel;
      else begin
        for (int j = N_RULE-1; j > 0; j--) regb[j] <= regb[j-1];
        regb[0] <= sel_b;
      end
    end else if (max_ph && cyc[0]) begin
      if (first_rule)            rega <= head;
      else if (method == MIN_SUM) rega <= sum[W] ? GRADE_ONE : sum[W-1:0];
      else                       rega <= sel_b;
      for (int j = N_RULE-1; j > 0; j--) regb[j] <= regb[j-1];
      regb[0] <= head;
    end
  end

  assign h       = rega;
  assign w_valid = max_ph && cyc[0];
  assign w_rule  = cyc[2:1];
  assign w_val   = head;

endmodule
