// fmp_mux: the multiplexer between the 8 PEs, the defuzzifier and the
// weight memory.
//
// Towards the defuzzifier it selects the strength h of PE `sel` (PE j
// evaluates the rules of output term j). Towards the weight memory it
// gathers the rule strengths the PEs present during their MAX phase into
// one 8-byte write for (rset, rule); the write is issued only when all PEs
// present the same rule, which they do as they run in lockstep.
// Purely combinational. That the multiplexer feeds both the defuzzifier and
// the weight memory follows the block diagram; the rest is this design's
// choice.
module fmp_mux
  import fmp_pkg::*;
(
  input  logic [W-1:0]  h      [N_PE],
  input  logic [2:0]    sel,
  output logic [W-1:0]  h_out,
  input  logic          w_valid [N_PE],
  input  logic [1:0]    w_rule  [N_PE],
  input  logic [W-1:0]  w_val   [N_PE],
  output logic          wm_we,
  output logic [1:0]    wm_rule,
  output logic [W-1:0]  wm_data [N_PE]
);

  assign h_out = h[sel];

  always_comb begin
    wm_we   = 1'b1;
    wm_rule = w_rule[0];
    for (int p = 0; p < N_PE; p++) begin
      wm_data[p] = w_val[p];
      if (!w_valid[p] || w_rule[p] != w_rule[0]) wm_we = 1'b0;
    end
  end

endmodule
