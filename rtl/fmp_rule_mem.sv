// fmp_rule_mem: rule memory (4096 bits).
//
// For each of the 128 rules (4 rule-sets x 8 PEs x 4 rules) it holds one
// 4-bit antecedent per input variable: the term number n = 1..8 the rule
// asks for, or 0 when the rule does not use that input. 128 x 8 x 4 bits.
// Host port: byte address {rset[1:0], pe[2:0], rule[1:0], pair[1:0]}; a
// byte carries inputs 2*pair (bits 3:0) and 2*pair+1 (bits 7:4). PE port:
// for one (rset, rule, input) it returns the 8 term numbers of the 8 PEs at
// once. Reads are combinational, writes at the clock edge.
// The capacity and the role of n follow the document; the 4-bit coding with
// 0 for an unused input and the address layout are this design's choices.
module fmp_rule_mem
  import fmp_pkg::*;
(
  input  logic          clk,
  input  logic          we,
  input  logic [8:0]    addr,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata,
  input  logic [1:0]    pe_rset,
  input  logic [1:0]    pe_rule,
  input  logic [2:0]    pe_in,
  output logic [3:0]    pe_n [N_PE]
);

  logic [3:0] mem [N_RSET][N_PE][N_RULE][N_IN];

  logic [1:0] a_rset, a_rule, a_pair;
  logic [2:0] a_pe;
  assign {a_rset, a_pe, a_rule, a_pair} = addr;

  always_ff @(posedge clk) begin
    if (we) begin
      mem[a_rset][a_pe][a_rule][{a_pair, 1'b0}] <= wdata[3:0];
      mem[a_rset][a_pe][a_rule][{a_pair, 1'b1}] <= wdata[7:4];
    end
  end

  assign rdata = {mem[a_rset][a_pe][a_rule][{a_pair, 1'b1}],
                  mem[a_rset][a_pe][a_rule][{a_pair, 1'b0}]};

  for (genvar p = 0; p < N_PE; p++) begin : g_pe
    assign pe_n[p] = mem[pe_rset][p][pe_rule][pe_in];
  end

endmodule
