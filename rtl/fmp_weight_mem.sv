// fmp_weight_mem: weight memory (1024 bits).
//
// Keeps the strength w of every rule of the last inference, 128 x 8 bits,
// so that the host can inspect how strongly each rule fired when it
// evaluates its rule base. Inference side: one write of 8 bytes per cycle,
// the strengths of rule `rule` of all 8 PEs in rule-set `rset`. Host side:
// read-only, byte address {rset[1:0], pe[2:0], rule[1:0]}, combinational.
// The capacity and purpose follow the document; that the stored "weights"
// are the rule strengths written by the inference, and the port layout,
// are this design's reading and choices.
module fmp_weight_mem
  import fmp_pkg::*;
(
  input  logic          clk,
  input  logic          we,
  input  logic [1:0]    rset,
  input  logic [1:0]    rule,
  input  logic [W-1:0]  wdata [N_PE],
  input  logic [6:0]    addr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [N_RSET][N_PE][N_RULE];

  always_ff @(posedge clk) begin
    if (we) begin
      for (int p = 0; p < N_PE; p++) mem[rset][p][rule] <= wdata[p];
    end
  end

  assign rdata = mem[addr[6:5]][addr[4:2]][addr[1:0]];

endmodule
