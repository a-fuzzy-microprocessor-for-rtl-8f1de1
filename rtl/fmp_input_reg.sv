// fmp_input_reg: input register of the 8 input variables (8 x 8 bits).
//
// Written either from the target system (input signal pins, with an input
// number and a write strobe) or by the host over the CPU bus; when both
// write in the same cycle the target wins. The host can read it back and
// the fuzzifiers read the variable they are working on. Registers reset to
// 0; reads are combinational. The two sources follow the block diagram;
// the priority and reset value are this design's choices.
module fmp_input_reg
  import fmp_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          tgt_we,
  input  logic [2:0]    tgt_addr,
  input  logic [W-1:0]  tgt_data,
  input  logic          cpu_we,
  input  logic [2:0]    cpu_addr,
  input  logic [W-1:0]  cpu_wdata,
  output logic [W-1:0]  cpu_rdata,
  input  logic [2:0]    fz_addr,
  output logic [W-1:0]  fz_x
);

  logic [W-1:0] r [N_IN];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_IN; i++) r[i] <= '0;
    end else if (tgt_we) begin
      r[tgt_addr] <= tgt_data;
    end else if (cpu_we) begin
      r[cpu_addr] <= cpu_wdata;
    end
  end

  assign cpu_rdata = r[cpu_addr];
  assign fz_x      = r[fz_addr];

endmodule
