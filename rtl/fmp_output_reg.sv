// fmp_output_reg: output register of the 4 deterministic output values.
//
// The defuzzifier writes output variable `dz_addr` when its result is
// ready; the host reads the values over the CPU bus and the target system
// reads them on the output signal pins, selected by its address pins.
// Registers reset to 0; reads are combinational. The two readers follow
// the block diagram; the rest is this design's choice.
module fmp_output_reg
  import fmp_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          dz_we,
  input  logic [1:0]    dz_addr,
  input  logic [W-1:0]  dz_data,
  input  logic [1:0]    cpu_addr,
  output logic [W-1:0]  cpu_rdata,
  input  logic [1:0]    tgt_addr,
  output logic [W-1:0]  tgt_data
);

  logic [W-1:0] r [N_OUT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_OUT; i++) r[i] <= '0;
    end else if (dz_we) begin
      r[dz_addr] <= dz_data;
    end
  end

  assign cpu_rdata = r[cpu_addr];
  assign tgt_data  = r[tgt_addr];

endmodule
