// fmp_then_mem: then-part membership function memory (256 bits).
//
// Output variables use singleton terms: each of the 4 outputs has 8 terms,
// each a single 8-bit position c, 4 x 8 x 8 bits. Host port: byte address
// {output[1:0], term[2:0]}, write at the clock edge, combinational read.
// The defuzzifier reads c of (output, term) combinationally.
// The capacity and the singleton form follow the document; the layout is
// this design's choice.
module fmp_then_mem
  import fmp_pkg::*;
(
  input  logic          clk,
  input  logic          we,
  input  logic [4:0]    addr,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata,
  input  logic [1:0]    dz_out,
  input  logic [2:0]    dz_term,
  output logic [W-1:0]  dz_c
);

  logic [W-1:0] mem [N_OUT][N_TERM];

  always_ff @(posedge clk) begin
    if (we) mem[addr[4:3]][addr[2:0]] <= wdata;
  end

  assign rdata = mem[addr[4:3]][addr[2:0]];
  assign dz_c  = mem[dz_out][dz_term];

endmodule
