// fmp_cpu_if: host CPU interface bus.
//
// The host sees the chip as 2 KiB of byte-wide locations on D0-7 / A0-10
// with active-low /CS, /RE and /WE (an 80- or 68-series style bus). The
// strobes are sampled on the system clock; the falling edge of /WE (with
// /CS low) yields a one-cycle write strobe for the region the sampled
// address falls in, with the sampled address and data. Reads are
// combinational: while /CS and /RE are low, dout carries the location
// addressed and doe is high (the pad driver is outside this module).
// Address map: 000-1FF if-part memory, 200-3FF rule memory, 400-47F weight
// memory (read only), 480-49F then-part memory, 4A0-4A7 inputs, 4A8-4AB
// outputs (read only), 4B0 control/status. Other addresses read 0.
// The pins follow the block diagram; the map and the strobe timing are
// this design's choices. The host must hold address and data for at least
// two clock cycles after lowering /WE. Assertions check that a strobe lasts
// one cycle and selects at most one region.
module fmp_cpu_if
  import fmp_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           cs_n,
  input  logic           re_n,
  input  logic           we_n,
  input  logic [AW-1:0]  addr,
  input  logic [W-1:0]   din,
  output logic [W-1:0]   dout,
  output logic           doe,
  // write side
  output logic [AW-1:0]  waddr,
  output logic [W-1:0]   wdata,
  output logic           mf_we,
  output logic           rule_we,
  output logic           then_we,
  output logic           in_we,
  output logic           ctrl_we,
  // read side: data of the location at addr
  input  logic [W-1:0]   mf_rd,
  input  logic [W-1:0]   rule_rd,
  input  logic [W-1:0]   weight_rd,
  input  logic [W-1:0]   then_rd,
  input  logic [W-1:0]   in_rd,
  input  logic [W-1:0]   out_rd,
  input  logic [W-1:0]   status_rd
);

  typedef enum logic [2:0] {
    R_MF, R_RULE, R_WEIGHT, R_THEN, R_IN, R_OUT, R_CTRL, R_NONE
  } region_e;

  function automatic region_e decode(input logic [AW-1:0] a);
    if      (a < A_RULE)                 return R_MF;
    else if (a < A_WEIGHT)               return R_RULE;
    else if (a < A_THEN)                 return R_WEIGHT;
    else if (a < A_INPUT)                return (a < A_THEN + 11'd32) ? R_THEN : R_NONE;
    else if (a < A_OUTPUT)               return R_IN;
    else if (a < A_OUTPUT + 11'd4)       return R_OUT;
    else if (a == A_CTRL)                return R_CTRL;
    else                                 return R_NONE;
  endfunction

  logic    wr_act_q, wr_act_qq;
  region_e wreg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_act_q <= 1'b0; wr_act_qq <= 1'b0; waddr <= '0; wdata <= '0;
    end else begin
      wr_act_q  <= !cs_n && !we_n;
      wr_act_qq <= wr_act_q;
      waddr     <= addr;
      wdata     <= din;
    end
  end

  logic wr;
  assign wr      = wr_act_q && !wr_act_qq;
  assign wreg    = decode(waddr);
  assign mf_we   = wr && (wreg == R_MF);
  assign rule_we = wr && (wreg == R_RULE);
  assign then_we = wr && (wreg == R_THEN);
  assign in_we   = wr && (wreg == R_IN);
  assign ctrl_we = wr && (wreg == R_CTRL);

  // at most one region is written per strobe, and only on a /WE edge
  a_one_region: assert property (@(posedge clk) disable iff (!rst_n)
      $countones({mf_we, rule_we, then_we, in_we, ctrl_we}) <= 1);
  a_single_strobe: assert property (@(posedge clk) disable iff (!rst_n)
      wr |=> !wr);

  assign doe = !cs_n && !re_n;
  always_comb begin
    case (decode(addr))
      R_MF:     dout = mf_rd;
      R_RULE:   dout = rule_rd;
      R_WEIGHT: dout = weight_rd;
      R_THEN:   dout = then_rd;
      R_IN:     dout = in_rd;
      R_OUT:    dout = out_rd;
      R_CTRL:   dout = status_rd;
      default:  dout = '0;
    endcase
  end

endmodule
