// fmp_mf_mem: if-part membership function memory (3072 bits).
//
// Holds the six parameter bytes (a, b, mu mantissa, mu exponent, beta
// mantissa, beta exponent) of each of the 8 terms of each of the 8 input
// variables: 8 x 8 x 48 bits. The host loads it byte by byte at start-up
// through a write port addressed {input[2:0], term[2:0], field[2:0]}
// (fields 6 and 7 do not exist and read as 0) and can read it back on the
// same address. Each fuzzifier has its own read port that returns a whole
// term (48 bits) per cycle. All reads are combinational, the write takes
// effect at the clock edge. The capacity follows the document; the field
// layout and the port arrangement are this design's choices.
module fmp_mf_mem
  import fmp_pkg::*;
(
  input  logic          clk,
  // host port
  input  logic          we,
  input  logic [8:0]    addr,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata,
  // fuzzifier ports
  input  logic [2:0]    rd_in   [N_FZ],
  input  logic [2:0]    rd_term [N_FZ],
  output mf_term_t      rd_q    [N_FZ]
);

  mf_term_t mem [N_IN][N_TERM];

  logic [2:0] a_in, a_term;
  mf_field_e  a_f;
  assign a_in   = addr[8:6];
  assign a_term = addr[5:3];
  assign a_f    = mf_field_e'(addr[2:0]);

  always_ff @(posedge clk) begin
    if (we) begin
      case (a_f)
        F_A:      mem[a_in][a_term].a      <= wdata;
        F_B:      mem[a_in][a_term].b      <= wdata;
        F_MU_M:   mem[a_in][a_term].mu_m   <= wdata;
        F_MU_E:   mem[a_in][a_term].mu_e   <= wdata;
        F_BETA_M: mem[a_in][a_term].beta_m <= wdata;
        F_BETA_E: mem[a_in][a_term].beta_e <= wdata;
        default: ;
      endcase
    end
  end

  always_comb begin
    case (a_f)
      F_A:      rdata = mem[a_in][a_term].a;
      F_B:      rdata = mem[a_in][a_term].b;
      F_MU_M:   rdata = mem[a_in][a_term].mu_m;
      F_MU_E:   rdata = mem[a_in][a_term].mu_e;
      F_BETA_M: rdata = mem[a_in][a_term].beta_m;
      F_BETA_E: rdata = mem[a_in][a_term].beta_e;
      default:  rdata = '0;
    endcase
  end

  for (genvar f = 0; f < N_FZ; f++) begin : g_rd
    assign rd_q[f] = mem[rd_in[f]][rd_term[f]];
  end

endmodule
