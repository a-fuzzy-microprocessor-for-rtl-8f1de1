// fmp_fuzzifier: one of the two fuzzifiers of the fuzzy microprocessor.
//
// Each fuzzifier serves one group of four non-overlapping terms: GROUP 0 the
// odd terms 1,3,5,7 and GROUP 1 the even terms 2,4,6,8. For an input x it
// finds the term m of its group whose range holds x and computes the grade
//     G = mu_m * (x - a_m)        for a_m <= x < b_m
//     G = 1 + beta_m * (x - b_m)  for b_m <= x
// limited to 0..1 (0..255). Slopes are floating point: an 8-bit two's
// complement mantissa divided by 2**e, e a 3-bit exponent.
//
// Three stages of 8 cycles each run as a pipeline, so a new input can enter
// every 8 cycles and its result leaves 24 cycles later:
//   stage 1  one adder with a two's complementer compares x with a and b of
//            the four terms in turn (two cycles per term, reading one term
//            per cycle from the membership memory); a counter keeps the last
//            term with a <= x, together with x-a, x-b and its slopes;
//   stage 2  an 8x8 shift-and-add multiplier forms |slope| * (x-a or x-b),
//            one multiplier bit per cycle, 16-bit product;
//   stage 3  the floating point shifter shifts the product right by the
//            exponent, one bit per cycle, then the limiter caps it at 255 and
//            the selector picks L, 255-L, 0 or 255 from the region and the
//            slope sign.
// Timing: in_valid/in_idx/x are sampled at slot 0 (slot is the controller's
// 3-bit cycle count within the 8-cycle stage); x must stay stable for the
// 8 cycles of stage 1. res_valid pulses for one cycle, at slot 0 of the
// third slot after entry, with res_idx and res (term, grade).
// The stage structure, the cycle counts, the 16-bit multiplier and the
// limiter follow the document. The exponent meaning (right shift), the
// complement 255-L for the falling edge and the result 0 for an x below the
// first term of the group are this design's choices.
module fmp_fuzzifier
  import fmp_pkg::*;
#(
  parameter bit GROUP = 1'b0   // 0: terms 1,3,5,7   1: terms 2,4,6,8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [2:0]      slot,      // cycle within the 8-cycle stage
  input  logic            in_valid,  // an input enters stage 1 (at slot 0)
  input  logic [2:0]      in_idx,    // its input number
  input  logic [W-1:0]    x,         // its value
  // membership memory read port: one term per cycle
  output logic [2:0]      mf_in,
  output logic [2:0]      mf_term,   // 0-based term number
  input  mf_term_t        mf_q,
  // result
  output logic            res_valid,
  output logic [2:0]      res_idx,
  output fz_res_t         res
);

  // ---------------- stage 1: compare and count ----------------
  logic            s1_valid;
  logic [2:0]      s1_idx;
  logic [W-1:0]    s1_x;
  logic            s1_hit, s1_geb, s1_lasthit;
  logic [3:0]      s1_m;
  logic [W-1:0]    s1_da, s1_db;
  logic [7:0]      s1_mu_m, s1_beta_m;
  logic [2:0]      s1_mu_e, s1_beta_e;

  logic [1:0]      k;         // term within the group
  logic [W-1:0]    xc;        // x as seen this cycle
  logic [W-1:0]    opnd;      // a or b
  logic [W:0]      sum;       // full adder with carry out
  logic            carry;     // 1: x >= operand

  assign k       = slot[2:1];
  assign mf_in   = (slot == 3'd0) ? in_idx : s1_idx;
  assign mf_term = {k, GROUP};
  assign xc      = (slot == 3'd0) ? x : s1_x;
  assign opnd    = slot[0] ? mf_q.b : mf_q.a;
  assign sum     = {1'b0, xc} + {1'b0, ~opnd} + 9'd1;   // x + 2's complement
  assign carry   = sum[W];

  // next values of the stage-1 registers
  logic            n_hit, n_geb, n_lasthit;
  logic [3:0]      n_m;
  logic [W-1:0]    n_da, n_db;
  logic [7:0]      n_mu_m, n_beta_m;
  logic [2:0]      n_mu_e, n_beta_e;

  always_comb begin
    if (slot == 3'd0) begin
      n_hit = 1'b0; n_geb = 1'b0; n_m = {3'd0, GROUP} + 4'd1;
      n_da = '0; n_db = '0;
      n_mu_m = '0; n_beta_m = '0; n_mu_e = '0; n_beta_e = '0;
    end else begin
      n_hit = s1_hit; n_geb = s1_geb; n_m = s1_m;
      n_da = s1_da; n_db = s1_db;
      n_mu_m = s1_mu_m; n_beta_m = s1_beta_m; n_mu_e = s1_mu_e; n_beta_e = s1_beta_e;
    end
    n_lasthit = 1'b0;
    if (!slot[0]) begin
      // compare with a: the counter advances while x >= a
      if (carry) begin
        n_hit = 1'b1; n_lasthit = 1'b1;
        n_m   = {1'b0, k, GROUP} + 4'd1;
        n_da  = sum[W-1:0];
        n_geb = 1'b0;
        n_mu_m = mf_q.mu_m;     n_mu_e = mf_q.mu_e[2:0];
        n_beta_m = mf_q.beta_m; n_beta_e = mf_q.beta_e[2:0];
      end
    end else if (s1_lasthit) begin
      // compare with b of the term just taken
      n_db  = sum[W-1:0];
      n_geb = carry;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0; s1_idx <= '0; s1_x <= '0;
      s1_hit <= 1'b0; s1_geb <= 1'b0; s1_lasthit <= 1'b0; s1_m <= '0;
      s1_da <= '0; s1_db <= '0;
      s1_mu_m <= '0; s1_beta_m <= '0; s1_mu_e <= '0; s1_beta_e <= '0;
    end else begin
      if (slot == 3'd0) begin
        s1_valid <= in_valid; s1_idx <= in_idx; s1_x <= x;
      end
      s1_hit <= n_hit; s1_geb <= n_geb; s1_lasthit <= n_lasthit; s1_m <= n_m;
      s1_da <= n_da; s1_db <= n_db;
      s1_mu_m <= n_mu_m; s1_beta_m <= n_beta_m; s1_mu_e <= n_mu_e; s1_beta_e <= n_beta_e;
    end
  end

  // ---------------- stage 2: shift-and-add multiplier ----------------
  logic            s2_valid, s2_hit, s2_geb, s2_neg;
  logic [2:0]      s2_idx, s2_e;
  logic [3:0]      s2_m;
  logic [W-1:0]    s2_d, s2_mag;
  logic [15:0]     s2_p, n_p;

  // ABS of the selected slope mantissa; its sign goes on to the selector
  logic [7:0]      sel_slope;
  logic [7:0]      abs_slope;
  assign sel_slope = n_geb ? n_beta_m : n_mu_m;
  assign abs_slope = sel_slope[7] ? (~sel_slope + 8'd1) : sel_slope;

  assign n_p = s2_p + (s2_d[slot] ? ({8'd0, s2_mag} << slot) : 16'd0);

  // ---------------- stage 3: floating point shifter, limiter, selector ----
  logic            s3_valid, s3_hit, s3_geb, s3_neg;
  logic [2:0]      s3_idx, s3_e;
  logic [3:0]      s3_m;
  logic [15:0]     s3_q, n_q;
  logic [W-1:0]    lim, g_out;

  assign n_q = (slot < s3_e) ? (s3_q >> 1) : s3_q;
  assign lim = (n_q > 16'd255) ? 8'd255 : n_q[7:0];

  always_comb begin
    if (!s3_hit)      g_out = 8'd0;
    else if (!s3_geb) g_out = s3_neg ? 8'd0 : lim;               // mu * (x - a)
    else              g_out = s3_neg ? (GRADE_ONE - lim) : GRADE_ONE; // 1 + beta * (x - b)
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_valid <= 1'b0; s2_hit <= 1'b0; s2_geb <= 1'b0; s2_neg <= 1'b0;
      s2_idx <= '0; s2_e <= '0; s2_m <= '0; s2_d <= '0; s2_mag <= '0; s2_p <= '0;
      s3_valid <= 1'b0; s3_hit <= 1'b0; s3_geb <= 1'b0; s3_neg <= 1'b0;
      s3_idx <= '0; s3_e <= '0; s3_m <= '0; s3_q <= '0;
      res_valid <= 1'b0; res_idx <= '0; res <= '0;
    end else begin
      res_valid <= 1'b0;
      s2_p <= n_p;
      s3_q <= n_q;
      if (slot == 3'd7) begin
        // stage 1 -> stage 2
        s2_valid <= s1_valid; s2_idx <= s1_idx;
        s2_hit <= n_hit; s2_geb <= n_geb; s2_m <= n_m;
        s2_d   <= n_geb ? n_db : n_da;
        s2_mag <= abs_slope;
        s2_neg <= sel_slope[7];
        s2_e   <= n_geb ? n_beta_e : n_mu_e;
        s2_p   <= '0;
        // stage 2 -> stage 3
        s3_valid <= s2_valid; s3_idx <= s2_idx;
        s3_hit <= s2_hit; s3_geb <= s2_geb; s3_neg <= s2_neg;
        s3_e <= s2_e; s3_m <= s2_m; s3_q <= n_p;
        // stage 3 -> result
        res_valid <= s3_valid;
        res_idx   <= s3_idx;
        res.m     <= s3_m;
        res.g     <= g_out;
      end
    end
  end

endmodule
