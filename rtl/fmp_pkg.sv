// fmp_pkg: sizes, types and encodings shared by the fuzzy microprocessor.
//
// The chip fuzzifies 8 input variables of 8-bit resolution, each with 8
// membership terms, runs up to 4 rule-sets of 32 rules (8 processing elements
// times 4 rules) and defuzzifies one output variable per rule-set by a
// weighted mean over 8 singleton terms. Grades are unsigned 8-bit numbers in
// which 255 stands for grade 1.0.
//
// The counts (8 inputs, 8 terms, 2 fuzzifiers, 8 PEs, 4 rules per PE,
// 4 rule-sets, 4 outputs, 8-bit data, 11-bit host address) and the cycle
// budgets (8 cycles per fuzzifier stage, 72 per rule-set) follow the
// document. The field layout of the membership parameters, the rule
// nibble coding and the host address map are this design's own choices.
package fmp_pkg;

  localparam int unsigned W        = 8;   // data resolution
  localparam int unsigned N_IN     = 8;   // input variables
  localparam int unsigned N_TERM   = 8;   // terms per input / output variable
  localparam int unsigned N_FZ     = 2;   // fuzzifiers (odd and even terms)
  localparam int unsigned N_PE     = 8;   // processing elements
  localparam int unsigned N_RULE   = 4;   // rules per PE per rule-set
  localparam int unsigned N_RSET   = 4;   // rule-sets (one per output variable)
  localparam int unsigned N_OUT    = 4;   // output variables
  localparam int unsigned STAGE_CYC = 8;  // cycles per fuzzifier stage
  localparam int unsigned PE_CYC   = 72;  // cycles per rule-set (64 MIN + 8 MAX)
  localparam int unsigned DZ_CYC   = 72;  // cycles per defuzzification (64 + 8)
  localparam int unsigned AW       = 11;  // host address A0..A10

  localparam logic [W-1:0] GRADE_ONE = 8'd255;

  // Parameters of one trapezoid term (48 bits, 8 x 8 x 48 = 3072 bits).
  // Slope = mantissa (two's complement) / 2**exponent.
  typedef struct packed {
    logic [7:0] a;       // foot of the rising edge
    logic [7:0] b;       // start of the falling edge
    logic [7:0] mu_m;    // rising slope mantissa
    logic [7:0] mu_e;    // rising slope exponent, bits [2:0] used
    logic [7:0] beta_m;  // falling slope mantissa
    logic [7:0] beta_e;  // falling slope exponent, bits [2:0] used
  } mf_term_t;

  // Field numbers inside a term, as seen on the host bus.
  typedef enum logic [2:0] {
    F_A = 3'd0, F_B = 3'd1, F_MU_M = 3'd2, F_MU_E = 3'd3,
    F_BETA_M = 3'd4, F_BETA_E = 3'd5
  } mf_field_e;

  // Result of a fuzzifier for one input: active term (1..8) and its grade.
  typedef struct packed {
    logic [3:0] m;
    logic [7:0] g;
  } fz_res_t;

  typedef enum logic { MIN_MAX = 1'b0, MIN_SUM = 1'b1 } method_e;

  // Host address map (byte addresses on A0..A10).
  localparam logic [AW-1:0] A_MF     = 11'h000; // 512: {input, term, field}
  localparam logic [AW-1:0] A_RULE   = 11'h200; // 512: {rset, pe, rule, pair}
  localparam logic [AW-1:0] A_WEIGHT = 11'h400; // 128: {rset, pe, rule}
  localparam logic [AW-1:0] A_THEN   = 11'h480; //  32: {output, term}
  localparam logic [AW-1:0] A_INPUT  = 11'h4A0; //   8: input register
  localparam logic [AW-1:0] A_OUTPUT = 11'h4A8; //   4: output register
  localparam logic [AW-1:0] A_CTRL   = 11'h4B0; //   1: control / status

endpackage
