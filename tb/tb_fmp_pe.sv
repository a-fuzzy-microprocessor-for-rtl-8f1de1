// tb_fmp_pe: self-checking test of one processing element.
//
// Random fuzzifier results (term, grade) for 8 inputs and random rule term
// numbers (including 0 = input unused and deliberate matches) are presented
// as the controller and rule memory would, cycle by cycle. After each
// 72-cycle period h must equal max (or saturated sum) over the 4 rules of
// the min over the 8 inputs, and the rule strengths shown during the MAX
// phase must be w_1..w_4 in order. Periods run back to back in both modes.
module tb_fmp_pe;
  import fmp_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       run = 0;
  logic [6:0] cyc = 0;
  method_e    method = MIN_MAX;
  fz_res_t    fz_odd, fz_even;
  logic [3:0] n;
  logic [7:0] h, w_val;
  logic       w_valid;
  logic [1:0] w_rule;

  fz_res_t    fo [N_IN], fe [N_IN];
  logic [3:0] rn [N_RULE][N_IN];

  fmp_pe dut (.clk, .rst_n, .run, .cyc, .method, .fz_odd, .fz_even, .n,
              .h, .w_valid, .w_rule, .w_val);

  assign fz_odd  = fo[cyc[5:3]];
  assign fz_even = fe[cyc[5:3]];
  assign n       = rn[cyc[2:1]][cyc[5:3]];

  function automatic int grade(input int r, input int i);
    int nn = rn[r][i];
    if (nn == 0) return 255;
    if (nn % 2 == 1) return (fo[i].m == 4'(nn)) ? int'(fo[i].g) : 0;
    return (fe[i].m == 4'(nn)) ? int'(fe[i].g) : 0;
  endfunction

  int exp_w [N_RULE];
  int exp_h;
  int wseen;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int p = 0; p < 400; p++) begin
      // stimulus for this period
      for (int i = 0; i < N_IN; i++) begin
        fo[i].m = 4'(2 * $urandom_range(0, 3) + 1);
        fe[i].m = 4'(2 * $urandom_range(0, 3) + 2);
        fo[i].g = ($urandom_range(0, 3) == 0) ? 8'd255 : 8'($urandom);
        fe[i].g = 8'($urandom);
        for (int r = 0; r < N_RULE; r++) begin
          int s;
          s = $urandom_range(0, 4);
          if (s == 0)      rn[r][i] = 0;
          else if (s == 1) rn[r][i] = fo[i].m;
          else if (s == 2) rn[r][i] = fe[i].m;
          else             rn[r][i] = 4'($urandom_range(1, 8));
        end
      end
      method = (p % 3 == 2) ? MIN_SUM : MIN_MAX;
      exp_h = 0;
      for (int r = 0; r < N_RULE; r++) begin
        exp_w[r] = 255;
        for (int i = 0; i < N_IN; i++) if (grade(r, i) < exp_w[r]) exp_w[r] = grade(r, i);
        if (method == MIN_SUM) exp_h = (exp_h + exp_w[r] > 255) ? 255 : exp_h + exp_w[r];
        else if (exp_w[r] > exp_h) exp_h = exp_w[r];
      end
      wseen = 0;
      for (int c = 0; c < PE_CYC; c++) begin
        run <= 1; cyc <= 7'(c);
        @(negedge clk);
        if (w_valid) begin
          checks++;
          if (int'(w_rule) != wseen || int'(w_val) != exp_w[wseen]) begin
            failures++;
            $display("FAIL p%0d w%0d got %0d exp %0d", p, wseen, w_val, exp_w[wseen]);
          end
          wseen++;
        end
        @(posedge clk);
      end
      // h is final once the 72 cycles are over
      #1;
      checks++;
      if (int'(h) != exp_h || wseen != N_RULE) begin
        failures++;
        $display("FAIL p%0d h=%0d exp %0d (w seen %0d)", p, h, exp_h, wseen);
      end
      if (p % 5 == 4) begin run <= 0; repeat (3) @(posedge clk); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
