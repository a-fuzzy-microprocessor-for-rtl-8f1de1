// tb_fmp_defuzzifier: self-checking test of the weighted-mean defuzzifier.
//
// Random strengths h_j (with all-zero and single-term cases) and singleton
// positions c_j are served combinationally on the term the defuzzifier
// asks for. The result must equal floor(sum h_j c_j / sum h_j) (0 when all
// h_j are 0) and must appear exactly 72 cycles after the start cycle. A
// second part starts a new run every 72 cycles, in the last cycle of the
// previous one, and checks that no result is lost.
module tb_fmp_defuzzifier;
  import fmp_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       start = 0;
  logic [2:0] h_sel;
  logic [7:0] h_j, c_j, y;
  logic       busy, y_valid;
  logic [7:0] hv [N_TERM], cv [N_TERM];

  fmp_defuzzifier dut (.clk, .rst_n, .start, .h_sel, .h_j, .c_j, .busy, .y_valid, .y);
  assign h_j = hv[h_sel];
  assign c_j = cv[h_sel];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int k = 0; k < 500; k++) begin
      longint num, den;
      int expy, lat;
      num = 0; den = 0;
      for (int j = 0; j < N_TERM; j++) begin
        hv[j] = (k % 7 == 3) ? 8'd0 : 8'($urandom);
        if (k % 7 == 5 && j != 2) hv[j] = 0;
        if ($urandom_range(0, 3) == 0) hv[j] = 0;
        cv[j] = 8'($urandom);
        num += longint'(hv[j]) * longint'(cv[j]);
        den += longint'(hv[j]);
      end
      expy = (den == 0) ? 0 : int'(num / den);
      start <= 1;
      @(posedge clk);
      start <= 0;
      lat = 0;
      do begin @(posedge clk); #1; lat++; end while (!y_valid && lat < 200);
      checks += 2;
      if (int'(y) != expy) begin
        failures++; $display("FAIL y=%0d exp %0d", y, expy);
      end
      if (lat != DZ_CYC) begin
        failures++; $display("FAIL latency %0d", lat);
      end
    end
    // back to back: a new start every 72 cycles, in the last division
    // cycle of the previous run; each result must still arrive
    begin
      int prev;
      prev = -1;
      for (int k = 0; k < 40; k++) begin
        longint num, den;
        num = 0; den = 0;
        @(negedge clk);
        for (int j = 0; j < N_TERM; j++) begin
          hv[j] = ($urandom_range(0, 3) == 0) ? 8'd0 : 8'($urandom);
          cv[j] = 8'($urandom);
          num += longint'(hv[j]) * longint'(cv[j]);
          den += longint'(hv[j]);
        end
        start = 1;
        @(negedge clk);
        start = 0;
        if (prev >= 0) begin
          checks++;
          if (!y_valid || int'(y) != prev) begin
            failures++; $display("FAIL back-to-back y=%0d valid=%0b exp %0d", y, y_valid, prev);
          end
        end
        prev = (den == 0) ? 0 : int'(num / den);
        repeat (DZ_CYC - 2) @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
