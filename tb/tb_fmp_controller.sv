// tb_fmp_controller: self-checking test of the system controller.
// For 1 to 4 rule-sets and both methods, started by the host or by the
// target, it checks: the fuzzifier slot count and the 8 input entries at
// t = 0, 8, ..., 56; the PE periods (72 cycles each, starting at t = 25,
// rule-set number and cycle count); one defuzzifier start at the end of
// each PE period, for the right output; the method; the total time to
// done, 25 + 72 (R + 1) + 1 cycles; and that a start while busy is ignored.
// A simple model of the defuzzifier answers 72 cycles after each start.
module tb_fmp_controller;
  import fmp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       ctrl_we = 0, tgt_start = 0, dz_y_valid = 0;
  logic [7:0] ctrl_wdata = 0, status;
  method_e    method;
  logic       busy, done, fz_valid, pe_run, dz_start;
  logic [2:0] fz_slot, fz_idx;
  logic [6:0] pe_cyc;
  logic [1:0] pe_rset, dz_out, out_idx;
  int         ynum;

  fmp_controller dut (.clk, .rst_n, .ctrl_we, .ctrl_wdata, .tgt_start, .dz_y_valid,
    .status, .method, .busy, .done, .fz_slot, .fz_valid, .fz_idx,
    .pe_run, .pe_cyc, .pe_rset, .dz_start, .dz_out, .out_idx);

  // defuzzifier model: y_valid 73 cycles after each start pulse
  longint now = 0;
  longint due [$];
  always @(posedge clk) begin
    now <= now + 1;
    if (dz_start) due.push_back(now + 72);
    dz_y_valid <= 0;
    if (dz_y_valid) begin
      checks++;
      if (int'(out_idx) != ynum) begin failures++; $display("FAIL out_idx"); end
      ynum <= ynum + 1;
    end
    if (due.size() > 0 && due[0] == now) begin
      dz_y_valid <= 1;
      void'(due.pop_front());
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(input int R, input bit sum, input bit by_target);
    int t, dzn, fzn;
    @(negedge clk);
    if (by_target) tgt_start = 1;
    else begin ctrl_we = 1; ctrl_wdata = {4'b0, sum, 2'(R - 1), 1'b1}; end
    @(negedge clk);
    tgt_start = 0; ctrl_we = 0;
    t = 0; dzn = 0; fzn = 0; ynum = 0;
    while (!done && t < 1000) begin
      check(busy, "busy");
      check(fz_slot == 3'(t % 8), $sformatf("slot t=%0d R=%0d got %0d", t, R, fz_slot));
      if (fz_valid && fz_slot == 0) begin
        check(t < 64 && fz_idx == 3'(t / 8), "fz entry");
        fzn++;
      end
      check(pe_run == (t >= 25 && t < 25 + 72 * R), "pe_run");
      if (pe_run) begin
        check(pe_cyc == 7'((t - 25) % 72), "pe_cyc");
        check(pe_rset == 2'((t - 25) / 72), "pe_rset");
      end
      if (dzn > 0 && t == 25 + 72 * dzn) check(dz_out == 2'(dzn - 1), "dz_out");
      if (dz_start) begin
        check(t == 25 + 72 * dzn + 71, "dz start time");
        dzn++;
      end
      if (t == 30) begin
        // a start while busy must be ignored
        ctrl_we = 1; ctrl_wdata = 8'h07;
      end else ctrl_we = 0;
      @(negedge clk);
      t++;
    end
    check(fzn == 8, "8 fuzzifier entries");
    check(dzn == R, "defuzzifier starts");
    check(t == 25 + 72 * (R + 1) + 1, $sformatf("total %0d cycles for R=%0d", t, R));
    check(method == (sum ? MIN_SUM : MIN_MAX), "method");
    check(status == {1'b0, 1'b1, 2'b00, sum, 2'(R - 1), 1'b0}, "status");
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int R = 1; R <= 4; R++) run(R, R % 2 == 0, 0);
    run(4, 0, 0);
    run(4, 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
