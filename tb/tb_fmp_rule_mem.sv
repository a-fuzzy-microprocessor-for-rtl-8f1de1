// tb_fmp_rule_mem: self-checking test of the rule memory.
// Writes random nibble pairs to all 512 host bytes, reads them back, and
// checks that the PE port returns, for every (rule-set, rule, input), the
// term numbers of all 8 PEs from the right nibbles.
module tb_fmp_rule_mem;
  import fmp_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       we = 0;
  logic [8:0] addr = 0;
  logic [7:0] wdata = 0, rdata;
  logic [1:0] pe_rset = 0, pe_rule = 0;
  logic [2:0] pe_in = 0;
  logic [3:0] pe_n [N_PE];
  logic [7:0] shadow [512];

  fmp_rule_mem dut (.clk, .we, .addr, .wdata, .rdata, .pe_rset, .pe_rule, .pe_in, .pe_n);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 512; a++) begin
      shadow[a] = 8'($urandom);
      we <= 1; addr <= 9'(a); wdata <= shadow[a];
      @(posedge clk);
    end
    we <= 0;
    for (int a = 0; a < 512; a++) begin
      addr <= 9'(a);
      @(negedge clk);
      checks++;
      if (rdata !== shadow[a]) begin failures++; $display("FAIL host %0h", a); end
    end
    for (int s = 0; s < N_RSET; s++)
      for (int r = 0; r < N_RULE; r++)
        for (int i = 0; i < N_IN; i++) begin
          pe_rset = 2'(s); pe_rule = 2'(r); pe_in = 3'(i);
          #1;
          for (int p = 0; p < N_PE; p++) begin
            logic [7:0] b;
            logic [3:0] e;
            b = shadow[s * 128 + p * 16 + r * 4 + i / 2];
            e = (i % 2 == 1) ? b[7:4] : b[3:0];
            checks++;
            if (pe_n[p] !== e) begin failures++; $display("FAIL pe s%0d p%0d r%0d i%0d", s, p, r, i); end
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
