// tb_fmp_weight_mem: self-checking test of the weight memory.
// Writes 8 bytes per cycle for every (rule-set, rule) with random data,
// sometimes with the write strobe low (those must be ignored), then reads
// all 128 bytes on the host port.
module tb_fmp_weight_mem;
  import fmp_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       we = 0;
  logic [1:0] rset = 0, rule = 0;
  logic [7:0] wdata [N_PE];
  logic [6:0] addr = 0;
  logic [7:0] rdata;
  logic [7:0] shadow [128];

  fmp_weight_mem dut (.clk, .we, .rset, .rule, .wdata, .addr, .rdata);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int round = 0; round < 4; round++) begin
      for (int s = 0; s < N_RSET; s++)
        for (int r = 0; r < N_RULE; r++) begin
          logic w;
          w = (round == 0) || ($urandom_range(0, 2) != 0);
          we <= w; rset <= 2'(s); rule <= 2'(r);
          for (int p = 0; p < N_PE; p++) begin
            logic [7:0] d;
            d = 8'($urandom);
            wdata[p] <= d;
            if (w) shadow[s * 32 + p * 4 + r] = d;
          end
          @(posedge clk);
        end
      we <= 0;
      for (int a = 0; a < 128; a++) begin
        addr <= 7'(a);
        @(negedge clk);
        checks++;
        if (rdata !== shadow[a]) begin failures++; $display("FAIL %0h", a); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
