// tb_fmp_then_mem: self-checking test of the then-part memory.
// Writes all 32 singleton positions, then checks the host read-back and
// the defuzzifier port for every (output, term).
module tb_fmp_then_mem;
  import fmp_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       we = 0;
  logic [4:0] addr = 0;
  logic [7:0] wdata = 0, rdata, dz_c;
  logic [1:0] dz_out = 0;
  logic [2:0] dz_term = 0;
  logic [7:0] shadow [32];

  fmp_then_mem dut (.clk, .we, .addr, .wdata, .rdata, .dz_out, .dz_term, .dz_c);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int round = 0; round < 3; round++) begin
      for (int a = 0; a < 32; a++) begin
        shadow[a] = 8'($urandom);
        we <= 1; addr <= 5'(a); wdata <= shadow[a];
        @(posedge clk);
      end
      we <= 0;
      for (int a = 0; a < 32; a++) begin
        logic [1:0] o;
        logic [2:0] t;
        o = 2'($urandom); t = 3'($urandom);
        addr <= 5'(a); dz_out <= o; dz_term <= t;
        @(negedge clk);
        checks += 2;
        if (rdata !== shadow[a]) begin failures++; $display("FAIL host %0d", a); end
        if (dz_c !== shadow[{o, t}]) begin failures++; $display("FAIL dz %0d", a); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
