// tb_fmp_output_reg: self-checking test of the output register.
// Random defuzzifier writes are mirrored in a shadow copy; the host and the
// target read ports are compared with it every cycle, reset value 0.
module tb_fmp_output_reg;
  import fmp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       dz_we = 0;
  logic [1:0] dz_addr = 0, cpu_addr = 0, tgt_addr = 0;
  logic [7:0] dz_data = 0, cpu_rdata, tgt_data;
  logic [7:0] shadow [N_OUT];

  fmp_output_reg dut (.clk, .rst_n, .dz_we, .dz_addr, .dz_data, .cpu_addr, .cpu_rdata,
                      .tgt_addr, .tgt_data);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N_OUT; i++) shadow[i] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int k = 0; k < 1000; k++) begin
      @(negedge clk);
      checks += 2;
      if (cpu_rdata !== shadow[cpu_addr]) begin failures++; $display("FAIL cpu rd"); end
      if (tgt_data !== shadow[tgt_addr]) begin failures++; $display("FAIL tgt rd"); end
      dz_we = $urandom_range(0, 2) == 0; dz_addr = 2'($urandom); dz_data = 8'($urandom);
      cpu_addr = 2'($urandom); tgt_addr = 2'($urandom);
      if (dz_we) shadow[dz_addr] = dz_data;
      @(posedge clk);
      #1 dz_we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
