// tb_fmp_input_reg: self-checking test of the input register.
// Random writes from the target and the host (sometimes both in one cycle,
// when the target must win) are mirrored in a shadow copy; both read ports
// are compared with it every cycle, and the reset value must be 0.
module tb_fmp_input_reg;
  import fmp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       tgt_we = 0, cpu_we = 0;
  logic [2:0] tgt_addr = 0, cpu_addr = 0, fz_addr = 0;
  logic [7:0] tgt_data = 0, cpu_wdata = 0, cpu_rdata, fz_x;
  logic [7:0] shadow [N_IN];

  fmp_input_reg dut (.clk, .rst_n, .tgt_we, .tgt_addr, .tgt_data, .cpu_we, .cpu_addr,
                     .cpu_wdata, .cpu_rdata, .fz_addr, .fz_x);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N_IN; i++) shadow[i] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      checks += 2;
      if (cpu_rdata !== shadow[cpu_addr]) begin failures++; $display("FAIL cpu rd"); end
      if (fz_x !== shadow[fz_addr]) begin failures++; $display("FAIL fz rd"); end
      tgt_we = $urandom_range(0, 2) == 0; tgt_addr = 3'($urandom); tgt_data = 8'($urandom);
      cpu_we = $urandom_range(0, 2) == 0; cpu_addr = 3'($urandom); cpu_wdata = 8'($urandom);
      if (k % 50 == 7) begin cpu_addr = tgt_addr; tgt_we = 1; cpu_we = 1; end
      fz_addr = 3'($urandom);
      if (tgt_we) shadow[tgt_addr] = tgt_data;
      else if (cpu_we) shadow[cpu_addr] = cpu_wdata;
      @(posedge clk);
      #1 tgt_we = 0; cpu_we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
