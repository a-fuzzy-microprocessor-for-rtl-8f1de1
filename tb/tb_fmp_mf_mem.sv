// tb_fmp_mf_mem: self-checking test of the if-part membership memory.
// Fills every field of every term with random bytes over the host port,
// then checks host read-back (fields 6 and 7 read 0) and both fuzzifier
// ports, which must return whole terms, against a shadow copy.
module tb_fmp_mf_mem;
  import fmp_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       we = 0;
  logic [8:0] addr = 0;
  logic [7:0] wdata = 0, rdata;
  logic [2:0] rd_in [N_FZ], rd_term [N_FZ];
  mf_term_t   rd_q [N_FZ];
  logic [7:0] shadow [512];

  fmp_mf_mem dut (.clk, .we, .addr, .wdata, .rdata, .rd_in, .rd_term, .rd_q);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < N_FZ; f++) begin rd_in[f] = 0; rd_term[f] = 0; end
    for (int a = 0; a < 512; a++) begin
      shadow[a] = (a[2:0] < 6) ? 8'($urandom) : 8'd0;
      we <= 1; addr <= 9'(a); wdata <= shadow[a];
      @(posedge clk);
    end
    we <= 0;
    @(posedge clk);
    for (int a = 0; a < 512; a++) begin
      addr <= 9'(a);
      @(negedge clk);
      checks++;
      if (rdata !== shadow[a]) begin failures++; $display("FAIL host %0h", a); end
    end
    for (int i = 0; i < N_IN; i++)
      for (int t = 0; t < N_TERM; t++) begin
        mf_term_t e;
        int base;
        base = i * 64 + t * 8;
        e = {shadow[base], shadow[base+1], shadow[base+2], shadow[base+3], shadow[base+4], shadow[base+5]};
        rd_in[0] = 3'(i); rd_term[0] = 3'(t);
        rd_in[1] = 3'(7 - i); rd_term[1] = 3'(t);
        #1;
        checks++;
        if (rd_q[0] !== e) begin failures++; $display("FAIL port0 %0d %0d", i, t); end
        base = (7 - i) * 64 + t * 8;
        e = {shadow[base], shadow[base+1], shadow[base+2], shadow[base+3], shadow[base+4], shadow[base+5]};
        checks++;
        if (rd_q[1] !== e) begin failures++; $display("FAIL port1 %0d %0d", i, t); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
