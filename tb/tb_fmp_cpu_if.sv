// tb_fmp_cpu_if: self-checking test of the host bus interface.
// Bus writes (/CS and /WE low for 3 cycles) to random addresses in every
// region must give exactly one write strobe, for the right region only,
// with the address and data of the cycle; held-low /WE must not repeat it
// and writes with /CS high or to read-only or unused addresses give none.
// Bus reads must return the data of the addressed region with doe high.
module tb_fmp_cpu_if;
  import fmp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        cs_n = 1, re_n = 1, we_n = 1;
  logic [10:0] addr = 0;
  logic [7:0]  din = 0, dout;
  logic        doe;
  logic [10:0] waddr;
  logic [7:0]  wdata;
  logic        mf_we, rule_we, then_we, in_we, ctrl_we;
  logic [7:0]  rd [7];

  fmp_cpu_if dut (.clk, .rst_n, .cs_n, .re_n, .we_n, .addr, .din, .dout, .doe,
    .waddr, .wdata, .mf_we, .rule_we, .then_we, .in_we, .ctrl_we,
    .mf_rd(rd[0]), .rule_rd(rd[1]), .weight_rd(rd[2]), .then_rd(rd[3]),
    .in_rd(rd[4]), .out_rd(rd[5]), .status_rd(rd[6]));

  // region number of an address: 0 mf 1 rule 2 weight 3 then 4 in 5 out 6 ctrl 7 none
  function automatic int region(input int a);
    if (a < 'h200) return 0;
    if (a < 'h400) return 1;
    if (a < 'h480) return 2;
    if (a < 'h4A0) return 3;
    if (a < 'h4A8) return 4;
    if (a < 'h4AC) return 5;
    if (a == 'h4B0) return 6;
    if (a < 'h4A0) return 7;
    return 7;
  endfunction

  int strobes [8];
  logic [10:0] last_a;
  logic [7:0]  last_d;
  always @(posedge clk) begin
    if (mf_we)   strobes[0]++;
    if (rule_we) strobes[1]++;
    if (then_we) strobes[3]++;
    if (in_we)   strobes[4]++;
    if (ctrl_we) strobes[6]++;
    if (mf_we | rule_we | then_we | in_we | ctrl_we) begin last_a = waddr; last_d = wdata; end
  end

  task automatic bus_write(input int a, input logic [7:0] d, input logic cs);
    for (int r = 0; r < 8; r++) strobes[r] = 0;
    @(negedge clk);
    addr = 11'(a); din = d; cs_n = !cs; we_n = 0;
    repeat (3) @(negedge clk);
    we_n = 1; cs_n = 1;
    repeat (2) @(negedge clk);
    for (int r = 0; r < 8; r++) begin
      int e;
      e = (cs && r == region(a) && r != 2 && r != 5 && r != 7) ? 1 : 0;
      checks++;
      if (strobes[r] != e) begin failures++; $display("FAIL strobe a=%0h r=%0d n=%0d", a, r, strobes[r]); end
    end
    if (cs && region(a) inside {0, 1, 3, 4, 6}) begin
      checks++;
      if (last_a !== 11'(a) || last_d !== d) begin failures++; $display("FAIL wdata"); end
    end
  endtask

  int picks [9] = '{'h000, 'h1FF, 'h200, 'h3FF, 'h400, 'h480, 'h4A0, 'h4A8, 'h4B0};

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int k = 0; k < 300; k++) begin
      int a;
      a = (k % 2 == 0) ? picks[$urandom_range(0, 8)] + $urandom_range(0, 3) : $urandom_range(0, 2047);
      bus_write(a, 8'($urandom), $urandom_range(0, 5) != 0);
      // read
      for (int r = 0; r < 7; r++) rd[r] = 8'($urandom);
      @(negedge clk);
      addr = 11'(a); cs_n = 0; re_n = 0;
      #1;
      checks += 2;
      if (!doe) begin failures++; $display("FAIL doe"); end
      if (dout !== ((region(a) == 7) ? 8'd0 : rd[region(a)])) begin
        failures++; $display("FAIL read a=%0h", a);
      end
      @(negedge clk);
      cs_n = 1; re_n = 1;
      #1;
      checks++;
      if (doe) begin failures++; $display("FAIL doe idle"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
