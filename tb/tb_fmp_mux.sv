// tb_fmp_mux: self-checking test of the PE multiplexer.
// Random h values for 8 PEs must come out on h_out for every select value;
// the weight-memory write must be issued, with all 8 PE strengths, only
// when every PE presents a strength for the same rule.
module tb_fmp_mux;
  import fmp_pkg::*;
  int checks = 0, failures = 0;

  logic [7:0] h [N_PE];
  logic [2:0] sel;
  logic [7:0] h_out;
  logic       w_valid [N_PE];
  logic [1:0] w_rule [N_PE];
  logic [7:0] w_val [N_PE];
  logic       wm_we;
  logic [1:0] wm_rule;
  logic [7:0] wm_data [N_PE];

  fmp_mux dut (.h, .sel, .h_out, .w_valid, .w_rule, .w_val, .wm_we, .wm_rule, .wm_data);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 300; k++) begin
      logic ew;
      logic [1:0] r;
      r = 2'($urandom);
      ew = 1;
      for (int p = 0; p < N_PE; p++) begin
        h[p] = 8'($urandom);
        w_val[p] = 8'($urandom);
        w_valid[p] = (k % 4 == 1) ? ($urandom_range(0, 7) != 0) : 1'b1;
        w_rule[p] = (k % 4 == 2 && p == 5) ? r + 2'd1 : r;
        if (!w_valid[p] || w_rule[p] != r) ew = 0;
      end
      sel = 3'($urandom);
      #1;
      checks += 2;
      if (h_out !== h[sel]) begin failures++; $display("FAIL h sel %0d", sel); end
      if (wm_we !== ew) begin failures++; $display("FAIL we %0d", k); end
      if (ew) begin
        checks++;
        if (wm_rule !== r) failures++;
        for (int p = 0; p < N_PE; p++) begin
          checks++;
          if (wm_data[p] !== w_val[p]) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
