// tb_fmp_top: end-to-end test of the fuzzy microprocessor at full size.
//
// Acts as the host CPU: loads random but well-formed knowledge bases (8
// inputs x 8 ordered trapezoid terms, 128 rules, 32 singletons) over the
// byte bus, writes the 8 inputs (from the host or on the target pins),
// starts an inference (from the host or with tgt_start) with 1 to 4
// rule-sets and MIN-MAX or MIN-SUM, waits for done and reads back every
// output (host bus and target pins) and every rule strength in the weight
// memory. All are compared with a reference model of the inference written
// from the formulas. It also checks the time from start to done,
// 25 + 72 (R + 1) + 1 cycles (170 for 32 rules, 386 for 128), and counts
// how often each mechanism occurred: rising edge, falling edge, limiter,
// input below a group's terms, negative-slope selector, term match and
// mismatch in the PE, unused input, MIN-MAX, MIN-SUM with saturation,
// multi-rule-set overlap of PEs and defuzzifier, an output with all
// strengths 0, target-side input and start. One that never occurred is a
// failure.
module tb_fmp_top;
  import fmp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;   // 10 ns: stands in for the 50 ns system clock
  int checks = 0, failures = 0;

  logic        cs_n = 1, re_n = 1, we_n = 1;
  logic [10:0] addr = 0;
  logic [7:0]  din = 0, dout;
  logic        doe;
  logic        tgt_we = 0, tgt_start = 0;
  logic [2:0]  tgt_addr = 0;
  logic [7:0]  tgt_din = 0, tgt_dout;
  logic        busy, done;

  fmp_top dut (.clk, .rst_n, .cs_n, .re_n, .we_n, .addr, .din, .dout, .doe,
               .tgt_we, .tgt_addr, .tgt_din, .tgt_dout, .tgt_start, .busy, .done);

  // ---------------- knowledge base and reference model ----------------
  mf_term_t   mf [N_IN][N_TERM];
  logic [3:0] rules [N_RSET][N_PE][N_RULE][N_IN];
  logic [7:0] sing [N_OUT][N_TERM];
  logic [7:0] xin [N_IN];
  int         act_m [2][N_IN], act_g [2][N_IN];
  int         exp_w [N_RSET][N_PE][N_RULE];
  int         exp_y [N_OUT];

  typedef enum int {
    M_RISE, M_FALL, M_LIMIT, M_BELOW, M_NEGSEL, M_MATCH, M_MISMATCH, M_UNUSED,
    M_MINMAX, M_MINSUM_SAT, M_OVERLAP, M_ZERO_OUT, M_TGT_IN, M_TGT_START, M_NUM
  } mech_e;
  int mech [M_NUM];
  string mech_name [M_NUM] = '{"rising edge", "falling edge", "limiter", "below terms",
    "negative-slope selector", "PE term match", "PE term mismatch", "unused input",
    "MIN-MAX", "MIN-SUM saturation", "PE/defuzzifier overlap", "all-zero output",
    "target input", "target start"};

  task automatic make_kb();
    for (int i = 0; i < N_IN; i++)
      for (int f = 0; f < 2; f++) begin
        int pos;
        pos = $urandom_range(0, 30);
        for (int k = 0; k < 4; k++) begin
          mf_term_t t;
          t.a = 8'(pos);
          pos += $urandom_range(1, 28);
          t.b = 8'(pos > 255 ? 255 : pos);
          pos += $urandom_range(1, 28);
          if (pos > 255) pos = 255;
          t.mu_m   = 8'($urandom_range(0, 11) == 0 ? -$urandom_range(1, 128) : $urandom_range(1, 127));
          t.beta_m = 8'($urandom_range(0, 11) == 0 ? $urandom_range(0, 127) : -$urandom_range(1, 128));
          t.mu_e   = {5'b0, 3'($urandom_range(0, 7))};
          t.beta_e = {5'b0, 3'($urandom_range(0, 7))};
          mf[i][2*k+f] = t;
        end
      end
    for (int o = 0; o < N_OUT; o++)
      for (int j = 0; j < N_TERM; j++) sing[o][j] = 8'($urandom);
  endtask

  // grade of the active term of group f for input i (reference formula)
  task automatic fuzzify_ref();
    for (int i = 0; i < N_IN; i++)
      for (int f = 0; f < 2; f++) begin
        int m, d, mag, v, sgn, xv;
        mf_term_t t;
        xv = xin[i];
        m = -1;
        for (int k = 0; k < 4; k++) if (xv >= int'(mf[i][2*k+f].a)) m = k;
        if (m < 0) begin
          act_m[f][i] = f + 1; act_g[f][i] = 0; mech[M_BELOW]++;
          continue;
        end
        t = mf[i][2*m+f];
        act_m[f][i] = 2*m + f + 1;
        if (xv < int'(t.b)) begin
          d = xv - int'(t.a); sgn = int'($signed(t.mu_m)); mech[M_RISE]++;
          mag = (sgn < 0 ? -sgn : sgn) * d; v = mag >> t.mu_e[2:0];
          if (v > 255) begin v = 255; mech[M_LIMIT]++; end
          if (sgn < 0) mech[M_NEGSEL]++;
          act_g[f][i] = (sgn < 0) ? 0 : v;
        end else begin
          d = xv - int'(t.b); sgn = int'($signed(t.beta_m)); mech[M_FALL]++;
          mag = (sgn < 0 ? -sgn : sgn) * d; v = mag >> t.beta_e[2:0];
          if (v > 255) begin v = 255; mech[M_LIMIT]++; end
          act_g[f][i] = (sgn < 0) ? 255 - v : 255;
        end
      end
  endtask

  task automatic make_rules();
    for (int s = 0; s < N_RSET; s++)
      for (int p = 0; p < N_PE; p++)
        for (int r = 0; r < N_RULE; r++)
          for (int i = 0; i < N_IN; i++) begin
            int c;
            c = $urandom_range(0, 9);
            if (c < 4)       rules[s][p][r][i] = 0;
            else if (c < 8)  rules[s][p][r][i] = 4'(act_m[$urandom_range(0, 1)][i]);
            else             rules[s][p][r][i] = 4'($urandom_range(1, 8));
          end
    // one output whose rules can never fire
    for (int p = 0; p < N_PE; p++)
      for (int r = 0; r < N_RULE; r++) rules[3][p][r][0] = 4'(act_m[0][0] == 1 ? 3 : 1);
  endtask

  task automatic infer_ref(input int R, input bit sum);
    for (int s = 0; s < R; s++) begin
      longint num, den;
      num = 0; den = 0;
      for (int p = 0; p < N_PE; p++) begin
        int h;
        h = 0;
        for (int r = 0; r < N_RULE; r++) begin
          int w;
          w = 255;
          for (int i = 0; i < N_IN; i++) begin
            int n, g;
            n = rules[s][p][r][i];
            if (n == 0) begin g = 255; mech[M_UNUSED]++; end
            else if (act_m[(n % 2 == 1) ? 0 : 1][i] == n) begin
              g = act_g[(n % 2 == 1) ? 0 : 1][i]; mech[M_MATCH]++;
            end else begin g = 0; mech[M_MISMATCH]++; end
            if (g < w) w = g;
          end
          exp_w[s][p][r] = w;
          if (sum) begin
            if (h + w > 255) mech[M_MINSUM_SAT]++;
            h = (h + w > 255) ? 255 : h + w;
          end else if (w > h) h = w;
        end
        num += longint'(h) * longint'(sing[s][p]);
        den += longint'(h);
      end
      exp_y[s] = (den == 0) ? 0 : int'(num / den);
      if (den == 0) mech[M_ZERO_OUT]++;
    end
  endtask

  // ---------------- host bus ----------------
  task automatic bus_write(input int a, input logic [7:0] d);
    @(negedge clk);
    addr = 11'(a); din = d; cs_n = 0; we_n = 0;
    repeat (2) @(negedge clk);
    cs_n = 1; we_n = 1;
  endtask

  task automatic bus_read(input int a, output logic [7:0] d);
    @(negedge clk);
    addr = 11'(a); cs_n = 0; re_n = 0;
    #1 d = dout;
    @(negedge clk);
    cs_n = 1; re_n = 1;
  endtask

  task automatic load_kb();
    for (int i = 0; i < N_IN; i++)
      for (int t = 0; t < N_TERM; t++) begin
        int base;
        base = A_MF + i * 64 + t * 8;
        bus_write(base + 0, mf[i][t].a);
        bus_write(base + 1, mf[i][t].b);
        bus_write(base + 2, mf[i][t].mu_m);
        bus_write(base + 3, mf[i][t].mu_e);
        bus_write(base + 4, mf[i][t].beta_m);
        bus_write(base + 5, mf[i][t].beta_e);
      end
    for (int o = 0; o < N_OUT; o++)
      for (int j = 0; j < N_TERM; j++) bus_write(A_THEN + o * 8 + j, sing[o][j]);
  endtask

  task automatic load_rules();
    for (int s = 0; s < N_RSET; s++)
      for (int p = 0; p < N_PE; p++)
        for (int r = 0; r < N_RULE; r++)
          for (int q = 0; q < 4; q++)
            bus_write(A_RULE + s * 128 + p * 16 + r * 4 + q,
                      {rules[s][p][r][2*q+1], rules[s][p][r][2*q]});
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic one_inference(input int R, input bit sum, input bit via_target);
    int cyc;
    logic [7:0] v;
    // inputs
    for (int i = 0; i < N_IN; i++) begin
      if (via_target && i % 2 == 0) begin
        @(negedge clk);
        tgt_we = 1; tgt_addr = 3'(i); tgt_din = xin[i];
        @(negedge clk);
        tgt_we = 0;
        mech[M_TGT_IN]++;
      end else bus_write(A_INPUT + i, xin[i]);
    end
    // configuration, then start
    if (via_target) begin
      bus_write(A_CTRL, {4'b0, sum, 2'(R - 1), 1'b0});   // configure only
      @(negedge clk);
      check(!busy, "configure without start");
      tgt_start = 1;
      @(negedge clk);
      tgt_start = 0;
      mech[M_TGT_START]++;
    end else begin
      @(negedge clk);
      addr = A_CTRL; din = {4'b0, sum, 2'(R - 1), 1'b1}; cs_n = 0; we_n = 0;
      @(negedge clk);   // write strobe inside the interface in this cycle
      @(negedge clk);
      cs_n = 1; we_n = 1;
    end
    // count from the first busy cycle to the first done cycle
    cyc = 0;
    while (!busy && cyc < 20) begin @(negedge clk); cyc++; end
    cyc = 0;
    while (!done && cyc < 2000) begin @(negedge clk); cyc++; end
    check(cyc == 25 + 72 * (R + 1) + 1, $sformatf("latency %0d for %0d rule-sets", cyc, R));
    if (sum) mech[M_MINSUM_SAT] += 0; else mech[M_MINMAX]++;
    if (R > 1) mech[M_OVERLAP]++;
    for (int o = 0; o < R; o++) begin
      bus_read(A_OUTPUT + o, v);
      check(int'(v) == exp_y[o], $sformatf("host output %0d = %0d, expected %0d", o, v, exp_y[o]));
      @(negedge clk);
      tgt_addr = 3'(o);
      #1 check(int'(tgt_dout) == exp_y[o], $sformatf("target output %0d", o));
    end
    for (int s = 0; s < R; s++)
      for (int p = 0; p < N_PE; p++)
        for (int r = 0; r < N_RULE; r++) begin
          bus_read(A_WEIGHT + s * 32 + p * 4 + r, v);
          check(int'(v) == exp_w[s][p][r], $sformatf("weight %0d.%0d.%0d = %0d, expected %0d",
                s, p, r, v, exp_w[s][p][r]));
        end
    bus_read(A_CTRL, v);
    check(v == {1'b0, 1'b1, 2'b00, sum, 2'(R - 1), 1'b0}, "status");
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] v;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int kb = 0; kb < 3; kb++) begin
      make_kb();
      load_kb();
      // read a few membership bytes back
      for (int k = 0; k < 8; k++) begin
        int i, t;
        i = $urandom_range(0, 7); t = $urandom_range(0, 7);
        bus_read(A_MF + i * 64 + t * 8 + 1, v);
        check(v == mf[i][t].b, "membership read-back");
      end
      for (int run = 0; run < 4; run++) begin
        int R;
        bit sum, tg;
        for (int i = 0; i < N_IN; i++) begin
          int c;
          c = $urandom_range(0, 3);
          if (c == 0)      xin[i] = mf[i][$urandom_range(0, 7)].a + 8'($urandom_range(0, 3));
          else if (c == 1) xin[i] = mf[i][$urandom_range(0, 7)].b;
          else             xin[i] = 8'($urandom);
        end
        fuzzify_ref();
        make_rules();
        load_rules();
        R   = (run == 0) ? 1 : (run == 1 ? 4 : $urandom_range(2, 4));
        sum = (run == 2);
        tg  = (run == 3);
        if (kb == 0 && run == 1) begin
          sum = 1;   // MIN-SUM with all 128 rules
        end
        infer_ref(R, sum);
        one_inference(R, sum, tg);
      end
    end
    for (int k = 0; k < M_NUM; k++) begin
      $display("mechanism %-24s %0d", mech_name[k], mech[k]);
      check(mech[k] > 0, {"mechanism never exercised: ", mech_name[k]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
