// tb_fmp_fuzzifier: self-checking test of both fuzzifier groups.
//
// A behavioural table of random, ordered trapezoid terms stands in for the
// membership memory. Inputs are streamed one per 8-cycle slot; every result
// is compared with a reference grade computed from the formula (last term of
// the group with a <= x; mu*(x-a) below b, 1+beta*(x-b) from b on; slopes
// mantissa / 2**exponent, magnitude truncated, limited to 0..255), and it
// must arrive exactly 24 cycles after its input entered. A directed part
// then checks grades worked out by hand for a Z, a triangle, a trapezoid and
// an S shape, a negative rising slope and a term at the end of the range.
module tb_fmp_fuzzifier;
  import fmp_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  mf_term_t tbl [N_IN][N_TERM];
  logic [2:0] slot = 0;
  logic       in_valid = 0;
  logic [2:0] in_idx = 0;
  logic [7:0] x = 0;
  logic [7:0] xs [N_IN];
  logic [2:0] mf_in [2], mf_term [2];
  mf_term_t   mf_q [2];
  logic       res_valid [2];
  logic [2:0] res_idx [2];
  fz_res_t    res [2];
  longint     cyc = 0;
  longint     t_in [N_IN];
  bit         directed = 0;
  fz_res_t    dexp [2][N_IN];   // hand-computed results for the directed part

  for (genvar f = 0; f < 2; f++) begin : g
    assign mf_q[f] = tbl[mf_in[f]][mf_term[f]];
    fmp_fuzzifier #(.GROUP(f[0])) dut (
      .clk, .rst_n, .slot, .in_valid, .in_idx, .x,
      .mf_in(mf_in[f]), .mf_term(mf_term[f]), .mf_q(mf_q[f]),
      .res_valid(res_valid[f]), .res_idx(res_idx[f]), .res(res[f]));
  end

  function automatic fz_res_t ref_g(input int f, input int i, input int xv);
    fz_res_t r;
    int m, d, mag, v, sgn;
    mf_term_t t;
    m = -1;
    for (int k = 0; k < 4; k++) if (xv >= int'(tbl[i][2*k+f].a)) m = k;
    if (m < 0) begin r.m = 4'(f + 1); r.g = 0; return r; end
    t = tbl[i][2*m+f];
    r.m = 4'(2*m + f + 1);
    if (xv < int'(t.b)) begin
      d = xv - int'(t.a); sgn = int'($signed(t.mu_m));
      mag = (sgn < 0 ? -sgn : sgn) * d; v = mag / (1 << t.mu_e[2:0]);
      if (v > 255) v = 255;
      r.g = (sgn < 0) ? 8'd0 : 8'(v);
    end else begin
      d = xv - int'(t.b); sgn = int'($signed(t.beta_m));
      mag = (sgn < 0 ? -sgn : sgn) * d; v = mag / (1 << t.beta_e[2:0]);
      if (v > 255) v = 255;
      r.g = (sgn < 0) ? 8'(255 - v) : 8'd255;
    end
    return r;
  endfunction

  task automatic make_table();
    for (int i = 0; i < N_IN; i++)
      for (int f = 0; f < 2; f++) begin
        int pos = $urandom_range(0, 20);
        for (int k = 0; k < 4; k++) begin
          mf_term_t t;
          t.a = 8'(pos);
          pos += $urandom_range(1, 30);
          t.b = 8'(pos > 255 ? 255 : pos);
          pos += $urandom_range(1, 30);
          if (pos > 255) pos = 255;
          t.mu_m   = 8'($urandom_range(0, 9) == 0 ? -$urandom_range(1, 128) : $urandom_range(0, 127));
          t.beta_m = 8'($urandom_range(0, 9) == 0 ? $urandom_range(0, 127) : -$urandom_range(1, 128));
          t.mu_e   = 8'($urandom_range(0, 7));
          t.beta_e = 8'($urandom_range(0, 7));
          tbl[i][2*k+f] = t;
        end
      end
  endtask

  always @(posedge clk) cyc <= cyc + 1;

  // checker
  always @(posedge clk) if (rst_n) begin
    for (int f = 0; f < 2; f++) if (res_valid[f]) begin
      fz_res_t e;
      e = directed ? dexp[f][res_idx[f]] : ref_g(f, res_idx[f], xs[res_idx[f]]);
      checks++;
      if (res[f] !== e) begin
        failures++;
        $display("FAIL fz%0d in%0d x=%0d got m=%0d g=%0d exp m=%0d g=%0d",
                 f, res_idx[f], xs[res_idx[f]], res[f].m, res[f].g, e.m, e.g);
      end
      checks++;
      if (cyc - t_in[res_idx[f]] != 24) begin
        failures++;
        $display("FAIL latency %0d", cyc - t_in[res_idx[f]]);
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int round = 0; round < 60; round++) begin
      make_table();
      for (int i = 0; i < N_IN; i++) begin
        int sel;
        sel = $urandom_range(0, 3);
        // mix random values with values on the term edges
        if (sel == 0)      xs[i] = tbl[i][$urandom_range(0, 7)].a;
        else if (sel == 1) xs[i] = tbl[i][$urandom_range(0, 7)].b;
        else               xs[i] = 8'($urandom);
      end
      for (int i = 0; i < N_IN; i++) begin
        for (int s = 0; s < 8; s++) begin
          slot <= 3'(s);
          if (s == 0) begin
            in_valid <= 1; in_idx <= 3'(i); x <= xs[i]; t_in[i] = cyc + 1;
          end
          @(posedge clk);
        end
      end
      // drain the pipeline without new inputs
      in_valid <= 0;
      for (int s = 0; s < 24; s++) begin slot <= 3'(s % 8); @(posedge clk); end
    end
    // directed part: one hand-made term set (Z, triangle, trapezoid, S for
    // the odd group; a negative rising slope and a level top for the even
    // group) and grades worked out by hand
    directed = 1;
    for (int i = 0; i < N_IN; i++) begin
      //              a     b     mu_m   mu_e  beta_m beta_e
      tbl[i][0] = {8'd0,   8'd40,  8'd127, 8'd0, 8'h80, 8'd5};  // Z: rises in 3 steps, falls 4/step
      tbl[i][2] = {8'd110, 8'd130, 8'd102, 8'd3, 8'h9A, 8'd3};  // triangle, slopes +-12.75
      tbl[i][4] = {8'd160, 8'd200, 8'd64,  8'd3, 8'hF8, 8'd0};  // trapezoid, +8 / -8
      tbl[i][6] = {8'd210, 8'd230, 8'd51,  8'd2, 8'd0,  8'd0};  // S: +12.75, level after b
      tbl[i][1] = {8'd20,  8'd60,  8'hFB,  8'd0, 8'hFF, 8'd0};  // rising slope -5, falls 1/step
      tbl[i][3] = {8'd255, 8'd255, 8'd1,   8'd0, 8'd0,  8'd0};
      tbl[i][5] = {8'd255, 8'd255, 8'd1,   8'd0, 8'd0,  8'd0};
      tbl[i][7] = {8'd255, 8'd255, 8'd1,   8'd0, 8'd0,  8'd0};
    end
    for (int round = 0; round < 3; round++) begin
      case (round)
        0: begin xs = '{8'd0, 8'd1, 8'd2, 8'd3, 8'd40, 8'd50, 8'd103, 8'd104};
           dexp[0] = '{{4'd1, 8'd0}, {4'd1, 8'd127}, {4'd1, 8'd254}, {4'd1, 8'd255},
                       {4'd1, 8'd255}, {4'd1, 8'd215}, {4'd1, 8'd3}, {4'd1, 8'd0}};
           dexp[1] = '{{4'd2, 8'd0}, {4'd2, 8'd0}, {4'd2, 8'd0}, {4'd2, 8'd0},
                       {4'd2, 8'd0}, {4'd2, 8'd0}, {4'd2, 8'd212}, {4'd2, 8'd211}}; end
        1: begin xs = '{8'd105, 8'd110, 8'd120, 8'd129, 8'd130, 8'd140, 8'd150, 8'd155};
           dexp[0] = '{{4'd1, 8'd0}, {4'd3, 8'd0}, {4'd3, 8'd127}, {4'd3, 8'd242},
                       {4'd3, 8'd255}, {4'd3, 8'd128}, {4'd3, 8'd0}, {4'd3, 8'd0}};
           dexp[1] = '{{4'd2, 8'd210}, {4'd2, 8'd205}, {4'd2, 8'd195}, {4'd2, 8'd186},
                       {4'd2, 8'd185}, {4'd2, 8'd175}, {4'd2, 8'd165}, {4'd2, 8'd160}}; end
        default: begin xs = '{8'd170, 8'd200, 8'd205, 8'd220, 8'd229, 8'd240, 8'd254, 8'd255};
           dexp[0] = '{{4'd5, 8'd80}, {4'd5, 8'd255}, {4'd5, 8'd215}, {4'd7, 8'd127},
                       {4'd7, 8'd242}, {4'd7, 8'd255}, {4'd7, 8'd255}, {4'd7, 8'd255}};
           dexp[1] = '{{4'd2, 8'd145}, {4'd2, 8'd115}, {4'd2, 8'd110}, {4'd2, 8'd95},
                       {4'd2, 8'd86}, {4'd2, 8'd75}, {4'd2, 8'd61}, {4'd8, 8'd255}}; end
      endcase
      for (int i = 0; i < N_IN; i++) begin
        for (int s = 0; s < 8; s++) begin
          slot <= 3'(s);
          if (s == 0) begin
            in_valid <= 1; in_idx <= 3'(i); x <= xs[i]; t_in[i] = cyc + 1;
          end
          @(posedge clk);
        end
      end
      in_valid <= 0;
      for (int s = 0; s < 24; s++) begin slot <= 3'(s % 8); @(posedge clk); end
    end
    repeat (4) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
