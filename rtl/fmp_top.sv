// fmp_top: fuzzy microprocessor (FMP) for real-time control.
//
// A fuzzy inference engine with singleton output terms: 8 inputs of 8 bits
// with 8 trapezoid terms each, up to 128 rules in 4 rule-sets of 32, one
// output per rule-set by weighted mean, MIN-MAX or MIN-SUM inference.
// Data flow: input register -> 2 fuzzifiers (odd / even terms, 3-stage
// pipeline, one input per 8 cycles) -> fuzzified-value register (term m and
// grade of each input for each fuzzifier) -> 8 PEs (PE j: the 4 rules that
// conclude output term j; MIN over inputs, MAX over rules, 72 cycles per
// rule-set) -> multiplexer -> defuzzifier (72 cycles, overlapped with the
// next rule-set) -> output register. The multiplexer also copies every
// rule strength into the weight memory for the host.
// Host side: D0-7 (din/dout/doe), A0-10, /CS, /RE, /WE, /RES (rst_n) load
// the memories, write inputs, start an inference and read results (map in
// fmp_cpu_if). Target side: input signal (tgt_din) with input number
// tgt_addr and strobe tgt_we, output signal tgt_dout = output tgt_addr[1:0],
// and the control pins tgt_start (start an inference with the stored
// configuration) and busy/done. An inference of R rule-sets takes
// 25 + 72 * (R + 1) + 1 cycles from start to done.
// The block structure and the cycle budgets follow the document; the
// fuzzified-value register, the target-side control pins and all encodings
// are this design's choices.
module fmp_top
  import fmp_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  // host CPU bus
  input  logic           cs_n,
  input  logic           re_n,
  input  logic           we_n,
  input  logic [AW-1:0]  addr,
  input  logic [W-1:0]   din,
  output logic [W-1:0]   dout,
  output logic           doe,
  // target system
  input  logic           tgt_we,
  input  logic [2:0]     tgt_addr,
  input  logic [W-1:0]   tgt_din,
  output logic [W-1:0]   tgt_dout,
  input  logic           tgt_start,
  output logic           busy,
  output logic           done
);

  // ---------------- host interface ----------------
  logic [AW-1:0] waddr;
  logic [W-1:0]  wdata;
  logic          mf_we, rule_we, then_we, in_we, ctrl_we;
  logic [W-1:0]  mf_rd, rule_rd, weight_rd, then_rd, in_rd, out_rd, status_rd;

  // host reads use the live address, writes the sampled one
  logic [AW-1:0] mf_a, rule_a, then_a, in_a;
  logic          rd_phase;
  assign rd_phase = !cs_n && !re_n;
  assign mf_a   = rd_phase ? addr : waddr;
  assign rule_a = rd_phase ? addr : waddr;
  assign then_a = rd_phase ? addr : waddr;
  assign in_a   = rd_phase ? addr : waddr;

  fmp_cpu_if u_cpu_if (
    .clk, .rst_n, .cs_n, .re_n, .we_n, .addr, .din, .dout, .doe,
    .waddr, .wdata, .mf_we, .rule_we, .then_we, .in_we, .ctrl_we,
    .mf_rd, .rule_rd, .weight_rd, .then_rd, .in_rd, .out_rd, .status_rd
  );

  // ---------------- system controller ----------------
  method_e    method;
  logic [2:0] fz_slot, fz_idx;
  logic       fz_valid, pe_run, dz_start, dz_y_valid;
  logic [6:0] pe_cyc;
  logic [1:0] pe_rset, dz_out, out_idx;

  fmp_controller u_ctrl (
    .clk, .rst_n, .ctrl_we, .ctrl_wdata(wdata), .tgt_start, .dz_y_valid,
    .status(status_rd), .method, .busy, .done,
    .fz_slot, .fz_valid, .fz_idx, .pe_run, .pe_cyc, .pe_rset, .dz_start, .dz_out, .out_idx
  );

  // ---------------- input register ----------------
  logic [W-1:0] x;
  fmp_input_reg u_in (
    .clk, .rst_n, .tgt_we, .tgt_addr, .tgt_data(tgt_din),
    .cpu_we(in_we), .cpu_addr(in_a[2:0]), .cpu_wdata(wdata), .cpu_rdata(in_rd),
    .fz_addr(fz_idx), .fz_x(x)
  );

  // ---------------- if-part memory and fuzzifiers ----------------
  logic [2:0] mf_in [N_FZ];
  logic [2:0] mf_term [N_FZ];
  mf_term_t   mf_q [N_FZ];
  logic       fz_res_valid [N_FZ];
  logic [2:0] fz_res_idx [N_FZ];
  fz_res_t    fz_res [N_FZ];

  fmp_mf_mem u_mf (
    .clk, .we(mf_we), .addr(mf_a[8:0]), .wdata, .rdata(mf_rd),
    .rd_in(mf_in), .rd_term(mf_term), .rd_q(mf_q)
  );

  for (genvar f = 0; f < N_FZ; f++) begin : g_fz
    fmp_fuzzifier #(.GROUP(f[0])) u_fz (
      .clk, .rst_n, .slot(fz_slot), .in_valid(fz_valid), .in_idx(fz_idx), .x,
      .mf_in(mf_in[f]), .mf_term(mf_term[f]), .mf_q(mf_q[f]),
      .res_valid(fz_res_valid[f]), .res_idx(fz_res_idx[f]), .res(fz_res[f])
    );
  end

  // fuzzified-value register: result of each fuzzifier for each input
  fz_res_t fzv [N_FZ][N_IN];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int f = 0; f < N_FZ; f++)
        for (int i = 0; i < N_IN; i++) fzv[f][i] <= '0;
    end else begin
      for (int f = 0; f < N_FZ; f++)
        if (fz_res_valid[f]) fzv[f][fz_res_idx[f]] <= fz_res[f];
    end
  end

  // ---------------- rule memory and PEs ----------------
  logic [3:0]   pe_n [N_PE];
  logic [W-1:0] h [N_PE];
  logic         w_valid [N_PE];
  logic [1:0]   w_rule [N_PE];
  logic [W-1:0] w_val [N_PE];

  fmp_rule_mem u_rule (
    .clk, .we(rule_we), .addr(rule_a[8:0]), .wdata, .rdata(rule_rd),
    .pe_rset, .pe_rule(pe_cyc[2:1]), .pe_in(pe_cyc[5:3]), .pe_n
  );

  for (genvar p = 0; p < N_PE; p++) begin : g_pe
    fmp_pe u_pe (
      .clk, .rst_n, .run(pe_run), .cyc(pe_cyc), .method,
      .fz_odd(fzv[0][pe_cyc[5:3]]), .fz_even(fzv[1][pe_cyc[5:3]]),
      .n(pe_n[p]), .h(h[p]),
      .w_valid(w_valid[p]), .w_rule(w_rule[p]), .w_val(w_val[p])
    );
  end

  // ---------------- multiplexer and weight memory ----------------
  logic [2:0]   dz_hsel;
  logic [W-1:0] dz_h, dz_c, dz_y;
  logic         wm_we;
  logic [1:0]   wm_rule;
  logic [W-1:0] wm_data [N_PE];

  fmp_mux u_mux (
    .h, .sel(dz_hsel), .h_out(dz_h),
    .w_valid, .w_rule, .w_val, .wm_we, .wm_rule, .wm_data
  );

  fmp_weight_mem u_weight (
    .clk, .we(wm_we), .rset(pe_rset), .rule(wm_rule), .wdata(wm_data),
    .addr(addr[6:0]), .rdata(weight_rd)
  );

  // ---------------- then-part memory, defuzzifier, output register ----
  logic dz_busy;

  fmp_then_mem u_then (
    .clk, .we(then_we), .addr(then_a[4:0]), .wdata, .rdata(then_rd),
    .dz_out, .dz_term(dz_hsel), .dz_c
  );

  fmp_defuzzifier u_dz (
    .clk, .rst_n, .start(dz_start), .h_sel(dz_hsel), .h_j(dz_h), .c_j(dz_c),
    .busy(dz_busy), .y_valid(dz_y_valid), .y(dz_y)
  );

  fmp_output_reg u_out (
    .clk, .rst_n, .dz_we(dz_y_valid), .dz_addr(out_idx), .dz_data(dz_y),
    .cpu_addr(addr[1:0]), .cpu_rdata(out_rd), .tgt_addr(tgt_addr[1:0]), .tgt_data(tgt_dout)
  );

endmodule
