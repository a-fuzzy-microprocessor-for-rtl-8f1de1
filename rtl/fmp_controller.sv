// fmp_controller: system controller, the sequencer of one inference.
//
// The host writes the control register (bits 2:1 = number of rule-sets - 1,
// bit 3 = 1 for MIN-SUM) while the chip is idle; with bit 0 set the write
// also starts an inference. The target starts one with tgt_start, using the
// stored configuration. Writes while busy are ignored.
// With t counting cycles from the start:
//   fuzzifiers   t[2:0] is the stage slot; input t[5:3] enters at slot 0
//                for t < 64, so results arrive at t = 24, 32, ..., 80;
//   PEs          rule-set periods of 72 cycles start at t = 25 and follow
//                each other; pe_cyc counts 0..71 and pe_rset the period;
//   defuzzifier  started in the last cycle of each PE period, so it works
//                on rule-set p while the PEs evaluate rule-set p+1; dz_out
//                names the output it works on, out_idx the output whose
//                result it delivers (dz_out has moved on by then);
// The inference ends when the defuzzifier delivers the last output:
// 25 + 72 * (R + 1) + 1 cycles for R rule-sets (170 cycles for 32 rules,
// 386 for 128). Status byte: {busy, done, 2'b0, method, rsets-1, 1'b0};
// done is cleared by the next start.
// The 8-cycle fuzzifier pipeline and the PE/defuzzifier pipeline of 72
// cycles follow the document; the start mechanism, the one cycle between
// the first fuzzifier result and the first PE period, and the status
// layout are this design's choices. Assertions check that the defuzzifier
// starts only at the end of a PE period and that busy and done exclude
// each other.
module fmp_controller
  import fmp_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ctrl_we,
  input  logic [W-1:0]  ctrl_wdata,
  input  logic          tgt_start,
  input  logic          dz_y_valid,
  output logic [W-1:0]  status,
  output method_e       method,
  output logic          busy,
  output logic          done,
  // fuzzifiers
  output logic [2:0]    fz_slot,
  output logic          fz_valid,
  output logic [2:0]    fz_idx,
  // PEs
  output logic          pe_run,
  output logic [6:0]    pe_cyc,
  output logic [1:0]    pe_rset,
  // defuzzifier
  output logic          dz_start,
  output logic [1:0]    dz_out,
  output logic [1:0]    out_idx     // output number of the result now delivered
);

  logic [8:0] t;
  logic [1:0] nrset_m1;
  logic [1:0] dz_cnt;
  logic       go;

  assign go       = !busy && ((ctrl_we && ctrl_wdata[0]) || tgt_start);
  assign fz_slot  = t[2:0];
  assign fz_valid = busy && (t < 9'd64);
  assign fz_idx   = t[5:3];
  assign dz_start = pe_run && (pe_cyc == 7'(PE_CYC - 1));
  assign out_idx  = dz_cnt;
  assign status   = {busy, done, 2'b00, method, nrset_m1, 1'b0};

  // the defuzzifier is only started at the end of a PE period, PE periods
  // stay within 72 cycles, and done and busy never hold together
  a_dz_in_period: assert property (@(posedge clk) disable iff (!rst_n)
      dz_start |-> pe_run && pe_cyc == 7'(PE_CYC - 1));
  a_pe_cyc_range: assert property (@(posedge clk) disable iff (!rst_n)
      pe_run |-> pe_cyc < 7'(PE_CYC));
  a_busy_done: assert property (@(posedge clk) disable iff (!rst_n)
      !(busy && done));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t <= '0; busy <= 1'b0; done <= 1'b0; nrset_m1 <= '0; method <= MIN_MAX;
      pe_run <= 1'b0; pe_cyc <= '0; pe_rset <= '0; dz_out <= '0; dz_cnt <= '0;
    end else begin
      if (ctrl_we && !busy) begin
        nrset_m1 <= ctrl_wdata[2:1];
        method   <= method_e'(ctrl_wdata[3]);
      end
      if (go) begin
        busy <= 1'b1; done <= 1'b0; t <= '0;
        pe_run <= 1'b0; pe_cyc <= '0; pe_rset <= '0; dz_cnt <= '0;
      end else if (busy) begin
        if (t != '1) t <= t + 9'd1;
        if (t == 9'd24) begin
          pe_run <= 1'b1; pe_cyc <= '0; pe_rset <= '0;
        end else if (pe_run) begin
          if (pe_cyc == 7'(PE_CYC - 1)) begin
            pe_cyc <= '0;
            dz_out <= pe_rset;
            if (pe_rset == nrset_m1) pe_run <= 1'b0;
            else pe_rset <= pe_rset + 2'd1;
          end else begin
            pe_cyc <= pe_cyc + 7'd1;
          end
        end
        if (dz_y_valid) begin
          dz_cnt <= dz_cnt + 2'd1;
          if (dz_cnt == nrset_m1) begin
            busy <= 1'b0; done <= 1'b1;
          end
        end
      end
    end
  end

endmodule
