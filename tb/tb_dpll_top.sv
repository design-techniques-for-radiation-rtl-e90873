// tb_dpll_top: end-to-end test of the complete PLL at its default sizes.
// Phases:
//  1. Reference 10 MHz, /32: from reset the loop must lock (phase error
//     within +-2 for 50 reference cycles) with exactly 32 output cycles per
//     reference cycle. During acquisition the TDC must report errors of both
//     signs and reach its 256 limit.
//  2. While locked, single copies of hardened state are struck one at a time
//     (a /16.. /64 divider stage, one PFD, the TDC sign flip-flop, a TDC MSB
//     latch, two accumulator MSBs): the loop must stay locked with unchanged
//     frequency. A strike on the unhardened first divider stage is allowed to
//     disturb the phase, but by less than 1/8 of a reference cycle.
//  3. Mode switches to targets outside the oscillator range (/64 -> 640 MHz,
//     /16 -> 160 MHz): the control word must pin at 1023 and 0 with the
//     accumulator and adder saturation flags raised.
//  4. Lock at the other three ratios: /8 at 45 MHz, /16 at 25 MHz, /64 at
//     7 MHz reference.
// Every mechanism is counted and a failure is counted for any never seen.
module tb_dpll_top;
  timeunit 1ps; timeprecision 1fs;
  import dpll_pkg::*;

  logic ref_clk = 1'b0, rst_n = 1'b1;
  div_sel_e div_sel = DIV_BY_32;
  logic out_clk, div_clk, up, dn, acc_ovf, acc_unf, sum_ovf, sum_unf;
  pe_t pe;
  ctrl_t ctrl;
  real ref_half_ps = 50000.0;
  logic [5:0] flip_v;  // strike values, held by force
  int checks = 0, failures = 0;
  int n_pos = 0, n_neg = 0, n_tdc_sat = 0, n_acc_ovf = 0, n_acc_unf = 0, n_sum_ovf = 0, n_sum_unf = 0;
  int n_locks = 0, n_masked = 0, n_mode = 0, n_plain_hit = 0, out_edges = 0;

  dpll_top dut (
    .ref_clk, .rst_n, .div_sel, .out_clk, .div_clk, .up, .dn, .pe, .ctrl,
    .acc_overflow(acc_ovf), .acc_underflow(acc_unf), .sum_overflow(sum_ovf), .sum_underflow(sum_unf)
  );

  always #(ref_half_ps) ref_clk = ~ref_clk;
  always @(posedge out_clk) out_edges++;

  always @(posedge ref_clk) begin
    if (pe > 0) n_pos++;
    if (pe < 0) n_neg++;
    if (pe == 256 || pe == -256) n_tdc_sat++;
    if (acc_ovf) n_acc_ovf++;
    if (acc_unf) n_acc_unf++;
    if (sum_ovf) n_sum_ovf++;
    if (sum_unf) n_sum_unf++;
  end

  function automatic int abs_i(input int v);
    return v < 0 ? -v : v;
  endfunction

  // Wait until |pe| <= 2 for 50 consecutive reference cycles, then check the
  // output frequency over 50 reference cycles.
  task automatic wait_lock(input int ratio, input int max_cycles, input string what);
    int good = 0, n = 0, e0;
    while (good < 50 && n < max_cycles) begin
      @(posedge ref_clk); #1;
      n++;
      good = (abs_i(int'(pe)) <= 2) ? good + 1 : 0;
    end
    checks++;
    if (good < 50) begin
      failures++;
      $display("FAIL %s: no lock after %0d cycles (pe=%0d ctrl=%0d)", what, n, pe, ctrl);
      return;
    end
    n_locks++;
    @(posedge ref_clk);
    e0 = out_edges;
    repeat (50) @(posedge ref_clk);
    checks++;
    if (abs_i(out_edges - e0 - 50 * ratio) > 1) begin
      failures++;
      $display("FAIL %s: %0d output cycles in 50 reference cycles, expected %0d", what, out_edges - e0, 50 * ratio);
    end
    $display("%s: locked after %0d reference cycles, control word %0d", what, n, ctrl);
  endtask

  // After a strike: the loop must stay within +-max_err for 100 cycles.
  task automatic watch(input int max_err, input string what, output int worst);
    worst = 0;
    repeat (100) begin
      @(posedge ref_clk); #1;
      if (abs_i(int'(pe)) > worst) worst = abs_i(int'(pe));
    end
    checks++;
    if (worst > max_err) begin
      failures++;
      $display("FAIL strike on %s: phase error reached %0d", what, worst);
    end else if (max_err <= 2) n_masked++;
  endtask

  task automatic strike_pause();
    @(posedge ref_clk);
    #(ref_half_ps);
  endtask

  initial begin
    int worst, e0;
    #100 rst_n = 1'b0;
    #100 rst_n = 1'b1;

    // 1. acquisition at /32
    wait_lock(32, 2000, "lock /32 at 10 MHz");

    // 2. strikes while locked
    strike_pause();
    begin flip_v[0] = ~dut.u_core.u_div.g_stage[4].g_tmr.u_div.u_reg.copy_b; force dut.u_core.u_div.g_stage[4].g_tmr.u_div.u_reg.copy_b = flip_v[0]; end
    #2000 release dut.u_core.u_div.g_stage[4].g_tmr.u_div.u_reg.copy_b;
    watch(2, "divider stage 5", worst);

    strike_pause();
    begin flip_v[1] = ~dut.u_core.u_div.g_stage[5].g_tmr.u_div.u_reg.copy_a; force dut.u_core.u_div.g_stage[5].g_tmr.u_div.u_reg.copy_a = flip_v[1]; end
    #2000 release dut.u_core.u_div.g_stage[5].g_tmr.u_div.u_reg.copy_a;
    watch(2, "divider stage 6", worst);

    strike_pause();
    force dut.u_core.u_pfd.g_pfd[1].u_pfd.up = 1'b1;
    #20000 release dut.u_core.u_pfd.g_pfd[1].u_pfd.up;
    watch(2, "PFD copy", worst);

    strike_pause();
    begin flip_v[2] = ~dut.u_core.u_tdc.u_sign.copy_c; force dut.u_core.u_tdc.u_sign.copy_c = flip_v[2]; end
    force dut.u_core.u_tdc.g_latch[8].g_tmr.u_lat.copy_a = 1'b1;
    #20000;
    release dut.u_core.u_tdc.u_sign.copy_c;
    release dut.u_core.u_tdc.g_latch[8].g_tmr.u_lat.copy_a;
    watch(2, "TDC sign and MSB latch", worst);

    strike_pause();
    begin flip_v[3] = ~dut.u_core.u_lf.u_acc.g_bit[14].u_bit.g_tmr.u_q.copy_a; force dut.u_core.u_lf.u_acc.g_bit[14].u_bit.g_tmr.u_q.copy_a = flip_v[3]; end
    begin flip_v[4] = ~dut.u_core.u_lf.u_acc.g_bit[10].u_bit.g_tmr.u_q.copy_c; force dut.u_core.u_lf.u_acc.g_bit[10].u_bit.g_tmr.u_q.copy_c = flip_v[4]; end
    #2000;
    release dut.u_core.u_lf.u_acc.g_bit[14].u_bit.g_tmr.u_q.copy_a;
    release dut.u_core.u_lf.u_acc.g_bit[10].u_bit.g_tmr.u_q.copy_c;
    watch(2, "accumulator MSBs", worst);

    // Unhardened first divider stage: one lost oscillator cycle, a bounded error.
    strike_pause();
    begin flip_v[5] = ~dut.u_core.u_div.g_stage[0].g_plain.u_div.clk_out; force dut.u_core.u_div.g_stage[0].g_plain.u_div.clk_out = flip_v[5]; end
    #10 release dut.u_core.u_div.g_stage[0].g_plain.u_div.clk_out;
    watch(139, "divider stage 1 (unprotected)", worst);   // 1/8 of 100 ns = 139 unit delays
    if (worst > 0) n_plain_hit++;
    $display("unprotected stage strike: worst phase error %0d", worst);
    wait_lock(32, 1000, "relock /32 after unprotected strike");

    // 3. mode switches to unreachable targets
    div_sel = DIV_BY_64; n_mode++;
    repeat (600) @(posedge ref_clk);
    checks++;
    if (ctrl != 10'd1023) begin failures++; $display("FAIL /64 at 10 MHz: ctrl %0d, expected 1023", ctrl); end
    div_sel = DIV_BY_16; n_mode++;
    repeat (600) @(posedge ref_clk);
    checks++;
    if (ctrl != 10'd0) begin failures++; $display("FAIL /16 at 10 MHz: ctrl %0d, expected 0", ctrl); end

    // 4. lock at the other ratios
    ref_half_ps = 1.0e6 / 45.0 / 2.0; div_sel = DIV_BY_8; n_mode++;
    wait_lock(8, 4000, "lock /8 at 45 MHz");
    ref_half_ps = 1.0e6 / 25.0 / 2.0; div_sel = DIV_BY_16; n_mode++;
    wait_lock(16, 4000, "lock /16 at 25 MHz");
    ref_half_ps = 1.0e6 / 7.0 / 2.0; div_sel = DIV_BY_64; n_mode++;
    wait_lock(64, 4000, "lock /64 at 7 MHz");

    $display("mechanisms: locks %0d, pe>0 %0d, pe<0 %0d, TDC limit %0d, acc ovf %0d unf %0d, sum ovf %0d unf %0d, strikes masked %0d, unprotected hit %0d, mode switches %0d",
             n_locks, n_pos, n_neg, n_tdc_sat, n_acc_ovf, n_acc_unf, n_sum_ovf, n_sum_unf, n_masked, n_plain_hit, n_mode);
    checks++;
    if (n_locks < 5 || n_pos == 0 || n_neg == 0 || n_tdc_sat == 0 || n_acc_ovf == 0 || n_acc_unf == 0 ||
        n_sum_ovf == 0 || n_sum_unf == 0 || n_masked < 5 || n_plain_hit == 0 || n_mode < 5) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
