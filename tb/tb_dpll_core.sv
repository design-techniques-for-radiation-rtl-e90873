// tb_dpll_core: the digital core in open loop. The oscillator input is a
// fixed 400 MHz clock and the delay line is the behavioural model; the
// reference runs at 10 MHz. Checks:
//  * the divided clock has 8/16/32/64 oscillator cycles per period;
//  * after every PFD event the phase error equals +-2^i for the measured
//    width of the OR pulse (sign negative when DN rose first, i.e. the
//    divided clock came first), saturating at 256;
//  * the control word equals an independent model of the PI filter fed with
//    the observed phase errors, and coarse/fine are its upper 6 bits and its
//    lower 4 bits followed by 00;
//  * with /32 the divided clock (12.5 MHz) is too fast, so the control word
//    must fall and the accumulator reach its lower limit; with /64 (6.25 MHz)
//    it must rise and reach the upper limit.
module tb_dpll_core;
  timeunit 1ps; timeprecision 1fs;
  import dpll_pkg::*;

  logic ref_clk = 1'b0, rst_n = 1'b1, osc_clk = 1'b0;
  div_sel_e div_sel = DIV_BY_32;
  logic div_clk, up, dn, or_pulse, pe_sign;
  logic [TDC_TAPS-1:0] taps;
  pe_t pe;
  ctrl_t ctrl;
  tune_t coarse, fine;
  logic acc_ovf, acc_unf, sum_ovf, sum_unf;
  int checks = 0, failures = 0, acc_model = 0, events = 0, n_pos = 0, n_neg = 0, n_sat = 0;
  int n_acc_ovf = 0, n_acc_unf = 0;
  bit checking = 1'b0;

  dpll_core dut (
    .ref_clk, .rst_n, .div_sel, .osc_clk, .div_clk, .up, .dn, .or_pulse, .taps, .pe_sign,
    .pe, .ctrl, .coarse, .fine, .acc_overflow(acc_ovf), .acc_underflow(acc_unf),
    .sum_overflow(sum_ovf), .sum_underflow(sum_unf)
  );
  tdc_delay_chain u_chain (.pulse(or_pulse), .taps);

  always #1250 osc_clk = ~osc_clk;     // 400 MHz
  always #50000 ref_clk = ~ref_clk;    // 10 MHz
  realtime t_rise;
  bit      dn_first;
  always @(posedge or_pulse) begin
    t_rise = $realtime;
    #0.001 dn_first = dn & ~up;
  end

  function automatic int clamp(input int v, input int lo, input int hi);
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  function automatic int ctrl_of(input int acc, input int e);
    int nxt = clamp(acc + e, -32768, 32767);
    int sum = clamp(e + (nxt >>> 5), -1024, 1023);
    return (sum >>> 1) + 512;
  endfunction

  // One accumulation per falling edge of the OR pulse, of the error held before it.
  always @(negedge or_pulse) begin
    automatic int e_old = int'(pe);
    automatic int mag = 0;
    automatic real width = $realtime - t_rise;
    automatic bit div_first = dn_first;
    acc_model = clamp(acc_model + e_old, -32768, 32767);
    #10;
    if (checking && width > 0.5) begin
      for (int i = 0; i < TDC_TAPS; i++) if (width > 90.0 * real'(1 << i)) mag = 1 << i;
      events++;
      checks++;
      if (int'(pe) != (div_first ? -mag : mag)) begin
        failures++;
        $display("FAIL pe=%0d for %s first by %0.1f ps (expected %0d)", pe, div_first ? "div" : "ref", width, div_first ? -mag : mag);
      end
      if (pe > 0) n_pos++;
      if (pe < 0) n_neg++;
      if (pe == 256 || pe == -256) n_sat++;
    end
    if (checking) begin
      checks += 2;
      if (int'(ctrl) != ctrl_of(acc_model, int'(pe))) begin
        failures++; $display("FAIL ctrl=%0d expected %0d", ctrl, ctrl_of(acc_model, int'(pe)));
      end
      if (coarse != ctrl[9:4] || fine != {ctrl[3:0], 2'b00}) begin
        failures++; $display("FAIL tuning words %0d %0d for ctrl %0d", coarse, fine, ctrl);
      end
      if (acc_unf) n_acc_unf++;
      if (acc_ovf) n_acc_ovf++;
    end
  end

  task automatic check_ratio(input div_sel_e s, input int ratio);
    int n;
    div_sel = s;
    @(posedge div_clk); @(posedge div_clk);
    n = 0;
    fork : count
      forever begin @(posedge osc_clk); n++; end
      @(posedge div_clk);
    join_any
    disable count;
    checks++;
    if (n != ratio) begin failures++; $display("FAIL divider: %0d oscillator cycles, expected %0d", n, ratio); end
  endtask

  initial begin
    int ctrl_start;
    #100 rst_n = 1'b0;
    #100 rst_n = 1'b1;
    check_ratio(DIV_BY_8, 8);
    check_ratio(DIV_BY_16, 16);
    check_ratio(DIV_BY_64, 64);
    check_ratio(DIV_BY_32, 32);
    // Restart the filter and track it from reset.
    @(negedge ref_clk);
    rst_n = 1'b0; acc_model = 0; #100 rst_n = 1'b1;
    checking = 1'b1;
    ctrl_start = int'(ctrl);
    repeat (200) @(posedge ref_clk);
    checks++;
    if (!(int'(ctrl) < ctrl_start - 100)) begin failures++; $display("FAIL control word did not fall: %0d", ctrl); end
    div_sel = DIV_BY_64;
    ctrl_start = int'(ctrl);
    repeat (700) @(posedge ref_clk);
    checks++;
    if (!(int'(ctrl) > ctrl_start + 100)) begin failures++; $display("FAIL control word did not rise: %0d", ctrl); end
    checks++;
    if (n_pos == 0 || n_neg == 0 || n_sat == 0 || n_acc_ovf == 0 || n_acc_unf == 0 || events < 100) begin
      failures++;
      $display("FAIL coverage: events %0d pos %0d neg %0d sat %0d acc ovf %0d unf %0d", events, n_pos, n_neg, n_sat, n_acc_ovf, n_acc_unf);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
