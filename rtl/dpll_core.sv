// dpll_core: synthesizable, single-event-hardened core of the digital PLL.
// Loop: the triplicated PFD compares the reference with the divided
// oscillator clock; the TDC turns the wider of its UP/DN pulses into a signed
// 10-bit phase error; the PI loop filter turns that into a 10-bit control
// word; the oscillator (outside, see dcao) runs at a frequency set by the
// word; the programmable divider (/8 ... /64) closes the loop. The two analog
// parts of the loop stay outside the core and connect through ports: the
// oscillator (osc_clk in, coarse/fine out) and the TDC's matching delay and
// exponential delay chain (or_pulse out, taps in).
// Block structure and hardening follow the design. Own choices: the loop
// filter accumulates once per comparison, on the TDC's sample clock (the
// falling edge of the OR pulse); and the 10-bit control word drives the two
// 6-bit tuning words as coarse = ctrl[9:4] and fine = {ctrl[3:0], 2'b00}, so
// that with a fine step one quarter of a control LSB and a coarse step of 16
// control LSBs the frequency is linear in the control word.
// Timing: the phase error and control word update once per reference cycle,
// right after the PFD pulse ends.
module dpll_core
  import dpll_pkg::*;
(
  input  logic                ref_clk,
  input  logic                rst_n,
  input  div_sel_e            div_sel,
  input  logic                osc_clk,
  output logic                div_clk,
  output logic                up,
  output logic                dn,
  output logic                or_pulse,
  input  logic [TDC_TAPS-1:0] taps,
  output logic                pe_sign,
  output pe_t                 pe,
  output ctrl_t               ctrl,
  output tune_t               coarse,
  output tune_t               fine,
  output logic                acc_overflow,
  output logic                acc_underflow,
  output logic                sum_overflow,
  output logic                sum_underflow
);
  timeunit 1ps; timeprecision 1fs;

  logic [TDC_TAPS-1:0] latch_q;
  logic                sample_clk;

  freq_divider #(.STAGES(DIV_STAGES), .HARDENED(3)) u_div (
    .clk_in(osc_clk), .rst_n, .div_sel, .clk_out(div_clk)
  );

  tmr_pfd u_pfd (.ref_in(ref_clk), .div_in(div_clk), .rst_n, .up, .dn);

  tdc #(.TAPS(TDC_TAPS), .TMR_FROM(2)) u_tdc (
    .rst_n, .up, .dn, .or_pulse, .taps, .latch_q, .sign(pe_sign), .pe
  );

  always_comb sample_clk = ~or_pulse;

  loop_filter #(.ACC_BITS(ACC_W), .SHIFT(BETA_SHIFT), .TMR_BITS(10)) u_lf (
    .clk(sample_clk), .rst_n, .pe, .ctrl,
    .acc_overflow, .acc_underflow, .sum_overflow, .sum_underflow
  );

  always_comb begin
    coarse = ctrl[CTRL_W-1 -: TUNE_W];
    fine   = {ctrl[CTRL_W-TUNE_W-1:0], 2'b00};
  end
endmodule
