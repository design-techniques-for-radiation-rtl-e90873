// dpll_top: the complete radiation-hardened digital PLL.
// Connects the synthesizable core (dpll_core) to behavioural models of its two
// analog parts: the digitally controlled oscillator (dcao) and the TDC's
// matching delay and exponential delay chain (tdc_delay_chain). With a
// reference on ref_clk the loop locks out_clk to N times the reference
// frequency, N = 8, 16, 32 or 64 chosen by div_sel. Because of the two models
// this module is meant for simulation; dpll_core is the part to synthesize.
// Interface: ref_clk - reference; rst_n - asynchronous reset of all digital
// state; div_sel - DIV1:DIV0; out_clk - PLL output; the remaining outputs
// expose the loop's internal words (divided clock, phase error, control word,
// saturation flags) for observation.
module dpll_top
  import dpll_pkg::*;
(
  input  logic     ref_clk,
  input  logic     rst_n,
  input  div_sel_e div_sel,
  output logic     out_clk,
  output logic     div_clk,
  output logic     up,
  output logic     dn,
  output pe_t      pe,
  output ctrl_t    ctrl,
  output logic     acc_overflow,
  output logic     acc_underflow,
  output logic     sum_overflow,
  output logic     sum_underflow
);
  timeunit 1ps; timeprecision 1fs;

  logic                or_pulse, pe_sign;
  logic [TDC_TAPS-1:0] taps;
  tune_t               coarse, fine;

  dpll_core u_core (
    .ref_clk, .rst_n, .div_sel, .osc_clk(out_clk), .div_clk, .up, .dn,
    .or_pulse, .taps, .pe_sign, .pe, .ctrl, .coarse, .fine,
    .acc_overflow, .acc_underflow, .sum_overflow, .sum_underflow
  );

  tdc_delay_chain u_chain (.pulse(or_pulse), .taps);

  dcao u_dcao (.coarse, .fine, .clk_out(out_clk));
endmodule
