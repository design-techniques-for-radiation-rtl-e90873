// tdc_delay_chain: behavioural model of the TDC's analog delay line.
// Not synthesizable. The OR pulse first passes a matching delay (in silicon a
// current-starved inverter) that cancels the minimum width of the PFD's
// pulses, then an exponential chain of nine buffer stages of 1, 1, 2, 4, 8,
// 16, 32, 64 and 128 unit delays dT. Tap i, the output of stage i, therefore
// lags the pulse by 2^i dT, and the nine taps cover 1 dT to 256 dT with
// resolution dT at the short end. Each stage is a pure transport delay.
// The chain, its stage delays and the 80-100 ps unit delay follow the design;
// DT_PS = 90 ps is taken from that range. MATCH_PS defaults to zero because
// the RTL PFD (pfd) has no reset delay of its own to cancel.
// Interface: pulse - OR of UP and DN; taps - delayed copies, all low at start.
module tdc_delay_chain
  import dpll_pkg::*;
#(
  parameter real         DT_PS                   = 90.0,
  parameter real         MATCH_PS                = 0.0,
  parameter int unsigned STAGE_UNITS [TDC_TAPS]  = '{1, 1, 2, 4, 8, 16, 32, 64, 128}
) (
  input  logic                pulse,
  output logic [TDC_TAPS-1:0] taps
);
  timeunit 1ps; timeprecision 1fs;

  logic              matched;
  logic [TDC_TAPS:0] node;

  initial begin
    matched = 1'b0;
    node    = '0;
  end

  always @(pulse) matched <= #(MATCH_PS) pulse;
  always_comb node[0] = matched;

  for (genvar i = 0; i < TDC_TAPS; i++) begin : g_stage
    always @(node[i]) node[i+1] <= #(DT_PS * real'(STAGE_UNITS[i])) node[i];
  end

  always_comb taps = node[TDC_TAPS:1];
endmodule
