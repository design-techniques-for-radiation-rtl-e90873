// dcao: behavioural model of the digitally controlled analog oscillator.
// Not synthesizable: it stands for a three-stage differential ring
// oscillator of tunable delay cells, whose coarse and fine tuning voltages
// come from two binary-weighted current-mirror DACs driven by the 6-bit words
// coarse and fine. Both DACs are linear in their word, so the model's
// frequency is linear in both:
//   f = F_BASE_MHZ + KC_MHZ * coarse + KF_MHZ * fine.
// The structure (ring oscillator, two 6-bit words) follows the design; the
// design gives no frequencies or gains (in silicon they are set by an
// off-chip resistor), so F_BASE_MHZ, KC_MHZ and KF_MHZ are this model's own:
// 195.2 MHz to 604.4 MHz, 400 MHz at mid-scale, one coarse step equal to the
// full fine range. The output toggles every half period, the period being
// recomputed from the tuning words at every toggle.
// Interface: coarse, fine - tuning words; clk_out - oscillator output, starts
// low at time zero.
module dcao
  import dpll_pkg::*;
#(
  parameter real F_BASE_MHZ = 195.2,
  parameter real KC_MHZ     = 6.4,
  parameter real KF_MHZ     = 0.1
) (
  input  tune_t coarse,
  input  tune_t fine,
  output logic  clk_out
);
  timeunit 1ps; timeprecision 1fs;

  real freq_mhz, half_period_ps;

  always_comb begin
    freq_mhz       = F_BASE_MHZ + KC_MHZ * real'(coarse) + KF_MHZ * real'(fine);
    half_period_ps = 0.5e6 / freq_mhz;
  end

  initial begin
    clk_out = 1'b0;
    forever #(half_period_ps) clk_out = ~clk_out;
  end
endmodule
