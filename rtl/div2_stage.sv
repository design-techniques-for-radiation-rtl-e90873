// div2_stage: one divide-by-two stage of the feedback divider.
// A single flip-flop with its inverted output fed back to D toggles on every
// rising edge of clk_in, so clk_out runs at half the input frequency with a
// 50% duty cycle. In silicon this is a true-single-phase-clock flip-flop; here
// it is an ordinary edge-triggered register. The asynchronous active-low
// reset (output low) is this implementation's addition for a known start state.
// Interface: clk_in - input clock; clk_out - divided clock, changes right
// after each rising edge of clk_in.
module div2_stage (
  input  logic clk_in,
  input  logic rst_n,
  output logic clk_out
);
  timeunit 1ps; timeprecision 1fs;

  always_ff @(posedge clk_in or negedge rst_n) begin
    if (!rst_n) clk_out <= 1'b0;
    else        clk_out <= ~clk_out;
  end
endmodule
