// tmr_div2_stage: single-event-tolerant divide-by-two stage.
// The toggle flip-flop of div2_stage is replaced by a tmr_reg: three copies
// clocked by clk_in, a majority decision on their outputs, and the voted
// output inverted and fed back as the common D. A strike on one copy is
// outvoted at once, and the common feedback reloads the struck copy with the
// correct phase at the next edge, so the divided clock never loses a cycle.
// Taking the feedback from the voted output (rather than giving each copy its
// own loop) is this implementation's choice; it keeps the copies in step.
// Interface and timing are those of div2_stage.
module tmr_div2_stage (
  input  logic clk_in,
  input  logic rst_n,
  output logic clk_out
);
  timeunit 1ps; timeprecision 1fs;

  logic toggled;
  always_comb toggled = ~clk_out;

  tmr_reg #(.WIDTH(1)) u_reg (.clk(clk_in), .rst_n, .d(toggled), .q(clk_out));
endmodule
