// pfd: three-state phase/frequency detector.
// A rising edge of the reference (ref_in, the R input) sets UP; a rising edge
// of the divided oscillator clock (div_in, the V input) sets DN. As soon as
// both are high they are cleared together through an asynchronous reset. The
// width of the UP (or DN) pulse is therefore the time by which the reference
// leads (or lags) the divided clock. The design gives only the function and
// the R/V/U/D pins; the classic two-flip-flop-and-AND form is this
// implementation's choice. Its reset path has no delay of its own, so with
// aligned inputs both outputs only glitch; a real cell's reset delay is what
// the TDC's matching delay cancels.
// Interface: ref_in, div_in - clocks to compare; rst_n - clears both outputs;
// up, dn - error pulses.
module pfd (
  input  logic ref_in,
  input  logic div_in,
  input  logic rst_n,
  output logic up,
  output logic dn
);
  timeunit 1ps; timeprecision 1fs;

  logic clear;
  always_comb clear = (up & dn) | ~rst_n;

  always_ff @(posedge ref_in or posedge clear) begin
    if (clear) up <= 1'b0;
    else       up <= 1'b1;
  end

  always_ff @(posedge div_in or posedge clear) begin
    if (clear) dn <= 1'b0;
    else       dn <= 1'b1;
  end
endmodule
