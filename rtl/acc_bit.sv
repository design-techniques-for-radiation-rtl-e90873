// acc_bit: one-bit slice of the loop-filter accumulator.
// A full adder adds input bit a (the phase error bit, or its sign extension)
// and the slice's own stored bit q, with carry ci from the slice below; its
// sum is stored back on the clock edge and its carry co goes to the slice
// above. Sixteen slices stacked make the accumulator. When sat is high the
// register loads sat_val instead of the sum: this is the saturation
// multiplexer of the design's saturating adder, distributed over the slices.
// With TMR = 1 the stored bit is a triplicated register whose voted output
// is the q fed back to the adder, as for the accumulator's upper bits.
// Interface: s - this cycle's sum bit, used by the parent to detect overflow.
// Timing: q updates on the rising edge of clk; s and co are combinational.
module acc_bit #(
  parameter bit TMR = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic a,
  input  logic ci,
  input  logic sat,
  input  logic sat_val,
  output logic s,
  output logic co,
  output logic q
);
  timeunit 1ps; timeprecision 1fs;

  logic d;
  always_comb begin
    s  = a ^ q ^ ci;
    co = (a & q) | (a & ci) | (q & ci);
    d  = sat ? sat_val : s;
  end

  if (TMR) begin : g_tmr
    tmr_reg #(.WIDTH(1)) u_q (.clk, .rst_n, .d, .q);
  end else begin : g_plain
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) q <= 1'b0;
      else        q <= d;
    end
  end
endmodule
