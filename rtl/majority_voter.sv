// majority_voter: bitwise two-out-of-three majority decision.
// Each output bit is high when at least two of the three corresponding input
// bits are high, so a single corrupted copy is outvoted. This is the
// majority-decision element of the triple-redundancy scheme; the truth table
// F = AB + BC + CA is the design's. Purely combinational, no clock.
// Interface: a, b, c - the three copies (WIDTH bits each); y - voted value.
module majority_voter #(
  parameter int unsigned WIDTH = 1
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] c,
  output logic [WIDTH-1:0] y
);
  timeunit 1ps; timeprecision 1fs;

  always_comb y = (a & b) | (b & c) | (c & a);
endmodule
