// sat_adder: saturating two's complement adder.
// A plain WIDTH-bit adder forms s = a + b. Overflow is flagged when both
// inputs are non-negative and the sum's sign bit is set; underflow when both
// are negative and the sum's sign bit is clear; inputs of opposite sign cannot
// overflow. On either event a multiplexer replaces the sum by the limit whose
// sign is that of the inputs: sign bit a[MSB] followed by WIDTH-1 copies of
// its inverse, i.e. the largest (0111..1) or smallest (1000..0) value. This
// is the design's circuit. Purely combinational.
module sat_adder #(
  parameter int unsigned WIDTH = 11
) (
  input  logic signed [WIDTH-1:0] a,
  input  logic signed [WIDTH-1:0] b,
  output logic signed [WIDTH-1:0] y,
  output logic                    overflow,
  output logic                    underflow
);
  timeunit 1ps; timeprecision 1fs;

  logic [WIDTH-1:0] s;
  logic             sa, sb, ss;

  always_comb begin
    s  = a + b;
    sa = a[WIDTH-1];
    sb = b[WIDTH-1];
    ss = s[WIDTH-1];
    overflow  = ~sa & ~sb &  ss;
    underflow =  sa &  sb & ~ss;
    if (overflow | underflow) y = {sa, {(WIDTH-1){~sa}}};
    else                      y = s;
  end
endmodule
