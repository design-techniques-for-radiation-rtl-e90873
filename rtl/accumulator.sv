// accumulator: 16-bit saturating integral accumulator of the loop filter.
// WIDTH acc_bit slices form a ripple-carry adder of the sign-extended phase
// error and the stored sum. The saturating-adder rule watches the sign bits:
// both operands non-negative and a negative sum is overflow, both negative and
// a non-negative sum is underflow; then every slice loads the limit
// (0111..1 or 1000..0) instead of the wrapped sum. The upper TMR_BITS slices
// (ten by default) keep their bit in a triplicated register, because a flip
// there moves the control word far enough to throw the loop out of lock.
// Width, slice structure, saturation and the ten protected MSBs follow the
// design; reset to zero is this implementation's addition.
// Interface: pe - signed input added each clock; acc - stored sum; acc_next -
// the clamped sum that the next edge stores (the adder output node); overflow
// and underflow - high in the cycle whose addition is being clamped.
// Timing: acc takes acc + pe (clamped) at each rising edge of clk.
module accumulator #(
  parameter int unsigned WIDTH    = 16,
  parameter int unsigned IN_W     = 10,
  parameter int unsigned TMR_BITS = 10
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [IN_W-1:0]  pe,
  output logic signed [WIDTH-1:0] acc,
  output logic signed [WIDTH-1:0] acc_next,
  output logic                    overflow,
  output logic                    underflow
);
  timeunit 1ps; timeprecision 1fs;

  logic [WIDTH-1:0] a_ext, s, q;
  logic [WIDTH:0]   carry;
  logic             sat, sat_sign;

  always_comb begin
    a_ext     = WIDTH'(pe);  // sign extension of the signed input
    carry[0]  = 1'b0;
    overflow  = ~a_ext[WIDTH-1] & ~q[WIDTH-1] &  s[WIDTH-1];
    underflow =  a_ext[WIDTH-1] &  q[WIDTH-1] & ~s[WIDTH-1];
    sat       = overflow | underflow;
    sat_sign  = a_ext[WIDTH-1];
    acc       = $signed(q);
    acc_next  = sat ? $signed({sat_sign, {(WIDTH-1){~sat_sign}}}) : $signed(s);
  end

  for (genvar k = 0; k < WIDTH; k++) begin : g_bit
    acc_bit #(.TMR(k >= WIDTH - TMR_BITS)) u_bit (
      .clk, .rst_n,
      .a(a_ext[k]), .ci(carry[k]),
      .sat, .sat_val((k == WIDTH - 1) ? sat_sign : ~sat_sign),
      .s(s[k]), .co(carry[k+1]), .q(q[k])
    );
  end
endmodule
