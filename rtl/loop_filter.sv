// loop_filter: digital proportional-integral loop filter of the PLL.
// The 10-bit signed phase error pe feeds two paths. The integral path is the
// 16-bit saturating accumulator; its adder output (the value being stored,
// i.e. all past errors plus the present one) is scaled by beta = 2^-5 by
// taking its upper 11 bits. The proportional path has gain alpha = 1: pe is
// just sign-extended to 11 bits. An 11-bit saturating adder sums the two, and
// the normalising gain Gn = 0.5 drops the sum's LSB, giving a 10-bit word.
// All gains, widths and the saturating adders follow the design. The design
// calls the control word unsigned without saying how the signed sum becomes
// unsigned; here the sign bit is inverted (offset binary), so a zero sum
// gives mid-scale 512. The output is combinational from pe and the
// accumulator, with no output register, so the proportional path acts at
// once.
// Interface: clk - one accumulation per rising edge (the TDC sample clock in
// dpll_core); pe - phase error; ctrl - DCAO control word; sat_* - flags
// raised while an adder is clamping.
module loop_filter
  import dpll_pkg::*;
#(
  parameter int unsigned ACC_BITS = ACC_W,
  parameter int unsigned SHIFT    = BETA_SHIFT,
  parameter int unsigned TMR_BITS = 10
) (
  input  logic  clk,
  input  logic  rst_n,
  input  pe_t   pe,
  output ctrl_t ctrl,
  output logic  acc_overflow,
  output logic  acc_underflow,
  output logic  sum_overflow,
  output logic  sum_underflow
);
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned SW = ACC_BITS - SHIFT;  // width of the beta-scaled path

  logic signed [ACC_BITS-1:0] acc_next;  // low SHIFT bits are dropped by beta
  logic signed [SW-1:0]       prop, integ, sum;

  accumulator #(.WIDTH(ACC_BITS), .IN_W(PE_W), .TMR_BITS(TMR_BITS)) u_acc (
    .clk, .rst_n, .pe, .acc(), .acc_next,
    .overflow(acc_overflow), .underflow(acc_underflow)
  );

  always_comb begin
    prop  = SW'(pe);                       // alpha = 1
    integ = acc_next[ACC_BITS-1:SHIFT];    // beta = 2^-SHIFT
  end

  sat_adder #(.WIDTH(SW)) u_sum (
    .a(prop), .b(integ), .y(sum), .overflow(sum_overflow), .underflow(sum_underflow)
  );

  // Gn = 0.5: drop the LSB; then signed -> offset binary.
  always_comb ctrl = {~sum[SW-1], sum[SW-2:SW-CTRL_W]};
endmodule
