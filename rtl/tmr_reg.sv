// tmr_reg: single-event-tolerant register (triplicated flip-flops + vote).
// Three flip-flops share the same clock and D input; their outputs go through
// a majority_voter, so an upset of any single copy never reaches q. Because
// all three copies reload the common d on each clock edge, an upset copy is
// overwritten at the next edge. This replaces every state element the design
// marks as sensitive (divider MSB stages, PFD, TDC MSB latches and sign,
// accumulator MSBs). The asynchronous active-low reset is this
// implementation's addition so that simulation starts from a known state.
// Timing: q follows d one clock edge later, through the voter's gates.
module tmr_reg #(
  parameter int unsigned WIDTH = 1,
  parameter logic [WIDTH-1:0] RESET_VALUE = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  timeunit 1ps; timeprecision 1fs;

  logic [WIDTH-1:0] copy_a, copy_b, copy_c;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      copy_a <= RESET_VALUE;
      copy_b <= RESET_VALUE;
      copy_c <= RESET_VALUE;
    end else begin
      copy_a <= d;
      copy_b <= d;
      copy_c <= d;
    end
  end

  majority_voter #(.WIDTH(WIDTH)) u_vote (.a(copy_a), .b(copy_b), .c(copy_c), .y(q));
endmodule
