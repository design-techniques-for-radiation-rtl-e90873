// tmr_pfd: single-event-tolerant phase/frequency detector.
// Three identical pfd instances see the same reference and divided clock;
// their three UP outputs go to one majority voter and their three DN outputs
// to another. A strike that sets or clears one PFD's state is outvoted, so it
// cannot produce a false phase-error pulse. The structure follows the design.
// Interface and timing are those of pfd, plus the voters' gate delay.
module tmr_pfd (
  input  logic ref_in,
  input  logic div_in,
  input  logic rst_n,
  output logic up,
  output logic dn
);
  timeunit 1ps; timeprecision 1fs;

  logic [2:0] up_copy, dn_copy;

  for (genvar i = 0; i < 3; i++) begin : g_pfd
    pfd u_pfd (.ref_in, .div_in, .rst_n, .up(up_copy[i]), .dn(dn_copy[i]));
  end

  majority_voter #(.WIDTH(1)) u_vote_up (.a(up_copy[0]), .b(up_copy[1]), .c(up_copy[2]), .y(up));
  majority_voter #(.WIDTH(1)) u_vote_dn (.a(dn_copy[0]), .b(dn_copy[1]), .c(dn_copy[2]), .y(dn));
endmodule
