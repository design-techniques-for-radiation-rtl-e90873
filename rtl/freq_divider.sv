// freq_divider: programmable feedback divider, ratio 8, 16, 32 or 64.
// Six divide-by-two stages are cascaded as a ripple counter: stage k is
// clocked by the output of stage k-1, so stage k's output is the input divided
// by 2^(k+1). A 4:1 multiplexer picks the /8, /16, /32 or /64 tap according to
// div_sel (DIV1:DIV0 = 00, 01, 10, 11). The first stages are plain; the last
// HARDENED stages (three by default: /16, /32, /64) are triplicated with a
// majority vote, trading the power of the fast stages against the phase error
// a strike there can cause. All of this follows the design; the reset input
// is this implementation's addition.
// Interface: clk_in - oscillator output; div_sel - ratio select; clk_out -
// divided clock. Timing: each stage adds one clock-to-Q of ripple delay.
module freq_divider
  import dpll_pkg::*;
#(
  parameter int unsigned STAGES   = DIV_STAGES,
  parameter int unsigned HARDENED = 3
) (
  input  logic     clk_in,
  input  logic     rst_n,
  input  div_sel_e div_sel,
  output logic     clk_out
);
  timeunit 1ps; timeprecision 1fs;

  // tap[0] is the input, tap[k] the input divided by 2^k.
  logic [STAGES:0] tap;
  assign tap[0] = clk_in;

  for (genvar k = 0; k < STAGES; k++) begin : g_stage
    if (k >= STAGES - HARDENED) begin : g_tmr
      tmr_div2_stage u_div (.clk_in(tap[k]), .rst_n, .clk_out(tap[k+1]));
    end else begin : g_plain
      div2_stage u_div (.clk_in(tap[k]), .rst_n, .clk_out(tap[k+1]));
    end
  end

  always_comb begin
    unique case (div_sel)
      DIV_BY_8:  clk_out = tap[3];
      DIV_BY_16: clk_out = tap[4];
      DIV_BY_32: clk_out = tap[5];
      DIV_BY_64: clk_out = tap[6];
      default:   clk_out = tap[3];
    endcase
  end
endmodule
