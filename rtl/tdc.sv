// tdc: digital part of the time-to-digital converter (phase error word).
// The UP and DN pulses of the PFD are ORed into one pulse as wide as the
// wider of the two. That pulse leaves this module on or_pulse to the analog
// matching delay and exponential delay chain (tdc_delay_chain), whose delayed
// copies come back on taps. On the falling edge of the OR pulse (rising edge
// of its inverse) TAPS latches capture the taps: the number that are high
// measures the pulse width in delay units. A separate flip-flop clocked by
// UP samples DN: it is high (negative error) when DN started first, i.e. when
// the divided clock leads the reference. thermo_encoder turns latches and sign
// into a 10-bit two's complement phase error.
// Hardening follows the design: the sign flip-flop and the latches from
// index TMR_FROM upwards (the most significant taps) are triplicated with a
// majority vote; the first TMR_FROM latches stay single. The active-low reset
// is this implementation's addition.
// Timing: pe is valid shortly after the falling edge of the OR pulse and holds
// until the next one.
module tdc
  import dpll_pkg::*;
#(
  parameter int unsigned TAPS     = TDC_TAPS,
  parameter int unsigned TMR_FROM = 2
) (
  input  logic            rst_n,
  input  logic            up,
  input  logic            dn,
  output logic            or_pulse,
  input  logic [TAPS-1:0] taps,
  output logic [TAPS-1:0] latch_q,
  output logic            sign,
  output pe_t             pe
);
  timeunit 1ps; timeprecision 1fs;

  logic sample_clk;
  always_comb begin
    or_pulse   = up | dn;
    sample_clk = ~or_pulse;
  end

  for (genvar i = 0; i < TAPS; i++) begin : g_latch
    if (i >= TMR_FROM) begin : g_tmr
      tmr_reg #(.WIDTH(1)) u_lat (.clk(sample_clk), .rst_n, .d(taps[i]), .q(latch_q[i]));
    end else begin : g_plain
      always_ff @(posedge sample_clk or negedge rst_n) begin
        if (!rst_n) latch_q[i] <= 1'b0;
        else        latch_q[i] <= taps[i];
      end
    end
  end

  tmr_reg #(.WIDTH(1)) u_sign (.clk(up), .rst_n, .d(dn), .q(sign));

  thermo_encoder #(.TAPS(TAPS), .OUT_W(PE_W)) u_enc (.latch_q, .sign, .pe);
endmodule
