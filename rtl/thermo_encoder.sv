// thermo_encoder: pseudo-thermometer encoder of the time-to-digital converter.
// The tap latches hold a thermometer code: latch i is high when the error
// pulse outlasted the cumulative delay to tap i. The exponential delay chain
// puts tap i at 2^i unit delays (1, 2, 4, ... 256 dT), so the pulse width lies
// between the delay of the last high tap and twice that. The encoder reports
// the delay of the last high tap: magnitude bit i = latch[i] AND NOT
// latch[i+1], a one-hot word needing one gate per bit. The sign bit then
// selects the magnitude or its two's complement negative. Output range is
// -256..+256 in a 10-bit two's complement word, as in the design; the one-hot
// rule is this implementation's reading of "pseudo-thermometer".
// Purely combinational.
module thermo_encoder
  import dpll_pkg::*;
#(
  parameter int unsigned TAPS  = TDC_TAPS,
  parameter int unsigned OUT_W = PE_W
) (
  input  logic [TAPS-1:0]         latch_q,
  input  logic                    sign,    // 1: divided clock leads, negative error
  output logic signed [OUT_W-1:0] pe
);
  timeunit 1ps; timeprecision 1fs;

  logic [TAPS-1:0] magnitude;

  always_comb begin
    for (int i = 0; i < TAPS - 1; i++) magnitude[i] = latch_q[i] & ~latch_q[i+1];
    magnitude[TAPS-1] = latch_q[TAPS-1];
    pe = sign ? -$signed(OUT_W'(magnitude)) : $signed(OUT_W'(magnitude));
  end
endmodule
