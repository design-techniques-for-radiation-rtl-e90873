// dpll_pkg: word widths, loop-filter gains and shared types of the radiation
// hardened digital PLL.
// The widths follow the design: a 10-bit signed phase error from the TDC, a
// 16-bit integral accumulator, an 11-bit proportional+integral adder, a 10-bit
// unsigned control word and two 6-bit DCAO tuning words. The divider select
// encoding (DIV1:DIV0 = 00/01/10/11 -> /8,/16,/32,/64) is the design's table.
// The mapping of the 10-bit control word onto the two 6-bit tuning words is
// this implementation's own choice (see dpll_core).
package dpll_pkg;
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned PE_W       = 10;  // TDC phase error, two's complement
  localparam int unsigned ACC_W      = 16;  // integral accumulator
  localparam int unsigned CTRL_W     = 10;  // DCAO control word, unsigned
  localparam int unsigned TUNE_W     = 6;   // coarse / fine tuning word
  localparam int unsigned TDC_TAPS   = 9;   // latches on the exponential delay chain
  localparam int unsigned BETA_SHIFT = 5;   // integral gain beta = 2^-5
  localparam int unsigned DIV_STAGES = 6;   // cascaded divide-by-two stages

  typedef logic signed [PE_W-1:0]  pe_t;
  typedef logic signed [ACC_W-1:0] acc_t;
  typedef logic [CTRL_W-1:0]       ctrl_t;
  typedef logic [TUNE_W-1:0]       tune_t;

  // Divider select, DIV1:DIV0.
  typedef enum logic [1:0] {
    DIV_BY_8  = 2'b00,
    DIV_BY_16 = 2'b01,
    DIV_BY_32 = 2'b10,
    DIV_BY_64 = 2'b11
  } div_sel_e;
endpackage
