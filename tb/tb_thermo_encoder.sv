// tb_thermo_encoder: every thermometer code of the nine tap latches (k of
// them high, k = 0..9) with either sign must give a phase error of +-2^(k-1)
// (0 for k = 0), in 10-bit two's complement.
module tb_thermo_encoder;
  timeunit 1ps; timeprecision 1fs;

  logic [8:0] latch_q;
  logic sign;
  logic signed [9:0] pe;
  int checks = 0, failures = 0;

  thermo_encoder dut (.latch_q, .sign, .pe);

  initial begin
    for (int k = 0; k <= 9; k++) begin
      for (int s = 0; s < 2; s++) begin
        automatic int mag = (k == 0) ? 0 : (1 << (k - 1));
        automatic int expect_pe = s ? -mag : mag;
        latch_q = 9'((1 << k) - 1);
        sign = s[0];
        #10;
        checks++;
        if (int'(pe) != expect_pe) begin
          failures++;
          $display("FAIL k=%0d sign=%0d: pe=%0d expected %0d", k, s, pe, expect_pe);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
