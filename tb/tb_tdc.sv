// tb_tdc: the TDC's digital part together with the delay line model. UP or
// DN pulses of random width w are applied (the other input only glitches, as
// from a PFD); the phase error must be +2^i when the reference led (UP wider)
// and -2^i when the divided clock led, i being the last tap whose delay
// 2^i * 90 ps is below w, saturating at 256 and 0 below one unit delay.
// Strikes on one copy of a triplicated latch and of the sign flip-flop must
// not change the phase error.
module tb_tdc;
  timeunit 1ps; timeprecision 1fs;
  import dpll_pkg::*;

  logic rst_n = 1'b1, up = 1'b0, dn = 1'b0, or_pulse, sign;
  logic [8:0] taps, latch_q;
  pe_t pe;
  logic [1:0] flip_v;  // strike values, held by force
  int checks = 0, failures = 0;

  tdc dut (.rst_n, .up, .dn, .or_pulse, .taps, .latch_q, .sign, .pe);
  tdc_delay_chain u_chain (.pulse(or_pulse), .taps);

  function automatic int expected(input real width_ps, input bit negative);
    int mag = 0;
    for (int i = 0; i < 9; i++) if (width_ps > 90.0 * real'(1 << i)) mag = 1 << i;
    return negative ? -mag : mag;
  endfunction

  // A PFD-like event: the leading input rises, after 'width' the lagging one
  // rises and both drop together.
  task automatic event_pulse(input int width, input bit div_leads);
    if (div_leads) dn = 1'b1; else up = 1'b1;
    #(width);
    if (div_leads) up = 1'b1; else dn = 1'b1;
    #1;
    up = 1'b0; dn = 1'b0;
  endtask

  initial begin
    #100 rst_n = 1'b0;
    #100 rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      automatic int  width = (n < 20) ? 45 + 90 * n : int'($urandom_range(26000, 20));
      automatic bit  neg   = 1'($urandom);
      event_pulse(width, neg);
      #100;
      checks++;
      if (int'(pe) != expected(real'(width) + 1.0, neg)) begin
        failures++;
        $display("FAIL width %0d ps neg=%0d: pe=%0d expected %0d", width, neg, pe, expected(real'(width) + 1.0, neg));
      end
      // Strike one copy of a hardened latch and of the sign flip-flop.
      if (n % 5 == 4) begin
        automatic pe_t pe_before = pe;
        begin flip_v[0] = ~dut.g_latch[6].g_tmr.u_lat.copy_b; force dut.g_latch[6].g_tmr.u_lat.copy_b = flip_v[0]; end
        begin flip_v[1] = ~dut.u_sign.copy_a; force dut.u_sign.copy_a = flip_v[1]; end
        #500;
        checks++;
        if (pe !== pe_before) begin failures++; $display("FAIL strike changed pe %0d -> %0d", pe_before, pe); end
        release dut.g_latch[6].g_tmr.u_lat.copy_b;
        release dut.u_sign.copy_a;
      end
      #(30000);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
