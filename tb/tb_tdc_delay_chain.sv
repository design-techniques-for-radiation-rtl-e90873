// tb_tdc_delay_chain: sends one long pulse into the delay line model and
// checks that tap i rises 2^i unit delays (90 ps each) after the pulse, i.e.
// 90, 180, 360 ... 23040 ps, and falls the same time after the pulse ends.
module tb_tdc_delay_chain;
  timeunit 1ps; timeprecision 1fs;

  logic pulse = 1'b0;
  logic [8:0] taps;
  realtime rise [9], fall [9];
  realtime t0, t1;
  int checks = 0, failures = 0;

  tdc_delay_chain dut (.pulse, .taps);

  for (genvar i = 0; i < 9; i++) begin : g_mon
    always @(posedge taps[i]) rise[i] = $realtime;
    always @(negedge taps[i]) fall[i] = $realtime;
  end

  initial begin
    #1000;
    checks++;
    if (taps !== '0) begin failures++; $display("FAIL taps not low at start"); end
    t0 = $realtime; pulse = 1'b1;
    #30000;
    t1 = $realtime; pulse = 1'b0;
    #30000;
    for (int i = 0; i < 9; i++) begin
      automatic realtime d = 90.0 * real'(1 << i);
      checks += 2;
      if (rise[i] < t0 + d - 0.01 || rise[i] > t0 + d + 0.01) begin
        failures++; $display("FAIL tap %0d rise at +%0.2f ps, expected +%0.2f", i, rise[i] - t0, d);
      end
      if (fall[i] < t1 + d - 0.01 || fall[i] > t1 + d + 0.01) begin
        failures++; $display("FAIL tap %0d fall at +%0.2f ps", i, fall[i] - t1);
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
