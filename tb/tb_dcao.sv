// tb_dcao: sets random coarse and fine words and measures the oscillator's
// period over 64 cycles; it must match 1 / (195.2 MHz + 6.4 MHz * coarse +
// 0.1 MHz * fine) to within 0.1%. Also checks the extremes of the range and
// that a larger control word always gives a higher frequency.
module tb_dcao;
  timeunit 1ps; timeprecision 1fs;
  import dpll_pkg::*;

  tune_t coarse = '0, fine = '0;
  logic clk_out;
  int checks = 0, failures = 0;
  real last_f = 0.0;

  dcao dut (.coarse, .fine, .clk_out);

  task automatic measure(input int c, input int f);
    realtime t0, t1;
    real expect_mhz, got_mhz;
    coarse = TUNE_W'(c); fine = TUNE_W'(f);
    repeat (2) @(posedge clk_out);
    t0 = $realtime;
    repeat (64) @(posedge clk_out);
    t1 = $realtime;
    got_mhz = 64.0e6 / (t1 - t0);
    expect_mhz = 195.2 + 6.4 * real'(c) + 0.1 * real'(f);
    checks++;
    if (got_mhz < expect_mhz * 0.999 || got_mhz > expect_mhz * 1.001) begin
      failures++;
      $display("FAIL coarse=%0d fine=%0d: %0.3f MHz expected %0.3f", c, f, got_mhz, expect_mhz);
    end
  endtask

  initial begin
    measure(0, 0);
    measure(63, 63);
    measure(32, 0);
    for (int n = 0; n < 20; n++) measure(int'($urandom_range(63, 0)), int'($urandom_range(63, 0)));
    // Monotonic in the 10-bit control word mapped as coarse = w[9:4], fine = {w[3:0], 00}.
    for (int w = 0; w < 1024; w += 37) begin
      realtime t0;
      real f_now;
      coarse = TUNE_W'(w >> 4); fine = TUNE_W'((w & 15) << 2);
      repeat (2) @(posedge clk_out);
      t0 = $realtime;
      repeat (16) @(posedge clk_out);
      f_now = 16.0e6 / ($realtime - t0);
      checks++;
      if (f_now <= last_f) begin failures++; $display("FAIL not monotonic at %0d", w); end
      last_f = f_now;
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
