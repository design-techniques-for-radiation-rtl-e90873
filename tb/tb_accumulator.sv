// tb_accumulator: random 10-bit signed inputs, with long runs of one sign so
// the 16-bit sum reaches both limits. A reference accumulator clamps to
// [-32768, 32767]; acc, acc_next and the overflow/underflow flags must match
// it every cycle. Strikes on one copy of protected MSB slices must not show.
module tb_accumulator;
  timeunit 1ps; timeprecision 1fs;

  logic clk = 1'b0, rst_n = 1'b1;
  logic signed [9:0]  pe;
  logic signed [15:0] acc, acc_next;
  logic ovf, unf;
  logic [1:0] flip_v;  // strike values, held by force
  int model = 0, checks = 0, failures = 0, n_ovf = 0, n_unf = 0;

  accumulator dut (.clk, .rst_n, .pe, .acc, .acc_next, .overflow(ovf), .underflow(unf));

  always #5000 clk = ~clk;

  initial begin
    pe = '0;
    #100 rst_n = 1'b0;
    #100 rst_n = 1'b1;
    for (int n = 0; n < 1800; n++) begin
      automatic int s, clamped;
      @(negedge clk);
      case ((n / 300) % 3)
        0: pe = 10'($urandom_range(511, 100));            // drive up to the top
        1: pe = 10'(-int'($urandom_range(512, 100)));     // then down to the bottom
        default: pe = 10'(int'($urandom_range(1023, 0)) - 512);
      endcase
      #10;
      s = model + int'(pe);
      clamped = (s > 32767) ? 32767 : (s < -32768) ? -32768 : s;
      checks += 3;
      if (int'(acc) != model) begin failures++; $display("FAIL acc %0d expected %0d", acc, model); end
      if (int'(acc_next) != clamped) begin failures++; $display("FAIL acc_next %0d expected %0d", acc_next, clamped); end
      if (ovf !== (s > 32767) || unf !== (s < -32768)) begin failures++; $display("FAIL flags at %0d + %0d", model, pe); end
      if (s > 32767) n_ovf++;
      if (s < -32768) n_unf++;
      if (n % 11 == 5) begin
        begin flip_v[0] = ~dut.g_bit[15].u_bit.g_tmr.u_q.copy_a; force dut.g_bit[15].u_bit.g_tmr.u_q.copy_a = flip_v[0]; end
        begin flip_v[1] = ~dut.g_bit[9].u_bit.g_tmr.u_q.copy_b; force dut.g_bit[9].u_bit.g_tmr.u_q.copy_b = flip_v[1]; end
        #100;
        checks++;
        if (int'(acc) != model) begin failures++; $display("FAIL strike visible: %0d", acc); end
        release dut.g_bit[15].u_bit.g_tmr.u_q.copy_a;
        release dut.g_bit[9].u_bit.g_tmr.u_q.copy_b;
      end
      model = clamped;
    end
    checks++;
    if (n_ovf == 0 || n_unf == 0) begin failures++; $display("FAIL saturation not reached (%0d, %0d)", n_ovf, n_unf); end
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
