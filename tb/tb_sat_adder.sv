// tb_sat_adder: random and corner-case operands on an 11-bit and a 10-bit
// saturating adder. The reference adds in 32-bit integers and clamps to
// [-2^(W-1), 2^(W-1)-1]; the overflow/underflow flags must match the clamp.
module tb_sat_adder;
  timeunit 1ps; timeprecision 1fs;

  logic signed [10:0] a, b, y;
  logic signed [9:0]  a10, b10, y10;
  logic ovf, unf, ovf10, unf10;
  int checks = 0, failures = 0, n_ovf = 0, n_unf = 0;

  sat_adder #(.WIDTH(11)) dut   (.a, .b, .y, .overflow(ovf), .underflow(unf));
  sat_adder #(.WIDTH(10)) dut10 (.a(a10), .b(b10), .y(y10), .overflow(ovf10), .underflow(unf10));

  task automatic try(input int va, input int vb);
    int s, clamped;
    a = 11'(va); b = 11'(vb);
    a10 = 10'(va); b10 = 10'(vb);
    #10;
    s = int'(a) + int'(b);
    clamped = (s > 1023) ? 1023 : (s < -1024) ? -1024 : s;
    checks += 2;
    if (int'(y) != clamped) begin failures++; $display("FAIL %0d + %0d = %0d expected %0d", a, b, y, clamped); end
    if (ovf !== (s > 1023) || unf !== (s < -1024)) begin failures++; $display("FAIL flags for %0d + %0d", a, b); end
    if (s > 1023) n_ovf++;
    if (s < -1024) n_unf++;
    s = int'(a10) + int'(b10);
    clamped = (s > 511) ? 511 : (s < -512) ? -512 : s;
    checks++;
    if (int'(y10) != clamped || ovf10 !== (s > 511) || unf10 !== (s < -512)) begin
      failures++; $display("FAIL 10-bit %0d + %0d = %0d expected %0d", a10, b10, y10, clamped);
    end
  endtask

  initial begin
    try(1023, 1); try(-1024, -1); try(1023, -1024); try(0, 0); try(1023, 1023); try(-1024, -1024);
    try(512, 511); try(512, 512); try(-512, -513);
    for (int n = 0; n < 2000; n++) try(int'($urandom_range(2047, 0)) - 1024, int'($urandom_range(2047, 0)) - 1024);
    checks++;
    if (n_ovf == 0 || n_unf == 0) begin failures++; $display("FAIL saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
