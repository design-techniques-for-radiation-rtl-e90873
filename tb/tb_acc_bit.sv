// tb_acc_bit: a plain and a triplicated one-bit accumulator slice get random
// a, ci, sat and sat_val each cycle. Sum and carry must be those of a full
// adder of a, the stored bit and ci; the stored bit must become the sum, or
// sat_val when sat is high. A strike on one copy of the triplicated slice
// must not show on q.
module tb_acc_bit;
  timeunit 1ps; timeprecision 1fs;

  logic clk = 1'b0, rst_n = 1'b1;
  logic a, ci, sat, sat_val;
  logic s0, co0, q0, s1, co1, q1;
  logic model0 = 1'b0, model1 = 1'b0;
  int checks = 0, failures = 0;

  acc_bit #(.TMR(1'b0)) dut0 (.clk, .rst_n, .a, .ci, .sat, .sat_val, .s(s0), .co(co0), .q(q0));
  acc_bit #(.TMR(1'b1)) dut1 (.clk, .rst_n, .a, .ci, .sat, .sat_val, .s(s1), .co(co1), .q(q1));

  always #5000 clk = ~clk;

  initial begin
    {a, ci, sat, sat_val} = '0;
    #100 rst_n = 1'b0;
    #100 rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      {a, ci, sat, sat_val} = 4'($urandom);
      #10;
      checks += 2;
      if ({co0, s0} !== 2'(int'(a) + int'(ci) + int'(model0)) || q0 !== model0) begin
        failures++; $display("FAIL plain slice: a=%b ci=%b q=%b -> co=%b s=%b", a, ci, q0, co0, s0);
      end
      if ({co1, s1} !== 2'(int'(a) + int'(ci) + int'(model1)) || q1 !== model1) begin
        failures++; $display("FAIL tmr slice: a=%b ci=%b q=%b -> co=%b s=%b", a, ci, q1, co1, s1);
      end
      if (n % 7 == 3) begin
        force dut1.g_tmr.u_q.copy_c = ~model1;
        #100;
        checks++;
        if (q1 !== model1) begin failures++; $display("FAIL strike visible"); end
        release dut1.g_tmr.u_q.copy_c;
      end
      model0 = sat ? sat_val : (a ^ ci ^ model0);
      model1 = sat ? sat_val : (a ^ ci ^ model1);
    end
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
