// tb_tmr_reg: self-checking test of the triplicated register.
// Loads random words, checks that q follows d one edge later, then models a
// particle strike by forcing one of the three internal copies to a wrong value
// for part of a cycle and checks that q never shows it, and that the upset copy
// is repaired by the next clock edge.
module tb_tmr_reg;
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned W = 8;
  logic clk = 1'b0, rst_n = 1'b1;
  logic [W-1:0] d = '0, q, expect_q;
  int checks = 0, failures = 0;

  tmr_reg #(.WIDTH(W), .RESET_VALUE(8'h5A)) dut (.clk, .rst_n, .d, .q);

  always #5000 clk = ~clk;

  task automatic check(input logic [W-1:0] got, input logic [W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #100 rst_n = 1'b0;
    #900;
    check(q, 8'h5A, "reset value");
    rst_n = 1'b1;
    for (int i = 0; i < 40; i++) begin
      @(negedge clk);
      d = W'($urandom);
      expect_q = d;
      @(posedge clk); #1;
      check(q, expect_q, "load");
      // Strike one copy (rotating which) for a few ns mid-cycle.
      if (i % 3 == 0) force dut.copy_a = ~expect_q;
      if (i % 3 == 1) force dut.copy_b = ~expect_q;
      if (i % 3 == 2) force dut.copy_c = ~expect_q;
      #1000;
      check(q, expect_q, "upset masked");
      release dut.copy_a; release dut.copy_b; release dut.copy_c;
      #100;
      check(q, expect_q, "upset masked after release");
    end
    // After one more edge every copy agrees again.
    @(negedge clk); d = 8'hC3; @(posedge clk); #1;
    check({dut.copy_a == 8'hC3, dut.copy_b == 8'hC3, dut.copy_c == 8'hC3}, 3'b111, "copies repaired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
