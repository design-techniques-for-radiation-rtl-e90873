// tb_majority_voter: exhaustive check of the 2-of-3 vote on every input
// combination of a 1-bit voter, plus random words on a 12-bit voter, against
// a count-the-ones reference.
module tb_majority_voter;
  timeunit 1ps; timeprecision 1fs;

  logic a1, b1, c1, y1;
  logic [11:0] a, b, c, y, exp_y;
  int checks = 0, failures = 0;

  majority_voter #(.WIDTH(1))  dut1 (.a(a1), .b(b1), .c(c1), .y(y1));
  majority_voter #(.WIDTH(12)) dutw (.a, .b, .c, .y);

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a1, b1, c1} = 3'(v);
      #10;
      checks++;
      if (y1 !== (int'(a1) + int'(b1) + int'(c1) >= 2)) begin
        failures++;
        $display("FAIL vote %b -> %b", v[2:0], y1);
      end
    end
    for (int n = 0; n < 200; n++) begin
      a = 12'($urandom); b = 12'($urandom); c = 12'($urandom);
      for (int i = 0; i < 12; i++) exp_y[i] = (int'(a[i]) + int'(b[i]) + int'(c[i])) > 1;
      #10;
      checks++;
      if (y !== exp_y) begin
        failures++;
        $display("FAIL word vote %h %h %h -> %h expected %h", a, b, c, y, exp_y);
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
