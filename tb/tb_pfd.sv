// tb_pfd: drives the reference and the divided clock at the same frequency
// with a chosen skew. When the reference leads by t, UP must be a single
// pulse of width t and DN must stay low apart from zero-width glitches; when
// the divided clock leads, the roles swap. With the reference at a higher
// frequency than the divided clock, UP must be high for longer in total than
// DN (frequency detection).
module tb_pfd;
  timeunit 1ps; timeprecision 1fs;

  logic ref_in = 1'b0, div_in = 1'b0, rst_n = 1'b1, up, dn;
  int checks = 0, failures = 0;
  realtime up_rise, dn_rise, up_width, dn_width, up_total, dn_total;

  pfd dut (.ref_in, .div_in, .rst_n, .up, .dn);

  always @(posedge up) up_rise = $realtime;
  always @(negedge up) begin up_width = $realtime - up_rise; up_total += up_width; end
  always @(posedge dn) dn_rise = $realtime;
  always @(negedge dn) begin dn_width = $realtime - dn_rise; dn_total += dn_width; end

  task automatic check_width(input realtime got, input realtime exp, input string what);
    checks++;
    if (got < exp - 1.0 || got > exp + 1.0) begin
      failures++;
      $display("FAIL %s: width %0.1f ps, expected %0.1f", what, got, exp);
    end
  endtask

  initial begin
    #100 rst_n = 1'b0;
    #100 rst_n = 1'b1;
    checks++;
    if (up !== 1'b0 || dn !== 1'b0) begin failures++; $display("FAIL reset"); end
    for (int n = 0; n < 30; n++) begin
      automatic int skew = int'($urandom_range(4000, 100));
      automatic bit ref_leads = n[0];
      up_width = 0; dn_width = 0;
      // Reference first by 'skew', or divided clock first.
      fork
        begin #(ref_leads ? 1000 : 1000 + skew); ref_in = 1'b1; #5000 ref_in = 1'b0; end
        begin #(ref_leads ? 1000 + skew : 1000); div_in = 1'b1; #5000 div_in = 1'b0; end
      join
      #4000;
      if (ref_leads) begin
        check_width(up_width, real'(skew), "UP width");
        check_width(dn_width, 0.0, "DN width");
      end else begin
        check_width(dn_width, real'(skew), "DN width");
        check_width(up_width, 0.0, "UP width");
      end
      checks++;
      if (up !== 1'b0 || dn !== 1'b0) begin failures++; $display("FAIL not cleared"); end
    end
    // Frequency detection: reference period 9 ns, divided clock 11 ns.
    up_total = 0; dn_total = 0;
    fork
      repeat (40) begin #4500 ref_in = 1'b1; #4500 ref_in = 1'b0; end
      repeat (33) begin #5500 div_in = 1'b1; #5500 div_in = 1'b0; end
    join
    checks++;
    if (!(up_total > 4.0 * dn_total)) begin
      failures++;
      $display("FAIL frequency detection: UP %0.0f ps, DN %0.0f ps", up_total, dn_total);
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
