// tb_div2_stage: the divide-by-two stage must reset low and then toggle on
// every rising input edge, giving exactly one output rising edge per two
// input rising edges, and must not change on falling input edges.
module tb_div2_stage;
  timeunit 1ps; timeprecision 1fs;

  logic clk_in = 1'b0, rst_n = 1'b1, clk_out;
  logic model = 1'b0;
  int checks = 0, failures = 0, in_rises = 0, out_rises = 0;

  div2_stage dut (.clk_in, .rst_n, .clk_out);

  always #1250 clk_in = ~clk_in;
  always @(posedge clk_out) out_rises++;

  initial begin
    #100 rst_n = 1'b0;
    #200;
    checks++;
    if (clk_out !== 1'b0) begin failures++; $display("FAIL reset"); end
    @(negedge clk_in) rst_n = 1'b1;
    for (int i = 0; i < 100; i++) begin
      @(posedge clk_in); in_rises++; model = ~model; #10;
      checks++;
      if (clk_out !== model) begin failures++; $display("FAIL edge %0d: out %b", i, clk_out); end
      @(negedge clk_in); #10;
      checks++;
      if (clk_out !== model) begin failures++; $display("FAIL output moved on falling edge %0d", i); end
    end
    checks++;
    if (out_rises != in_rises / 2) begin
      failures++;
      $display("FAIL ratio: %0d input rises, %0d output rises", in_rises, out_rises);
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
