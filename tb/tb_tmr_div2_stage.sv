// tb_tmr_div2_stage: the hardened divide-by-two stage must divide by two, and
// a strike that flips one of its three flip-flops (modelled by forcing that
// copy to the wrong phase for a while) must not change the output at all; the
// copy must be back in step after the next input edge.
module tb_tmr_div2_stage;
  timeunit 1ps; timeprecision 1fs;

  logic clk_in = 1'b0, rst_n = 1'b1, clk_out;
  logic model = 1'b0;
  int checks = 0, failures = 0;

  tmr_div2_stage dut (.clk_in, .rst_n, .clk_out);

  always #1250 clk_in = ~clk_in;

  initial begin
    #100 rst_n = 1'b0;
    #200 rst_n = 1'b1;
    for (int i = 0; i < 120; i++) begin
      @(posedge clk_in); model = ~model; #10;
      checks++;
      if (clk_out !== model) begin failures++; $display("FAIL edge %0d", i); end
      if (i % 10 == 5) begin
        // Upset one copy (rotating) for most of a cycle.
        case ((i / 10) % 3)
          0: force dut.u_reg.copy_a = ~model;
          1: force dut.u_reg.copy_b = ~model;
          default: force dut.u_reg.copy_c = ~model;
        endcase
        #800;
        checks++;
        if (clk_out !== model) begin failures++; $display("FAIL upset visible at edge %0d", i); end
        release dut.u_reg.copy_a; release dut.u_reg.copy_b; release dut.u_reg.copy_c;
      end
      if (i % 10 == 6) begin
        checks++;
        if (!(dut.u_reg.copy_a == model && dut.u_reg.copy_b == model && dut.u_reg.copy_c == model)) begin
          failures++;
          $display("FAIL copies not resynchronised at edge %0d", i);
        end
      end
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
