// tb_freq_divider: for each select value the number of input rising edges
// between two output rising edges must be 8, 16, 32 or 64 (DIV1:DIV0 = 00, 01,
// 10, 11), and the output duty cycle 50%. Then, with /64 selected, one copy
// of each hardened stage is struck in turn: the divided period must not change.
module tb_freq_divider;
  timeunit 1ps; timeprecision 1fs;
  import dpll_pkg::*;

  logic clk_in = 1'b0, rst_n = 1'b1, clk_out;
  div_sel_e div_sel = DIV_BY_8;
  logic [2:0] flip_v;  // strike values, held by force
  int checks = 0, failures = 0, in_count = 0;

  freq_divider dut (.clk_in, .rst_n, .div_sel, .clk_out);

  always #1250 clk_in = ~clk_in;
  always @(posedge clk_in) in_count++;

  task automatic measure(input int expect_ratio, input string what);
    int start, high_start, high_len, period;
    @(posedge clk_out); start = in_count;
    @(negedge clk_out); high_len = in_count - start;
    @(posedge clk_out); period = in_count - start;
    checks += 2;
    if (period != expect_ratio) begin
      failures++;
      $display("FAIL %s: period %0d input cycles, expected %0d", what, period, expect_ratio);
    end
    if (high_len != expect_ratio / 2) begin
      failures++;
      $display("FAIL %s: high for %0d cycles", what, high_len);
    end
  endtask

  initial begin
    automatic div_sel_e sel [4] = '{DIV_BY_8, DIV_BY_16, DIV_BY_32, DIV_BY_64};
    automatic int ratio [4] = '{8, 16, 32, 64};
    #100 rst_n = 1'b0;
    #200 rst_n = 1'b1;
    for (int s = 0; s < 4; s++) begin
      div_sel = sel[s];
      @(posedge clk_out);  // let the multiplexer settle on the new tap
      for (int r = 0; r < 3; r++) measure(ratio[s], "ratio");
    end
    // Strikes on the hardened stages (4, 5, 6) while dividing by 64.
    div_sel = DIV_BY_64;
    @(posedge clk_out);
    for (int k = 3; k < 6; k++) begin
      @(posedge clk_out);
      repeat (5) @(posedge clk_in);
      #300;
      case (k)
        3: begin flip_v[0] = ~dut.g_stage[3].g_tmr.u_div.u_reg.copy_b; force dut.g_stage[3].g_tmr.u_div.u_reg.copy_b = flip_v[0]; end
        4: begin flip_v[1] = ~dut.g_stage[4].g_tmr.u_div.u_reg.copy_a; force dut.g_stage[4].g_tmr.u_div.u_reg.copy_a = flip_v[1]; end
        default: begin flip_v[2] = ~dut.g_stage[5].g_tmr.u_div.u_reg.copy_c; force dut.g_stage[5].g_tmr.u_div.u_reg.copy_c = flip_v[2]; end
      endcase
      #1500;
      release dut.g_stage[3].g_tmr.u_div.u_reg.copy_b;
      release dut.g_stage[4].g_tmr.u_div.u_reg.copy_a;
      release dut.g_stage[5].g_tmr.u_div.u_reg.copy_c;
      measure(64, "after strike");
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
