// tb_divider_strikes: single-event strikes on every stage of the feedback
// divider of the locked PLL (reference 7 MHz, /64, output 448 MHz).
// A flip of plain stage k (k = 1..3) shifts that toggle stage by half its own
// period, which moves the divided clock by 2^(k-1) oscillator cycles: 1, 2
// and 4 of the 64 in a reference cycle, well under 1/8 of the 142.9 ns
// reference cycle (198 unit delays of 90 ps). The test checks that each such
// strike shows up in the phase error, stays within that bound and that the
// loop relocks. A flip of one copy of the hardened stages 4..6 must not show
// at all. Finally all three copies of stage 6 are flipped together (beyond
// the single-event model) to show the size of error the hardening prevents:
// half a divided period, which drives the TDC to its 256 limit.
module tb_divider_strikes;
  timeunit 1ps; timeprecision 1fs;
  import dpll_pkg::*;

  logic ref_clk = 1'b0, rst_n = 1'b1;
  div_sel_e div_sel = DIV_BY_64;
  logic out_clk, div_clk, up, dn, acc_ovf, acc_unf, sum_ovf, sum_unf;
  pe_t pe;
  ctrl_t ctrl;
  logic [8:0] flip_v;  // strike values, held by force
  int checks = 0, failures = 0;

  dpll_top dut (
    .ref_clk, .rst_n, .div_sel, .out_clk, .div_clk, .up, .dn, .pe, .ctrl,
    .acc_overflow(acc_ovf), .acc_underflow(acc_unf), .sum_overflow(sum_ovf), .sum_underflow(sum_unf)
  );

  always #(1.0e6 / 7.0 / 2.0) ref_clk = ~ref_clk;

  function automatic int abs_i(input int v);
    return v < 0 ? -v : v;
  endfunction

  task automatic wait_lock(input string what);
    int good = 0, n = 0;
    while (good < 50 && n < 3000) begin
      @(posedge ref_clk); #1;
      n++;
      good = (abs_i(int'(pe)) <= 2) ? good + 1 : 0;
    end
    checks++;
    if (good < 50) begin failures++; $display("FAIL no lock %s", what); end
  endtask

  task automatic worst_error(output int worst);
    worst = 0;
    repeat (100) begin
      @(posedge ref_clk); #1;
      if (abs_i(int'(pe)) > worst) worst = abs_i(int'(pe));
    end
  endtask

  task automatic settle();
    @(posedge ref_clk);
    #20000;
  endtask

  initial begin
    int worst;
    #100 rst_n = 1'b0;
    #100 rst_n = 1'b1;
    wait_lock("initial");

    for (int k = 0; k < 3; k++) begin
      settle();
      case (k)
        0: begin flip_v[0] = ~dut.u_core.u_div.g_stage[0].g_plain.u_div.clk_out; force dut.u_core.u_div.g_stage[0].g_plain.u_div.clk_out = flip_v[0]; end
        1: begin flip_v[1] = ~dut.u_core.u_div.g_stage[1].g_plain.u_div.clk_out; force dut.u_core.u_div.g_stage[1].g_plain.u_div.clk_out = flip_v[1]; end
        default: begin flip_v[2] = ~dut.u_core.u_div.g_stage[2].g_plain.u_div.clk_out; force dut.u_core.u_div.g_stage[2].g_plain.u_div.clk_out = flip_v[2]; end
      endcase
      #10;
      release dut.u_core.u_div.g_stage[0].g_plain.u_div.clk_out;
      release dut.u_core.u_div.g_stage[1].g_plain.u_div.clk_out;
      release dut.u_core.u_div.g_stage[2].g_plain.u_div.clk_out;
      worst_error(worst);
      $display("strike on plain stage %0d: worst phase error %0d unit delays", k + 1, worst);
      checks += 2;
      if (worst == 0) begin failures++; $display("FAIL strike on stage %0d had no effect", k + 1); end
      if (worst > 198) begin failures++; $display("FAIL strike on stage %0d exceeded 1/8 cycle", k + 1); end
      wait_lock("after plain strike");
    end

    for (int k = 3; k < 6; k++) begin
      settle();
      case (k)
        3: begin flip_v[3] = ~dut.u_core.u_div.g_stage[3].g_tmr.u_div.u_reg.copy_a; force dut.u_core.u_div.g_stage[3].g_tmr.u_div.u_reg.copy_a = flip_v[3]; end
        4: begin flip_v[4] = ~dut.u_core.u_div.g_stage[4].g_tmr.u_div.u_reg.copy_b; force dut.u_core.u_div.g_stage[4].g_tmr.u_div.u_reg.copy_b = flip_v[4]; end
        default: begin flip_v[5] = ~dut.u_core.u_div.g_stage[5].g_tmr.u_div.u_reg.copy_c; force dut.u_core.u_div.g_stage[5].g_tmr.u_div.u_reg.copy_c = flip_v[5]; end
      endcase
      #10;
      release dut.u_core.u_div.g_stage[3].g_tmr.u_div.u_reg.copy_a;
      release dut.u_core.u_div.g_stage[4].g_tmr.u_div.u_reg.copy_b;
      release dut.u_core.u_div.g_stage[5].g_tmr.u_div.u_reg.copy_c;
      worst_error(worst);
      $display("strike on one copy of hardened stage %0d: worst phase error %0d", k + 1, worst);
      checks++;
      if (worst > 2) begin failures++; $display("FAIL strike on hardened stage %0d was visible", k + 1); end
    end

    // All three copies of the last stage at once.
    settle();
    begin flip_v[6] = ~dut.u_core.u_div.g_stage[5].g_tmr.u_div.u_reg.copy_a; force dut.u_core.u_div.g_stage[5].g_tmr.u_div.u_reg.copy_a = flip_v[6]; end
    begin flip_v[7] = ~dut.u_core.u_div.g_stage[5].g_tmr.u_div.u_reg.copy_b; force dut.u_core.u_div.g_stage[5].g_tmr.u_div.u_reg.copy_b = flip_v[7]; end
    begin flip_v[8] = ~dut.u_core.u_div.g_stage[5].g_tmr.u_div.u_reg.copy_c; force dut.u_core.u_div.g_stage[5].g_tmr.u_div.u_reg.copy_c = flip_v[8]; end
    #1000;
    release dut.u_core.u_div.g_stage[5].g_tmr.u_div.u_reg.copy_a;
    release dut.u_core.u_div.g_stage[5].g_tmr.u_div.u_reg.copy_b;
    release dut.u_core.u_div.g_stage[5].g_tmr.u_div.u_reg.copy_c;
    worst_error(worst);
    $display("flip of all three copies of stage 6: worst phase error %0d", worst);
    checks++;
    if (worst != 256) begin failures++; $display("FAIL triple flip expected to saturate the TDC"); end
    wait_lock("after triple flip");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
