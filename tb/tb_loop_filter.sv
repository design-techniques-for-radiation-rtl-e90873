// tb_loop_filter: random phase errors, including long one-signed runs that
// drive the accumulator and the 11-bit adder into saturation. Reference:
//   acc'  = clamp16(acc + pe)                (stored at each clock)
//   sum   = clamp11(pe + floor(acc' / 32))   (alpha = 1, beta = 2^-5)
//   ctrl  = floor(sum / 2) + 512             (Gn = 0.5, offset binary)
// ctrl is checked before and after every clock edge, so the one-accumulation-
// per-edge rate is checked as well.
module tb_loop_filter;
  timeunit 1ps; timeprecision 1fs;
  import dpll_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  pe_t pe;
  ctrl_t ctrl;
  logic acc_ovf, acc_unf, sum_ovf, sum_unf;
  int acc_model = 0, checks = 0, failures = 0;
  int n_acc_ovf = 0, n_acc_unf = 0, n_sum_ovf = 0, n_sum_unf = 0;

  loop_filter dut (.clk, .rst_n, .pe, .ctrl, .acc_overflow(acc_ovf), .acc_underflow(acc_unf),
                   .sum_overflow(sum_ovf), .sum_underflow(sum_unf));

  always #5000 clk = ~clk;

  function automatic int clamp(input int v, input int lo, input int hi);
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  function automatic int ctrl_of(input int acc, input int e);
    int nxt = clamp(acc + e, -32768, 32767);
    int sum = clamp(e + (nxt >>> 5), -1024, 1023);
    return (sum >>> 1) + 512;
  endfunction

  initial begin
    pe = '0;
    #100 rst_n = 1'b0;
    #100 rst_n = 1'b1;
    #10;
    checks++;
    if (ctrl != 10'd512) begin failures++; $display("FAIL reset control word %0d", ctrl); end
    for (int n = 0; n < 2400; n++) begin
      automatic int e;
      @(negedge clk);
      case ((n / 400) % 3)
        0: e = int'($urandom_range(500, 100));
        1: e = -int'($urandom_range(500, 100));
        default: e = int'($urandom_range(1023, 0)) - 512;
      endcase
      if (n % 50 == 7) e = 511;
      if (n % 50 == 8) e = -512;
      pe = PE_W'(e);
      #10;
      checks++;
      if (int'(ctrl) != ctrl_of(acc_model, e)) begin
        failures++;
        $display("FAIL n=%0d acc=%0d pe=%0d: ctrl=%0d expected %0d", n, acc_model, e, ctrl, ctrl_of(acc_model, e));
      end
      if (acc_ovf) n_acc_ovf++;
      if (acc_unf) n_acc_unf++;
      if (sum_ovf) n_sum_ovf++;
      if (sum_unf) n_sum_unf++;
      @(posedge clk);
      acc_model = clamp(acc_model + e, -32768, 32767);
      #10;
      checks++;
      if (int'(ctrl) != ctrl_of(acc_model, e)) begin
        failures++;
        $display("FAIL after edge n=%0d: ctrl=%0d expected %0d", n, ctrl, ctrl_of(acc_model, e));
      end
    end
    checks++;
    if (n_acc_ovf == 0 || n_acc_unf == 0 || n_sum_ovf == 0 || n_sum_unf == 0) begin
      failures++;
      $display("FAIL saturation not exercised: %0d %0d %0d %0d", n_acc_ovf, n_acc_unf, n_sum_ovf, n_sum_unf);
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
