// tb_edge_aligner: random duty commands, periods, dead times and limits;
// the comparator windows and the saturation flag are compared with the
// expected clamp and dead-time arithmetic.
`timescale 1ns/1ps
module tb_edge_aligner;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid, saturated;
  logic [15:0] period, dt_rise, dt_fall, duty_min, duty_max, duty, hs_on, hs_off, ls_on, ls_off;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  edge_aligner dut (.*);
  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int lo, hi, d;
    bit sat;
    period = 1000; dt_rise = 0; dt_fall = 0; duty_min = 0; duty_max = 0; duty = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      period = 16'($urandom_range(200, 2000)); dt_rise = 16'($urandom_range(0, 40));
      dt_fall = 16'($urandom_range(0, 40));
      duty_min = 16'($urandom_range(0, 100)); duty_max = 16'(int'(period) - $urandom_range(0, 100));
      duty = 16'($urandom_range(0, int'(period) + 50));
      lo = (duty_min > dt_rise) ? duty_min : dt_rise;
      hi = int'(period) - int'(dt_fall); if (duty_max < hi) hi = duty_max;
      if (hi < lo) hi = lo;
      d = duty; sat = 0;
      if (d < lo) begin d = lo; sat = 1; end
      if (d > hi) begin d = hi; sat = 1; end
      in_valid = 1; @(negedge clk); in_valid = 0;
      checks++;
      if (!out_valid || hs_on != dt_rise || hs_off != 16'(d) || ls_on != 16'(d + dt_fall) ||
          ls_off != period || saturated != sat) begin
        failures++;
        $display("FAIL duty %0d: %0d %0d %0d %0d sat %b exp d %0d", duty, hs_on, hs_off, ls_on, ls_off, saturated, d);
      end
      checks++;
      if (hs_off > ls_on) begin failures++; $display("FAIL overlap"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
