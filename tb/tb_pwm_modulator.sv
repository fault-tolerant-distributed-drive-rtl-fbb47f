// tb_pwm_modulator: two phase-shifted carriers with two channels each.
// Every output is compared each clock with a reference carrier model; a
// register set written mid-period must not take effect before the next
// period start; complementary outputs are checked. Finally sync pulses
// must restart the carrier at the requested value, so the next period
// start comes exactly period - 1 - value clocks later.
`timescale 1ns/1ps
module tb_pwm_modulator;
  localparam int NC = 2, NH = 2;
  logic clk = 0, rst_n = 0, enable = 0, shadow_we = 0, period_start;
  logic sync = 0;
  logic [15:0] sync_val = 0;
  logic [15:0] period, phase [NC], cmp_on [NC][NH], cmp_off [NC][NH];
  logic comp_en [NC][NH], out_a [NC][NH], out_b [NC][NH];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  pwm_modulator #(.NCAR(NC), .NCH(NH)) dut (.*);
  initial begin
    #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // reference state (active set)
  int r_per, r_ph [NC], r_on [NC][NH], r_off [NC][NH], cnt;
  bit r_comp [NC][NH], r_run;
  task automatic new_set();
    period = 16'($urandom_range(50, 120));
    for (int k = 0; k < NC; k++) begin
      phase[k] = 16'($urandom_range(0, int'(period) - 1));
      for (int j = 0; j < NH; j++) begin
        cmp_on[k][j] = 16'($urandom_range(0, int'(period)));
        cmp_off[k][j] = 16'($urandom_range(int'(cmp_on[k][j]), int'(period)));
        comp_en[k][j] = 1'($urandom_range(0, 1));
      end
    end
  endtask
  task automatic adopt();
    r_per = period;
    for (int k = 0; k < NC; k++) begin
      r_ph[k] = phase[k];
      for (int j = 0; j < NH; j++) begin
        r_on[k][j] = cmp_on[k][j]; r_off[k][j] = cmp_off[k][j]; r_comp[k][j] = comp_en[k][j];
      end
    end
  endtask
  int starts = 0;
  initial begin
    new_set();
    repeat (2) @(negedge clk); rst_n = 1; enable = 1;
    shadow_we = 1; @(negedge clk); shadow_we = 0;
    adopt(); cnt = 0;
    // the set is taken one clock after the write, and outputs are registered
    repeat (2) @(negedge clk);
    for (int cyc = 0; cyc < 6000; cyc++) begin
      // compare the outputs produced for carrier value cnt
      for (int k = 0; k < NC; k++)
        for (int j = 0; j < NH; j++) begin
          int c; bit a;
          c = (cnt + r_ph[k]) % r_per;
          a = (c >= r_on[k][j]) && (c < r_off[k][j]);
          checks++;
          if (out_a[k][j] != a || out_b[k][j] != (r_comp[k][j] && !a)) begin
            failures++;
            if (failures < 10) $display("FAIL cyc %0d k%0d j%0d cnt %0d: %b %b exp %b", cyc, k, j, cnt, out_a[k][j], out_b[k][j], a);
          end
        end
      if (cnt == r_per - 1) begin
        cnt = 0; starts++;
      end else cnt++;
      // write a new set in the middle of some periods; it takes effect at the wrap
      if (cnt == r_per / 2 && starts % 3 == 1) begin
        new_set(); shadow_we = 1; @(negedge clk); shadow_we = 0;
        // the held set stays active until the end of this period
        while (cnt != r_per - 1) begin
          for (int k = 0; k < NC; k++)
            for (int j = 0; j < NH; j++) begin
              int c; bit a;
              c = (cnt + r_ph[k]) % r_per;
              a = (c >= r_on[k][j]) && (c < r_off[k][j]);
              checks++;
              if (out_a[k][j] != a) begin failures++; if (failures < 10) $display("FAIL shadow hold cnt %0d", cnt); end
            end
          cnt++; @(negedge clk);
        end
        // compare the last value of the old period, then switch the reference
        for (int k = 0; k < NC; k++)
          for (int j = 0; j < NH; j++) begin
            int c; bit a;
            c = (cnt + r_ph[k]) % r_per;
            a = (c >= r_on[k][j]) && (c < r_off[k][j]);
            checks++;
            if (out_a[k][j] != a) begin failures++; if (failures < 10) $display("FAIL shadow last"); end
          end
        adopt(); cnt = 0; starts++;
      end
      @(negedge clk);
    end
    for (int t = 0; t < 5; t++) begin
      int v, n;
      v = $urandom_range(0, r_per - 2);
      sync_val = 16'(v); sync = 1; @(negedge clk); sync = 0;
      checks++;
      if (int'(dut.base) != v) begin failures++; $display("FAIL sync base %0d exp %0d", dut.base, v); end
      n = 0;
      while (!period_start) begin @(negedge clk); n++; end
      checks++;
      if (n != r_per - 1 - v) begin failures++; $display("FAIL sync to period start %0d exp %0d", n, r_per - 1 - v); end
      repeat (3) @(negedge clk);
    end
    checks++;
    if (starts < 40) begin failures++; $display("FAIL too few periods %0d", starts); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
