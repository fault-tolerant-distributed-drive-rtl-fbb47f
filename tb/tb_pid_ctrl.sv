// tb_pid_ctrl: random gains and a stream of random samples (back to back
// and with gaps). Outputs are compared with an integer model of the
// control law, including integrator clamping and output saturation, and
// must arrive three clocks after their input.
`timescale 1ns/1ps
module tb_pid_ctrl;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0, out_valid;
  logic [15:0] kp_m, ki_m, kd_m, out_lim;
  logic [4:0] kp_s, ki_s, kd_s;
  logic signed [15:0] setpoint, measure, out;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  pid_ctrl dut (.*);
  initial begin
    #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  longint exp_q [$];
  int lat_q [$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk) if (rst_n && out_valid) begin
    longint e; int t;
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected output"); end
    else begin
      e = exp_q.pop_front(); t = lat_q.pop_front();
      if (out != 16'(e) || cyc - t != 3) begin failures++; $display("FAIL out %0d exp %0d lat %0d", out, e, cyc - t); end
    end
  end
  function automatic longint clampl(longint x, longint l);
    return (x > l) ? l : (x < -l) ? -l : x;
  endfunction
  initial begin
    longint integ, ep, e, u;
    for (int run = 0; run < 10; run++) begin
      rst_n = 0; setpoint = 0; measure = 0;
      kp_m = 16'($urandom_range(0, 3000)); ki_m = 16'($urandom_range(0, 500)); kd_m = 16'($urandom_range(0, 2000));
      kp_s = 5'($urandom_range(4, 10)); ki_s = 5'($urandom_range(6, 14)); kd_s = 5'($urandom_range(4, 10));
      out_lim = 16'($urandom_range(1000, 30000));
      repeat (2) @(negedge clk); rst_n = 1;
      integ = 0; ep = 0;
      for (int n = 0; n < 300; n++) begin
        setpoint = 16'($urandom_range(0, 20000) - 10000); measure = 16'($urandom_range(0, 20000) - 10000);
        e = longint'(setpoint) - longint'(measure);
        integ = clampl(integ + ((e * longint'(ki_m)) >>> ki_s), out_lim);
        u = clampl(((e * longint'(kp_m)) >>> kp_s) + integ + (((e - ep) * longint'(kd_m)) >>> kd_s), out_lim);
        ep = e;
        exp_q.push_back(u); lat_q.push_back(cyc);
        in_valid = 1; @(negedge clk); in_valid = 0;
        if (n % 3 == 0) repeat ($urandom_range(1, 3)) @(negedge clk);
      end
      repeat (5) @(negedge clk);
    end
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL missing outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
