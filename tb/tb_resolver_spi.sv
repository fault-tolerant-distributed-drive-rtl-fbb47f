// tb_resolver_spi: random angles and speeds in the converter model must be
// read back (at 16-bit and 12-bit resolution), and values changed after
// the sample pulse must not leak into the read-out.
`timescale 1ns/1ps
module tb_resolver_spi;
  logic clk = 0, rst_n = 0, start = 0;
  logic busy, sample_n, cs_n, sclk, sdo, out_valid, busy12, s12, c12, k12, d12, v12;
  logic [1:0] a, a12;
  logic [15:0] position, angle, speed;
  logic signed [15:0] velocity;
  logic [11:0] pos12;
  logic signed [11:0] vel12;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  resolver_spi dut (.*);
  ad2s1210_model u_m (.sample_n, .a, .cs_n, .sclk, .angle, .speed, .sdo);
  resolver_spi #(.RES(12)) dut12 (.clk, .rst_n, .start, .busy(busy12), .sample_n(s12), .a(a12), .cs_n(c12),
    .sclk(k12), .sdo(d12), .out_valid(v12), .position(pos12), .velocity(vel12));
  ad2s1210_model u_m12 (.sample_n(s12), .a(a12), .cs_n(c12), .sclk(k12), .angle, .speed, .sdo(d12));
  initial begin
    #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [15:0] ea, es;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 100; n++) begin
      angle = 16'($urandom); speed = 16'($urandom); ea = angle; es = speed;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      repeat (10) @(negedge clk);
      angle = ~angle; speed = ~speed;   // after the sample pulse
      while (!out_valid) @(negedge clk);
      checks++;
      if (position != ea || velocity != es) begin failures++; $display("FAIL %h %h exp %h %h", position, velocity, ea, es); end
      while (busy12) @(negedge clk);
      checks++;
      if (pos12 != ea[15:4] || vel12 != es[15:4]) begin failures++; $display("FAIL 12-bit"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
