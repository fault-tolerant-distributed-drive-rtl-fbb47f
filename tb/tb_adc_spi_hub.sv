// tb_adc_spi_hub: six converter models with random samples; every read-out
// must return all six samples, and start-to-valid must take
// 2 + 2*SCLK_DIV*FRAME_BITS clocks.
`timescale 1ns/1ps
module tb_adc_spi_hub;
  logic clk = 0, rst_n = 0, start = 0, busy, sclk, cs_n, out_valid;
  logic [5:0] miso;
  logic [13:0] out_data [6];
  logic [13:0] smp [6];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  adc_spi_hub dut (.*);
  for (genvar i = 0; i < 6; i++) begin : g_adc
    ltc2313_model u_m (.sclk, .cs_n, .sample(smp[i]), .sdo(miso[i]));
  end
  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int t;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      for (int i = 0; i < 6; i++) smp[i] = 14'($urandom);
      @(negedge clk); start = 1; @(negedge clk); start = 0; t = 1;
      while (!out_valid) begin @(negedge clk); t++; end
      checks++;
      if (t != 2 + 2 * 2 * 16) begin failures++; $display("FAIL conversion time %0d", t); end
      for (int i = 0; i < 6; i++) begin
        checks++;
        if (out_data[i] != smp[i]) begin failures++; $display("FAIL ch%0d %h exp %h", i, out_data[i], smp[i]); end
      end
      repeat ($urandom_range(0, 5)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
