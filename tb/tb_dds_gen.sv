// tb_dds_gen: six channels with random phase offsets and a random frequency
// word; for every tick each channel's sine and cosine must match
// 32767*sin/cos at the centre of the expected phase step (2**12 steps per
// turn) within 1 LSB, and
// appear in channel order k+3 clocks after the tick.
`timescale 1ns/1ps
module tb_dds_gen;
  localparam int N = 6;
  logic clk = 0, rst_n = 0, tick = 0, out_valid;
  logic [31:0] freq_word, phase_off [N];
  logic [2:0] out_ch;
  logic signed [15:0] out_sin, out_cos;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  dds_gen dut (.*);
  initial begin
    #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [31:0] acc, ph;
    real es, ec, pi;
    pi = 3.141592653589793;
    freq_word = $urandom;
    for (int k = 0; k < N; k++) phase_off[k] = $urandom;
    repeat (2) @(negedge clk); rst_n = 1;
    acc = 0;
    for (int n = 0; n < 300; n++) begin
      tick = 1; @(negedge clk); tick = 0;
      acc = acc + freq_word;
      @(negedge clk);
      for (int k = 0; k < N; k++) begin
        @(negedge clk);
        ph = acc + phase_off[k];
        // the table resolves 2**12 phase steps per turn; compare at the step centre
        es = 32767.0 * $sin(2.0 * pi * (real'(ph >> 20) + 0.5) / 4096.0);
        ec = 32767.0 * $cos(2.0 * pi * (real'((ph + 32'h4000_0000) >> 20) + 0.5 - 1024.0) / 4096.0);
        checks++;
        if (!out_valid || out_ch != 3'(k) || (real'(out_sin) - es) > 1.0 || (es - real'(out_sin)) > 1.0 || (real'(out_cos) - ec) > 1.0 || (ec - real'(out_cos)) > 1.0) begin
          failures++;
          $display("FAIL n%0d k%0d v%b ch%0d sin %0d exp %f cos %0d exp %f", n, k, out_valid, out_ch, out_sin, es, out_cos, ec);
        end
      end
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
