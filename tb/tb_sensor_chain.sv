// tb_sensor_chain: offset removal, decimation by 4 and over-range
// detection. Random raw sample sets go through adc_postproc; the fast and
// decimated outputs are compared with sums worked out here, and the fault
// monitor, fed by both streams, must flag exactly the channels whose
// magnitude exceeded the limits.
`timescale 1ns/1ps
module tb_sensor_chain;
  localparam int N = 6;
  logic clk = 0, rst_n = 0, in_valid = 0, fast_valid, dec_valid, clear = 0, trip;
  logic [13:0] raw [N];
  logic signed [15:0] offset [N], fast [N], dec [N];
  logic [15:0] fast_limit, dec_limit;
  logic [N-1:0] fault_fast, fault_dec;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  adc_postproc u_pp (.*);
  fault_monitor u_fm (.*);
  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int sum [N], f, nf, nd, blk;
    logic [N-1:0] ef, ed;
    fast_limit = 16'd6000; dec_limit = 16'd3000;
    for (int i = 0; i < N; i++) offset[i] = 16'(8192 + $urandom_range(0, 200) - 100);
    repeat (2) @(negedge clk); rst_n = 1;
    ef = '0; ed = '0; nf = 0; nd = 0;
    for (int n = 0; n < 400; n++) begin
      for (int i = 0; i < N; i++) raw[i] = 14'((n % 50 == 7) ? $urandom_range(0, 16383) : 8192 + $urandom_range(0, 5000) - 2500);
      in_valid = 1; @(negedge clk); in_valid = 0;
      for (int i = 0; i < N; i++) begin
        f = int'(raw[i]) - int'(offset[i]);
        if (n % 4 == 0) sum[i] = 0;
        sum[i] += f;
        checks++;
        if (!fast_valid || fast[i] != 16'(f)) begin failures++; $display("FAIL fast ch%0d", i); end
        if ((f > 0 ? f : -f) > 6000) ef[i] = 1;
      end
      @(negedge clk);
      checks++;
      if (dec_valid != (n % 4 == 3)) begin failures++; $display("FAIL dec_valid timing at %0d", n); end
      if (n % 4 == 3) begin
        nd++;
        for (int i = 0; i < N; i++) begin
          blk = sum[i] >>> 2;
          checks++;
          if (dec[i] != 16'(blk)) begin failures++; $display("FAIL dec ch%0d %0d exp %0d", i, dec[i], blk); end
          if ((blk > 0 ? blk : -blk) > 3000) ed[i] = 1;
        end
      end
      @(negedge clk);
      checks++;
      if (fault_fast != ef || fault_dec != ed || trip != |{ef, ed}) begin
        failures++; $display("FAIL faults %b %b exp %b %b", fault_fast, fault_dec, ef, ed);
      end
      if (n % 100 == 99) begin
        clear = 1; @(negedge clk); clear = 0; ef = '0; ed = '0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
