// tb_data_capture: 16 taps carry time stamps (tap value = 16*cycle + tap),
// six of them are selected. Checks: the buffer streams out only after it
// is full; entries come in groups of six with the right tags and selects,
// all values of a group from the same instant and consecutive groups
// exactly `divider` clocks apart; the fill-level trigger fires once at the
// programmed level; buf_done fires after the last word; capture stays
// halted until resume and then runs again (two full buffers, with output
// back-pressure on the second).
`timescale 1ns/1ps
module tb_data_capture;
  localparam int NS = 16, NK = 6, D = 48;
  logic clk = 0, rst_n = 0, enable = 0, resume = 0, trig_out, halted, buf_done, out_valid, out_ready = 1;
  logic [15:0] divider;
  logic [6:0] trig_level, level;
  logic [3:0] sel [NK];
  logic src_valid [NS];
  logic [15:0] src_data [NS];
  logic [31:0] out_data;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  data_capture #(.NSRC(NS), .NSEL(NK), .DEPTH(D)) dut (.*);
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always_comb for (int i = 0; i < NS; i++) begin src_valid[i] = 1'b1; src_data[i] = 16'(cyc * 16 + i); end
  int trigs = 0, dones = 0;
  always @(posedge clk) if (rst_n && buf_done) dones <= dones + 1;
  always @(posedge clk) if (rst_n && trig_out) begin
    trigs <= trigs + 1;
    checks++;
    if (level != trig_level) begin failures++; $display("FAIL trigger at level %0d", level); end
  end
  initial begin
    #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int n, t_prev, t;
    divider = 16'd9; trig_level = 7'd20;
    for (int k = 0; k < NK; k++) sel[k] = 4'($urandom_range(0, NS - 1));
    repeat (2) @(negedge clk); rst_n = 1; enable = 1;
    for (int round = 0; round < 2; round++) begin
      // while filling nothing comes out
      n = 0;
      while (!halted) begin
        @(negedge clk);
        if (out_valid) n++;
      end
      checks++;
      if (n != 0) begin failures++; $display("FAIL output while capturing"); end
      checks++;
      if (trigs != round + 1) begin failures++; $display("FAIL trigger count %0d", trigs); end
      n = 0; t_prev = -1;
      while (n < D) begin
        out_ready = (round == 0) ? 1'b1 : 1'($urandom_range(0, 1));
        @(posedge clk);
        if (out_valid && out_ready) begin
          int k;
          k = n % NK;
          checks++;
          if (out_data[31:24] != 8'(k) || out_data[23:16] != 8'(sel[k]) || out_data[3:0] != sel[k]) begin
            failures++; $display("FAIL tag word %h at %0d", out_data, n);
          end
          t = int'(out_data[15:4]);
          if (k == 0) begin
            if (t_prev >= 0) begin
              checks++;
              if (12'(t - t_prev) != 12'(divider)) begin failures++; $display("FAIL sample spacing %0d", t - t_prev); end
            end
            t_prev = t;
          end else begin
            checks++;
            if (t != t_prev) begin failures++; $display("FAIL group not simultaneous"); end
          end
          n++;
        end
        @(negedge clk);
      end
      repeat (3) @(negedge clk);
      checks++;
      if (!halted || out_valid || level != 0 || dones != round + 1) begin failures++; $display("FAIL not halted after drain"); end
      repeat (50) @(negedge clk);
      checks++;
      if (level != 0) begin failures++; $display("FAIL captured while halted"); end
      resume = 1; @(negedge clk); resume = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
