// tb_power_cell_logic: a controller-side link endpoint configures one power
// cell over the serial line (Hamming FEC), enables it and sends duty
// commands. Checks: every message is acknowledged; per carrier period the
// high side is on for duty - dt_rise clocks and the low side for
// period - duty - dt_fall clocks; the two sides never overlap; out-of-range
// commands are saturated; gates are off while disabled and after the link
// is cut (link fault).
`timescale 1ns/1ps
module tb_power_cell_logic;
  import rtcu_pkg::*;
  logic clk = 0, rst_n = 0;
  logic txv = 0, txr, rxv, ack, hb, fault, c_line, p_line, cut = 0;
  msg_t msg, rx;
  logic [15:0] cc, ec, pcc, pec;
  logic [5:0] gate;
  logic p_fault, sat, en;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  rtcu_link #(.HB_PERIOD(500), .TIMEOUT(1500)) u_ctl (.clk, .rst_n, .fec_mode(FEC_HAMMING), .scr_bypass(1'b0),
    .ack_en(1'b0), .tx_valid(txv), .tx_ready(txr), .tx_msg(msg), .rx_valid(rxv), .rx_msg(rx),
    .ack_rx(ack), .hb_sent(hb), .link_fault(fault), .corrected_cnt(cc), .error_cnt(ec),
    .line_tx(c_line), .line_rx(p_line));
  power_cell_logic #(.HB_PERIOD(500), .TIMEOUT(1500)) dut (.clk, .rst_n, .fec_mode(FEC_HAMMING),
    .scr_bypass(1'b0), .line_rx(cut ? 1'b0 : c_line), .line_tx(p_line), .gate, .link_fault(p_fault),
    .duty_saturated(sat), .enabled(en), .corrected_cnt(pcc), .error_cnt(pec));

  int acks = 0;
  always_ff @(posedge clk) if (ack) acks <= acks + 1;

  task automatic send(logic [7:0] a, logic [31:0] d);
    int a0;
    a0 = acks;
    @(negedge clk); while (!txr) @(negedge clk);
    msg = '{addr: a, data: d}; txv = 1;
    @(negedge clk); txv = 0;
    repeat (200) @(negedge clk);
    checks++;
    if (acks != a0 + 1) begin failures++; $display("FAIL no ack for %h", a); end
  endtask

  // measure on-times over one full carrier period (aligned on the high side rising edge)
  task automatic measure(int per, output int hs, output int ls);
    int g;
    hs = 0; ls = 0;
    g = 0;
    while (!(gate[5] && g == 0)) begin g = gate[5]; @(negedge clk); end
    for (int i = 0; i < per; i++) begin
      if (gate[5]) hs++;
      if (gate[2]) ls++;
      checks++;
      if ((gate[5] && gate[2]) || gate[5] == gate[3] || gate[2] == gate[0] || gate[5] != gate[4]) begin
        failures++; $display("FAIL gate pattern %b", gate);
      end
      @(negedge clk);
    end
  endtask

  initial begin
    #5000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int hs, ls, per, dr, df, d;
  initial begin
    msg = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    per = 400; dr = 7; df = 13;
    send(8'h02, per); send(8'h03, dr); send(8'h04, df); send(8'h05, 20); send(8'h06, 380);
    send(8'h01, 100);
    repeat (2 * per) @(negedge clk);
    checks++;
    if (gate != 6'b001001) begin failures++; $display("FAIL gates not off while disabled: %b", gate); end
    send(8'h07, 1);
    for (int i = 0; i < 12; i++) begin
      d = (i == 10) ? 5 : (i == 11) ? 399 : $urandom_range(30, 370);
      send(8'h01, d);
      repeat (per) @(negedge clk);
      measure(per, hs, ls);
      if (d < 20) d = 20;
      if (d > 380) d = 380;
      checks++;
      if (hs != d - dr || ls != per - d - df) begin
        failures++; $display("FAIL duty %0d: hs %0d ls %0d", d, hs, ls);
      end
      checks++;
      if (sat != (i >= 10)) begin failures++; $display("FAIL saturation flag"); end
    end
    // cut the controller->cell line: the cell must turn its switches off
    cut = 1;
    repeat (2000) @(negedge clk);
    checks++;
    if (!p_fault || gate != 6'b001001) begin failures++; $display("FAIL link fault reaction %b %b", p_fault, gate); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
