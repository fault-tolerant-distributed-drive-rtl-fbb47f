// tb_rtcu_link: two link endpoints (controller A, power cell B) joined by a
// serial channel that can flip bits or be cut. Checks, for each FEC mode and
// with and without scrambling: every message arrives intact, in order, with
// the end-to-end latency of frame length + 5 clocks; B acknowledges each
// message; correctable errors are repaired and counted; uncorrectable
// frames are dropped and counted; an idle link sends heartbeats and does
// not raise a fault; a cut link raises link_fault within the timeout.
`timescale 1ns/1ps
module tb_rtcu_link;
  import rtcu_pkg::*;
  localparam int HB = 300, TO = 800;
  logic clk = 0, rst_n = 0;
  fec_t mode;
  logic byp = 0;
  logic a_txv = 0, a_txr, a_rxv, a_ack, a_hb, a_fault;
  logic b_txv = 0, b_txr, b_rxv, b_ack, b_hb, b_fault;
  msg_t a_msg, a_rx, b_msg, b_rx;
  logic [15:0] a_cc, a_ec, b_cc, b_ec;
  logic a_line, b_line, ab, ba;
  logic cut = 0;
  logic [63:0] flip_mask = 0;   // bits of the next A->B frame to flip
  int bitpos = -1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  rtcu_link #(.HB_PERIOD(HB), .TIMEOUT(TO)) u_a (.clk, .rst_n, .fec_mode(mode), .scr_bypass(byp), .ack_en(1'b0),
    .tx_valid(a_txv), .tx_ready(a_txr), .tx_msg(a_msg), .rx_valid(a_rxv), .rx_msg(a_rx),
    .ack_rx(a_ack), .hb_sent(a_hb), .link_fault(a_fault), .corrected_cnt(a_cc), .error_cnt(a_ec),
    .line_tx(a_line), .line_rx(ba));
  rtcu_link #(.HB_PERIOD(HB), .TIMEOUT(TO)) u_b (.clk, .rst_n, .fec_mode(mode), .scr_bypass(byp), .ack_en(1'b1),
    .tx_valid(b_txv), .tx_ready(b_txr), .tx_msg(b_msg), .rx_valid(b_rxv), .rx_msg(b_rx),
    .ack_rx(b_ack), .hb_sent(b_hb), .link_fault(b_fault), .corrected_cnt(b_cc), .error_cnt(b_ec),
    .line_tx(b_line), .line_rx(ab));

  // channel A->B with bit flips counted from the start bit of each frame
  always_ff @(posedge clk) begin
    if (bitpos < 0 && a_line) bitpos <= 1;
    else if (bitpos >= 0) bitpos <= (bitpos + 1 >= int'(frame_len(mode))) ? -1 : bitpos + 1;
  end
  assign ab = cut ? 1'b0 : (a_line ^ ((bitpos >= 0) ? flip_mask[bitpos] : 1'b0));
  assign ba = cut ? 1'b0 : b_line;

  int acks = 0, b_rx_cnt = 0, hbs = 0;
  msg_t last_b;
  always_ff @(posedge clk) begin
    if (a_ack) acks <= acks + 1;
    if (b_rxv) begin b_rx_cnt <= b_rx_cnt + 1; last_b <= b_rx; end
    if (a_hb || b_hb) hbs <= hbs + 1;
  end

  task automatic send(msg_t m, logic [63:0] fm, output int lat, output logic got);
    int t;
    flip_mask = fm;
    @(negedge clk); while (!a_txr) @(negedge clk);
    a_msg = m; a_txv = 1; t = 0;
    @(negedge clk); a_txv = 0;
    got = 0;
    for (t = 1; t < 200 && !got; t++) begin
      if (b_rxv) got = 1;
      else @(negedge clk);
    end
    lat = t - 1;
    repeat (frame_len(mode) + 20) @(negedge clk);
    flip_mask = 0;
  endtask

  initial begin
    #20000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int lat, a0, e0, c0;
  logic got;
  msg_t m;
  initial begin
    mode = FEC_NONE; a_msg = '0; b_msg = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int md = 0; md < 3; md++) begin
      for (int bp = 0; bp < 2; bp++) begin
        mode = fec_t'(md); byp = bp[0];
        repeat (100) @(negedge clk);
        for (int i = 0; i < 20; i++) begin
          a0 = acks;
          m = '{addr: 8'($urandom_range(0, 253)), data: $urandom};
          send(m, 0, lat, got);
          checks++;
          if (!got || last_b != m) begin failures++; $display("FAIL mode %0d msg %h got %h", md, m, last_b); end
          checks++;
          if (lat != int'(frame_len(mode)) + 5) begin failures++; $display("FAIL latency %0d mode %0d", lat, md); end
          checks++;
          if (acks != a0 + 1) begin failures++; $display("FAIL ack count"); end
        end
      end
    end
    // Hamming: single flip corrected, double flip dropped
    mode = FEC_HAMMING; byp = 0;
    repeat (100) @(negedge clk);
    for (int i = 0; i < 10; i++) begin
      c0 = b_cc; e0 = b_ec;
      m = '{addr: 8'($urandom_range(0, 253)), data: $urandom};
      send(m, 64'd1 << $urandom_range(1, 47), lat, got);
      checks++;
      if (!got || last_b != m || b_cc != 16'(c0 + 1)) begin failures++; $display("FAIL hamming correction"); end
      send(m, (64'd1 << 3) | (64'd1 << 30), lat, got);
      checks++;
      if (got || b_ec != 16'(e0 + 1)) begin failures++; $display("FAIL hamming double detect"); end
    end
    // RS: two bursts of 4 bits in two symbols corrected
    mode = FEC_RS;
    repeat (100) @(negedge clk);
    for (int i = 0; i < 10; i++) begin
      c0 = b_cc;
      m = '{addr: 8'($urandom_range(0, 253)), data: $urandom};
      send(m, (64'hF << 5) | (64'h9 << 41), lat, got);
      checks++;
      if (!got || b_cc != 16'(c0 + 1)) begin failures++; $display("FAIL rs correction"); end
      // the descrambler resynchronises after the message it lost
      send(m, 0, lat, got);
      checks++;
      if (!got || last_b != m) begin failures++; $display("FAIL after rs correction"); end
    end
    // idle: heartbeats keep the link alive
    begin
      int h0 = hbs;
      repeat (5 * TO) @(negedge clk);
      checks++;
      if (hbs <= h0 || a_fault || b_fault) begin failures++; $display("FAIL heartbeat %0d %b %b", hbs - h0, a_fault, b_fault); end
    end
    // cut the cable: fault detected within timeout
    cut = 1;
    repeat (TO + 10) @(negedge clk);
    checks++;
    if (!a_fault || !b_fault) begin failures++; $display("FAIL link fault not detected"); end
    cut = 0;
    repeat (2 * TO) @(negedge clk);
    checks++;
    if (a_fault || b_fault) begin failures++; $display("FAIL link fault did not clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
