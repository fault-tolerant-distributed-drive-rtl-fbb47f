// rtcu_link: one endpoint of the point-to-point control link between the
// central controller and a power cell.
//
// Transmit chain: message -> scrambler -> FEC encoder -> serializer.
// Receive chain: deserializer -> FEC decoder -> descrambler -> message.
// Each message carries an 8-bit address and 32 bits of data, enough for a
// whole duty-cycle word, in one short fixed-size frame.
//
// Link supervision:
//  * Acknowledge (optional, ack_en): every received data message is answered
//    with an ACK message (address 0xFE) whose data holds the acknowledged
//    address; ack_rx pulses when an ACK arrives here.
//  * Heartbeat: a watchdog sends a heartbeat message (address 0xFF) when no
//    message has been exchanged for HB_PERIOD clocks. Every message sent or
//    received restarts it, so in normal traffic no heartbeats are sent.
//  * Link fault: link_fault rises when nothing valid has been received for
//    TIMEOUT clocks (set TIMEOUT above HB_PERIOD plus a frame time), giving
//    a bounded fault detection time; it clears on the next valid message.
//  * Corrected and uncorrectable frames are counted; uncorrectable frames
//    are dropped.
// Transmit priority: ACK, then user message, then heartbeat. tx_ready is
// high when the chain can take a user message (one frame in flight).
// Reserved addresses, priorities and counters are this implementation's
// choices; the mechanisms are those of the design.
module rtcu_link #(
  parameter int unsigned CLK_PER_BIT = 1,
  parameter int unsigned HB_PERIOD   = 10000,
  parameter int unsigned TIMEOUT     = 25000
) (
  input  logic           clk,
  input  logic           rst_n,
  input  rtcu_pkg::fec_t fec_mode,
  input  logic           scr_bypass,
  input  logic           ack_en,
  // user transmit
  input  logic           tx_valid,
  output logic           tx_ready,
  input  rtcu_pkg::msg_t tx_msg,
  // user receive
  output logic           rx_valid,
  output rtcu_pkg::msg_t rx_msg,
  // supervision
  output logic           ack_rx,
  output logic           hb_sent,
  output logic           link_fault,
  output logic [15:0]    corrected_cnt,
  output logic [15:0]    error_cnt,
  // serial line
  output logic           line_tx,
  input  logic           line_rx
);
  import rtcu_pkg::*;

  // ---------------- transmit ----------------
  logic        ack_pend;
  logic [7:0]  ack_addr;
  logic [$clog2(HB_PERIOD+1)-1:0] hb_cnt;
  logic        chain_busy, ser_busy;
  logic        scr_v, enc_v, send;
  msg_t        send_msg;
  logic [39:0] scr_d;
  logic [56:0] enc_f;
  logic [5:0]  enc_len;
  logic        hb_due;

  assign hb_due   = (hb_cnt == ($bits(hb_cnt))'(HB_PERIOD));
  assign tx_ready = !chain_busy && !ack_pend;

  always_comb begin
    send     = 1'b0;
    send_msg = tx_msg;
    hb_sent  = 1'b0;
    if (!chain_busy) begin
      if (ack_pend) begin
        send     = 1'b1;
        send_msg = '{addr: ADDR_ACK, data: {24'd0, ack_addr}};
      end else if (tx_valid) begin
        send = 1'b1;
      end else if (hb_due) begin
        send     = 1'b1;
        send_msg = '{addr: ADDR_HEARTBEAT, data: 32'd0};
        hb_sent  = 1'b1;
      end
    end
  end

  rtcu_scrambler #(.DESCRAMBLE(1'b0)) u_scr (
    .clk, .rst_n, .bypass(scr_bypass), .in_valid(send), .in_data(send_msg),
    .out_valid(scr_v), .out_data(scr_d));

  rtcu_fec_enc u_enc (
    .clk, .rst_n, .mode(fec_mode), .in_valid(scr_v), .in_data(scr_d),
    .out_valid(enc_v), .out_frame(enc_f), .out_len(enc_len));

  rtcu_serializer #(.CLK_PER_BIT(CLK_PER_BIT)) u_ser (
    .clk, .rst_n, .load(enc_v), .frame(enc_f), .len(enc_len),
    .busy(ser_busy), .line(line_tx));

  assign chain_busy = scr_v || enc_v || ser_busy;

  // ---------------- receive ----------------
  logic        des_v, dec_v, dec_corr, dec_err, dsc_v, dsc_err;
  logic [56:0] des_f;
  logic [39:0] dec_d, dsc_d;
  logic        rx_active;
  msg_t        got;

  rtcu_deserializer #(.CLK_PER_BIT(CLK_PER_BIT)) u_des (
    .clk, .rst_n, .len(6'(frame_len(fec_mode))), .line(line_rx),
    .active(rx_active), .out_valid(des_v), .out_frame(des_f));

  rtcu_fec_dec u_dec (
    .clk, .rst_n, .mode(fec_mode), .in_valid(des_v), .in_frame(des_f),
    .out_valid(dec_v), .out_data(dec_d), .out_corrected(dec_corr), .out_error(dec_err));

  rtcu_scrambler #(.DESCRAMBLE(1'b1)) u_dsc (
    .clk, .rst_n, .bypass(scr_bypass), .in_valid(dec_v), .in_data(dec_d),
    .out_valid(dsc_v), .out_data(dsc_d));

  always_ff @(posedge clk) begin
    if (!rst_n) dsc_err <= 1'b0;
    else if (dec_v) dsc_err <= dec_err;
  end

  assign got      = dsc_d;
  assign rx_valid = dsc_v && !dsc_err && got.addr != ADDR_ACK && got.addr != ADDR_HEARTBEAT;
  assign rx_msg   = got;
  assign ack_rx   = dsc_v && !dsc_err && got.addr == ADDR_ACK;

  // ---------------- supervision ----------------
  logic [$clog2(TIMEOUT+1)-1:0] to_cnt;
  logic good_rx;
  assign good_rx = dsc_v && !dsc_err;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ack_pend      <= 1'b0;
      ack_addr      <= '0;
      hb_cnt        <= '0;
      to_cnt        <= '0;
      link_fault    <= 1'b0;
      corrected_cnt <= '0;
      error_cnt     <= '0;
    end else begin
      if (send && ack_pend) ack_pend <= 1'b0;
      if (rx_valid && ack_en) begin
        ack_pend <= 1'b1;
        ack_addr <= got.addr;
      end
      // heartbeat watchdog: restarted by every exchanged message
      if (send || good_rx) hb_cnt <= '0;
      else if (!hb_due) hb_cnt <= hb_cnt + 1'b1;
      // receive timeout
      if (good_rx) begin
        to_cnt     <= '0;
        link_fault <= 1'b0;
      end else if (to_cnt == ($bits(to_cnt))'(TIMEOUT)) begin
        link_fault <= 1'b1;
      end else begin
        to_cnt <= to_cnt + 1'b1;
      end
      if (dec_v && dec_corr && corrected_cnt != 16'hFFFF) corrected_cnt <= corrected_cnt + 1'b1;
      if (dec_v && dec_err && error_cnt != 16'hFFFF) error_cnt <= error_cnt + 1'b1;
    end
  end

  // a user message is only offered when the link reports ready
  assert property (@(posedge clk) disable iff (!rst_n) (tx_valid && tx_ready) |-> send);

endmodule
