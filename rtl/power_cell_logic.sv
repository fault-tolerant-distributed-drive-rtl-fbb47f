// power_cell_logic: the logic of one power cell (one machine phase).
//
// A link endpoint receives messages from the central controller and
// acknowledges them. Data messages set the cell up and carry the duty
// cycle; each new duty goes through the edge aligner (saturation and dead
// time) into the shadow registers of the PWM modulator, which switches at
// the next carrier period. Message addresses (this implementation's map):
//   0x01 duty (carrier counts)   0x02 period     0x03 rising dead time
//   0x04 falling dead time       0x05 duty min   0x06 duty max
//   0x07 enable (bit 0)          0x08 carrier sync (data = restart value)
// The sync message restarts the carrier on arrival; the controller sends
// it to all cells at once, so their carriers stay aligned.
// Gate outputs, three per switch cluster for the three-level gate driver
// stage: {hs_pull_up_1, hs_pull_up_2, hs_pull_down, ls_pull_up_1,
// ls_pull_up_2, ls_pull_down}. Both pull-ups follow the PWM command and the
// pull-down its complement (plain two-level driving; the active driving
// patterns are not defined by the design). The cell holds both switches
// off while disabled or while the link reports a fault.
module power_cell_logic #(
  parameter int unsigned W           = 16,
  parameter int unsigned CLK_PER_BIT = 1,
  parameter int unsigned HB_PERIOD   = 10000,
  parameter int unsigned TIMEOUT     = 25000
) (
  input  logic           clk,
  input  logic           rst_n,
  input  rtcu_pkg::fec_t fec_mode,
  input  logic           scr_bypass,
  input  logic           line_rx,
  output logic           line_tx,
  output logic [5:0]     gate,
  output logic           link_fault,
  output logic           duty_saturated,
  output logic           enabled,
  output logic [15:0]    corrected_cnt,
  output logic [15:0]    error_cnt
);
  import rtcu_pkg::*;

  logic   rx_valid, ack_rx, hb_sent;
  msg_t   rx_msg;
  logic [W-1:0] period, dt_rise, dt_fall, dmin, dmax, duty;
  logic duty_v, sync;
  logic [W-1:0] sync_val;

  rtcu_link #(.CLK_PER_BIT(CLK_PER_BIT), .HB_PERIOD(HB_PERIOD), .TIMEOUT(TIMEOUT)) u_link (
    .clk, .rst_n, .fec_mode, .scr_bypass, .ack_en(1'b1),
    .tx_valid(1'b0), .tx_ready(), .tx_msg('0),
    .rx_valid, .rx_msg, .ack_rx, .hb_sent, .link_fault,
    .corrected_cnt, .error_cnt, .line_tx, .line_rx);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      period  <= W'(1000);
      dt_rise <= W'(10);
      dt_fall <= W'(10);
      dmin    <= '0;
      dmax    <= '1;
      enabled <= 1'b0;
      duty    <= '0;
      duty_v  <= 1'b0;
      sync    <= 1'b0;
      sync_val <= '0;
    end else begin
      duty_v <= 1'b0;
      sync   <= 1'b0;
      if (rx_valid) begin
        case (rx_msg.addr)
          8'h01: begin duty <= rx_msg.data[W-1:0]; duty_v <= 1'b1; end
          8'h02: period  <= rx_msg.data[W-1:0];
          8'h03: dt_rise <= rx_msg.data[W-1:0];
          8'h04: dt_fall <= rx_msg.data[W-1:0];
          8'h05: dmin    <= rx_msg.data[W-1:0];
          8'h06: dmax    <= rx_msg.data[W-1:0];
          8'h07: enabled <= rx_msg.data[0];
          8'h08: begin sync <= 1'b1; sync_val <= rx_msg.data[W-1:0]; end
          default: ;
        endcase
      end
    end
  end

  logic         ea_v;
  logic [W-1:0] hs_on, hs_off, ls_on, ls_off;
  edge_aligner #(.W(W)) u_ea (
    .clk, .rst_n, .period, .dt_rise, .dt_fall, .duty_min(dmin), .duty_max(dmax),
    .in_valid(duty_v), .duty, .out_valid(ea_v), .saturated(duty_saturated),
    .hs_on, .hs_off, .ls_on, .ls_off);

  logic [W-1:0] phase [1];
  logic [W-1:0] con [1][2], coff [1][2];
  logic         cen [1][2];
  logic         oa [1][2], ob [1][2];
  logic         pstart;
  assign phase[0]   = '0;
  assign con[0][0]  = hs_on;
  assign coff[0][0] = hs_off;
  assign con[0][1]  = ls_on;
  assign coff[0][1] = ls_off;
  assign cen[0][0]  = 1'b0;
  assign cen[0][1]  = 1'b0;

  pwm_modulator #(.W(W), .NCAR(1), .NCH(2)) u_pwm (
    .clk, .rst_n, .enable(enabled && !link_fault), .shadow_we(ea_v), .sync, .sync_val, .period,
    .phase, .cmp_on(con), .cmp_off(coff), .comp_en(cen),
    .out_a(oa), .out_b(ob), .period_start(pstart));

  assign gate = {oa[0][0], oa[0][0], !oa[0][0], oa[0][1], oa[0][1], !oa[0][1]};

  // the two switches of the half bridge are never commanded on together
  assert property (@(posedge clk) disable iff (!rst_n) !(oa[0][0] && oa[0][1]));

endmodule
