// drive_top: the complete distributed drive - central controller plus six
// power cells - as one synthesizable unit.
//
// What it does
//   The controller samples six phase currents (six serial ADCs) and the
//   rotor position/speed (resolver converter), filters and decimates the
//   currents, protects them with fast and slow over-current limits, runs a
//   speed PI(D) loop and a six-channel sine reference generator, and hands
//   all of this to the femtoCore SIMD processor (one channel per phase).
//   The core program computes one duty cycle per phase; the duties are sent
//   over six serial point-to-point links (RTCU protocol, one per phase) to
//   six power cells, each of which turns its duty into dead-time-protected
//   gate signals. A data capture unit records selected signals for the
//   host.
//
// How it works (one control period)
//   sample timer (reg 1 clocks) -> adc_spi_hub -> adc_postproc: every ADC
//   sample gives a fast (filtered) current to fault_monitor; every 4th
//   gives a decimated current. The decimated sample starts the resolver
//   read and a dds_gen tick. When the resolver word arrives, pid_ctrl
//   runs on the speed and fcore_dma_in copies the decimated currents, the
//   sine references and the PID output into the core's register file
//   (channel k = phase k: r1 = current, r2 = sine, r4 = PID output), then
//   starts the core with n_ch channels. When the core stops, fcore_dma_out
//   reads r3 of every channel and each value becomes a duty message
//   (address 0x01) for that phase's link. A host mailbox (regs 11/12) sends
//   any other cell message (period, dead times, limits, enable) to any set
//   of cells; mailbox messages go before duty messages. A periodic carrier
//   sync message (address 0x08) goes to all six cells in the same clock,
//   ahead of everything else, so all carriers restart together: the
//   periodic synchronisation packet a star network allows.
//
// Interfaces
//   APB slave (host processor) and a second control bus master port
//   (aux_*) share the control bus (ctrl_bus_switch, APB has priority):
//     slave 0 (0x0xxx) configuration/status registers (ctrl_regs):
//       r0  [0] sample timer enable [1] fault clear [2] capture enable
//           [3] capture resume [4] link ACK enable [5] scrambler bypass
//           [7:6] FEC mode (0 none, 1 Hamming, 2 RS)
//       r1  ADC sample period in clocks (reset 416: 240 kSps at 100 MHz)
//       r2  SIMD channels n_ch (reset 6)
//       r3  [15:0] fast current limit, [31:16] decimated current limit
//       r4/r5/r6  PID kp/ki/kd: [15:0] multiplier, [20:16] shift
//       r7  [15:0] PID output limit, [31:16] speed set point
//       r8  DDS frequency word       r9 capture [15:0] divider [31:16] level
//       r10 capture source selects, 4 bits each (6 selects)
//       r11 mailbox: [7:0] message address, [13:8] cell mask; writing it
//           sends r12 (message data) to every masked cell
//       r13 carrier sync period in control periods (0 = no sync)
//       status 16..19: {cell fault[5:0], link fault[5:0], trip, 0,
//           fast fault[5:0], slow fault[5:0]}, core run count, summed
//           corrected-error count, summed uncorrectable-error count
//     slave 1 (0x1xxx) femtoCore instruction store (word addressed). Every
//       access takes one wait state; while the core runs an access waits
//       (bus stall) until it stops.
//   ADC, resolver pins; six controller-side and six cell-side serial lines
//   (ctrl_line_tx/rx, cell_line_rx/tx) so the optical fibres are outside
//   this module; 6 x 6 gate outputs; capture stream (valid/ready) out.
//
// Document vs own choices
//   The partitioning (controller, femtoCore with input/output DMA, one
//   link per power cell, power cell with modulator, sensor hub, PID, DDS,
//   capture, control bus with APB bridge) follows the document. The
//   register map, the trigger chain (decimated sample -> resolver ->
//   DMA -> core -> DMA -> links), the register-file data layout, the
//   mailbox and the shared FEC/scrambler setting of both link ends are
//   this design's choices; the document does not specify them.
module drive_top #(
  parameter int unsigned NPH         = 6,
  parameter int unsigned CHANNELS    = 8,
  parameter int unsigned CLK_PER_BIT = 1,
  parameter int unsigned HB_PERIOD   = 10000,
  parameter int unsigned TIMEOUT     = 25000,
  parameter int unsigned CAP_DEPTH   = 1024
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // APB slave
  input  logic                        psel,
  input  logic                        penable,
  input  logic                        pwrite,
  input  logic [15:0]                 paddr,
  input  logic [31:0]                 pwdata,
  output logic [31:0]                 prdata,
  output logic                        pready,
  output logic                        pslverr,
  // auxiliary control bus master
  input  logic [15:0]                 aux_addr,
  input  logic [31:0]                 aux_wdata,
  input  logic                        aux_read,
  input  logic                        aux_write,
  output logic [31:0]                 aux_rdata,
  output logic                        aux_ready_n,
  // current ADCs
  output logic                        adc_sclk,
  output logic                        adc_cs_n,
  input  logic [NPH-1:0]              adc_miso,
  // resolver converter
  output logic                        res_sample_n,
  output logic [1:0]                  res_a,
  output logic                        res_cs_n,
  output logic                        res_sclk,
  input  logic                        res_sdo,
  // serial links: controller side and cell side
  output logic [NPH-1:0]              ctrl_line_tx,
  input  logic [NPH-1:0]              ctrl_line_rx,
  input  logic [NPH-1:0]              cell_line_rx,
  output logic [NPH-1:0]              cell_line_tx,
  // power stage gates, per cell {hs_pu1, hs_pu2, hs_pd, ls_pu1, ls_pu2, ls_pd}
  output logic [5:0]                  gate [NPH],
  output logic                        trip,
  // capture stream
  output logic                        cap_valid,
  input  logic                        cap_ready,
  output logic [31:0]                 cap_data,
  output logic                        cap_halted
);
  import rtcu_pkg::*;
  localparam int unsigned CW  = $clog2(CHANNELS);
  localparam int unsigned RAW = CW + 6;
  localparam int unsigned NIN = 3 * NPH;

  // ---------------- control bus ----------------
  logic [15:0] m_addr [2];
  logic [31:0] m_wdata [2], m_rdata [2];
  logic        m_read [2], m_write [2], m_ready_n [2];
  logic [11:0] s_addr [2];
  logic [31:0] s_wdata [2], s_rdata [2];
  logic        s_read [2], s_write [2], s_ready_n [2];

  apb_bridge #(.AW(16)) u_apb (
    .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready, .pslverr,
    .bus_addr(m_addr[0]), .bus_wdata(m_wdata[0]), .bus_read(m_read[0]),
    .bus_write(m_write[0]), .bus_rdata(m_rdata[0]), .bus_ready_n(m_ready_n[0]));
  assign m_addr[1]   = aux_addr;
  assign m_wdata[1]  = aux_wdata;
  assign m_read[1]   = aux_read;
  assign m_write[1]  = aux_write;
  assign aux_rdata   = m_rdata[1];
  assign aux_ready_n = m_ready_n[1];

  ctrl_bus_switch #(.NM(2), .NS(2), .AW(16), .SW(4)) u_sw (.*);

  localparam logic [31:0] RST [16] = '{
    32'h0000_0000, 32'd416, 32'd6, 32'h1800_2000,
    32'h0000_0000, 32'h0000_0000, 32'h0000_0000, 32'h0000_7FFF,
    32'h0000_0000, 32'h0000_0001, 32'h0054_3210, 32'h0,
    32'h0, 32'h0, 32'h0, 32'h0};
  logic [31:0] cfg [16];
  logic [31:0] status [8];
  ctrl_regs #(.NREG(16), .NSTAT(8), .AW(12), .RESET_VALS(RST)) u_regs (
    .clk, .rst_n, .addr(s_addr[0]), .wdata(s_wdata[0]), .read(s_read[0]),
    .write(s_write[0]), .rdata(s_rdata[0]), .ready_n(s_ready_n[0]),
    .regs(cfg), .status);

  fec_t fec_mode;
  logic scr_bypass, ack_en;
  assign fec_mode   = fec_t'(cfg[0][7:6] == 2'd3 ? 2'd0 : cfg[0][7:6]);
  assign scr_bypass = cfg[0][5];
  assign ack_en     = cfg[0][4];

  // ---------------- femtoCore ----------------
  logic             core_start, core_running, core_done;
  logic             prog_we, prog_re, prog_busy, prog_ack;
  logic [31:0]      prog_rdata;
  logic             dma_we, dma_re, dma_gnt;
  logic [RAW-1:0]   dma_addr, din_addr, dout_addr;
  logic [31:0]      dma_wdata, dma_rdata, din_wdata;
  logic             din_we, dout_re, din_busy, din_done, dout_busy, dout_done;

  // slave 1: program memory. Every access takes one wait state (the RAM
  // read is registered) and waits for as long as the core runs; the write
  // happens in the completing clock.
  assign prog_we = s_write[1] && prog_ack && !prog_busy;
  assign prog_re = s_read[1];
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) prog_ack <= 1'b0;
    else        prog_ack <= (s_read[1] || s_write[1]) && !prog_ack && !prog_busy;
  assign s_rdata[1]   = prog_rdata;
  assign s_ready_n[1] = !(prog_ack && !prog_busy);

  fcore #(.CHANNELS(CHANNELS)) u_core (
    .clk, .rst_n, .start(core_start), .n_ch(cfg[2][CW:0]),
    .running(core_running), .done(core_done),
    .prog_we, .prog_re, .prog_addr(s_addr[1][9:0]), .prog_wdata(s_wdata[1]),
    .prog_rdata, .prog_busy,
    .dma_we, .dma_re, .dma_addr, .dma_wdata, .dma_rdata, .dma_gnt);

  // output DMA has priority on the register file port
  assign dma_we    = dout_busy ? 1'b0 : din_we;
  assign dma_re    = dout_busy ? dout_re : 1'b0;
  assign dma_addr  = dout_busy ? dout_addr : din_addr;
  assign dma_wdata = din_wdata;

  // ---------------- sensors ----------------
  logic [15:0] samp_cnt;
  logic        adc_start, adc_busy, adc_valid;
  logic [13:0] adc_raw [NPH];
  logic signed [15:0] zero_off [NPH];
  logic        fast_valid, dec_valid;
  logic signed [15:0] fast [NPH], dec [NPH];
  logic [NPH-1:0] fault_fast, fault_dec;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) samp_cnt <= '0;
    else if (!cfg[0][0] || samp_cnt >= cfg[1][15:0] - 16'd1) samp_cnt <= '0;
    else samp_cnt <= samp_cnt + 16'd1;
  assign adc_start = cfg[0][0] && samp_cnt == '0 && !adc_busy;

  adc_spi_hub #(.NADC(NPH)) u_adc (
    .clk, .rst_n, .start(adc_start), .busy(adc_busy), .sclk(adc_sclk),
    .cs_n(adc_cs_n), .miso(adc_miso), .out_valid(adc_valid), .out_data(adc_raw));

  // ADC mid-scale (8192 counts) is zero current
  always_comb for (int k = 0; k < NPH; k++) zero_off[k] = 16'sd8192;

  adc_postproc #(.N(NPH)) u_pp (
    .clk, .rst_n, .in_valid(adc_valid), .raw(adc_raw), .offset(zero_off),
    .fast_valid, .fast, .dec_valid, .dec);

  fault_monitor #(.N(NPH)) u_fm (
    .clk, .rst_n, .clear(cfg[0][1]), .fast_limit(cfg[3][15:0]),
    .dec_limit(cfg[3][31:16]), .fast_valid, .fast, .dec_valid, .dec,
    .fault_fast, .fault_dec, .trip);

  logic        res_busy, res_valid;
  logic [15:0] res_pos;
  logic signed [15:0] res_vel;
  resolver_spi u_res (
    .clk, .rst_n, .start(dec_valid && !res_busy), .busy(res_busy),
    .sample_n(res_sample_n), .a(res_a), .cs_n(res_cs_n), .sclk(res_sclk),
    .sdo(res_sdo), .out_valid(res_valid), .position(res_pos), .velocity(res_vel));

  logic        pid_valid;
  logic signed [15:0] pid_out;
  pid_ctrl u_pid (
    .clk, .rst_n, .clear(cfg[0][1]),
    .kp_m(cfg[4][15:0]), .ki_m(cfg[5][15:0]), .kd_m(cfg[6][15:0]),
    .kp_s(cfg[4][20:16]), .ki_s(cfg[5][20:16]), .kd_s(cfg[6][20:16]),
    .out_lim(cfg[7][15:0]), .in_valid(res_valid), .setpoint(cfg[7][31:16]),
    .measure(res_vel), .out_valid(pid_valid), .out(pid_out));

  // six references 60 degrees apart (phase offset k * 2^32 / 6)
  logic [31:0] phase_off [NPH];
  always_comb for (int k = 0; k < NPH; k++) phase_off[k] = 32'(k * 32'h2AAA_AAAB);
  logic        dds_valid;
  logic [$clog2(NPH+1)-1:0] dds_ch;
  logic signed [15:0] dds_sin, dds_cos, ref_sin [NPH];
  dds_gen #(.N(NPH)) u_dds (
    .clk, .rst_n, .tick(dec_valid), .freq_word(cfg[8]), .phase_off,
    .out_valid(dds_valid), .out_ch(dds_ch), .out_sin(dds_sin), .out_cos(dds_cos));
  always_ff @(posedge clk)
    if (dds_valid) ref_sin[dds_ch] <= dds_sin;

  // latched decimated currents and PID output for the core
  logic signed [15:0] cur [NPH];
  logic signed [15:0] pid_hold;
  always_ff @(posedge clk) begin
    if (dec_valid) cur <= dec;
    if (pid_valid) pid_hold <= pid_out;
  end

  // ---------------- core input / output DMA ----------------
  logic [31:0]    din_data [NIN];
  logic [RAW-1:0] din_map [NIN];
  logic [RAW-1:0] dout_map [NPH];
  always_comb
    for (int k = 0; k < NPH; k++) begin
      din_data[k]           = 32'(cur[k]);
      din_data[NPH + k]     = 32'(ref_sin[k]);
      din_data[2 * NPH + k] = 32'(pid_hold);
      din_map[k]            = RAW'({k[CW-1:0], 6'd1});
      din_map[NPH + k]      = RAW'({k[CW-1:0], 6'd2});
      din_map[2 * NPH + k]  = RAW'({k[CW-1:0], 6'd4});
      dout_map[k]           = RAW'({k[CW-1:0], 6'd3});
    end

  // the DMA starts one clock after the PID result is latched
  logic pid_done_d;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) pid_done_d <= 1'b0;
    else        pid_done_d <= pid_valid;

  fcore_dma_in #(.NIN(NIN), .AW(RAW)) u_din (
    .clk, .rst_n, .trigger(pid_done_d && !core_running && !din_busy),
    .in_data(din_data), .map_addr(din_map), .busy(din_busy), .done(din_done),
    .dma_gnt(dma_gnt && !dout_busy), .dma_we(din_we), .dma_addr(din_addr),
    .dma_wdata(din_wdata));
  assign core_start = din_done;

  logic                       dout_valid;
  logic [$clog2(NPH+1)-1:0]   dout_idx;
  logic [31:0]                dout_data;
  fcore_dma_out #(.NOUT(NPH), .AW(RAW)) u_dout (
    .clk, .rst_n, .trigger(core_done), .map_addr(dout_map), .busy(dout_busy),
    .done(dout_done), .out_valid(dout_valid), .out_idx(dout_idx),
    .out_data(dout_data), .dma_gnt, .dma_re(dout_re), .dma_addr(dout_addr),
    .dma_rdata);

  logic [15:0] run_cnt;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) run_cnt <= '0;
    else if (dout_done) run_cnt <= run_cnt + 16'd1;

  // ---------------- links to the power cells ----------------
  logic [NPH-1:0] duty_pend, mb_pend, sync_pend, tx_valid, tx_ready, rx_valid, ack_rx;
  logic [NPH-1:0] hb_sent, ctrl_fault, cell_fault, cell_sat, cell_en;
  logic [31:0]    duty [NPH];
  msg_t           tx_msg [NPH], rx_msg [NPH];
  logic [15:0]    c_corr [NPH], c_err [NPH], p_corr [NPH], p_err [NPH];
  logic           mb_write, sync_tick;
  logic [15:0]    sync_cnt;
  // carrier sync to all cells at once: every `sync period` decimated
  // samples (register 13, 0 = off), sent at the sample so the links are idle
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) sync_cnt <= '0;
    else if (dec_valid) sync_cnt <= (sync_cnt + 16'd1 >= cfg[13][15:0]) ? '0 : sync_cnt + 16'd1;
  assign sync_tick = dec_valid && cfg[13][15:0] != '0 && sync_cnt == '0;
  assign mb_write = s_write[0] && s_addr[0] == 12'd11 && !s_ready_n[0];

  for (genvar k = 0; k < NPH; k++) begin : g_ph
    // transmit order: carrier sync, then mailbox, then duty
    logic sent;
    assign sent = tx_valid[k] && tx_ready[k];
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) begin
        duty_pend[k] <= 1'b0;
        mb_pend[k]   <= 1'b0;
        sync_pend[k] <= 1'b0;
        duty[k]      <= '0;
      end else begin
        if (dout_valid && 32'(dout_idx) == k) begin
          duty[k]      <= dout_data;
          duty_pend[k] <= 1'b1;
        end else if (sent && !sync_pend[k] && !mb_pend[k]) begin
          duty_pend[k] <= 1'b0;
        end
        if (mb_write && s_wdata[0][8 + k]) mb_pend[k] <= 1'b1;
        else if (sent && !sync_pend[k]) mb_pend[k] <= 1'b0;
        if (sync_tick) sync_pend[k] <= 1'b1;
        else if (sent) sync_pend[k] <= 1'b0;
      end
    assign tx_valid[k] = sync_pend[k] || mb_pend[k] || duty_pend[k];
    assign tx_msg[k]   = sync_pend[k] ? msg_t'{addr: 8'h08, data: 32'd0} :
                         mb_pend[k]   ? msg_t'{addr: cfg[11][7:0], data: cfg[12]} :
                                        msg_t'{addr: 8'h01, data: duty[k]};

    rtcu_link #(.CLK_PER_BIT(CLK_PER_BIT), .HB_PERIOD(HB_PERIOD), .TIMEOUT(TIMEOUT)) u_link (
      .clk, .rst_n, .fec_mode, .scr_bypass, .ack_en,
      .tx_valid(tx_valid[k]), .tx_ready(tx_ready[k]), .tx_msg(tx_msg[k]),
      .rx_valid(rx_valid[k]), .rx_msg(rx_msg[k]), .ack_rx(ack_rx[k]),
      .hb_sent(hb_sent[k]), .link_fault(ctrl_fault[k]),
      .corrected_cnt(c_corr[k]), .error_cnt(c_err[k]),
      .line_tx(ctrl_line_tx[k]), .line_rx(ctrl_line_rx[k]));

    power_cell_logic #(.CLK_PER_BIT(CLK_PER_BIT), .HB_PERIOD(HB_PERIOD), .TIMEOUT(TIMEOUT)) u_cell (
      .clk, .rst_n, .fec_mode, .scr_bypass, .line_rx(cell_line_rx[k]),
      .line_tx(cell_line_tx[k]), .gate(gate[k]), .link_fault(cell_fault[k]),
      .duty_saturated(cell_sat[k]), .enabled(cell_en[k]),
      .corrected_cnt(p_corr[k]), .error_cnt(p_err[k]));
  end

  logic [15:0] sum_corr, sum_err;
  always_comb begin
    sum_corr = '0;
    sum_err  = '0;
    for (int k = 0; k < NPH; k++) begin
      sum_corr = sum_corr + c_corr[k] + p_corr[k];
      sum_err  = sum_err + c_err[k] + p_err[k];
    end
  end
  // ---------------- data capture ----------------
  logic        src_valid [16];
  logic [15:0] src_data [16];
  logic [3:0]  cap_sel [6];
  logic        cap_trig, cap_done;
  logic [$clog2(CAP_DEPTH):0] cap_level;
  always_comb begin
    for (int k = 0; k < 16; k++) begin
      src_valid[k] = 1'b0;
      src_data[k]  = '0;
    end
    for (int k = 0; k < NPH && k < 6; k++) begin
      src_valid[k]     = fast_valid;
      src_data[k]      = fast[k];
      src_valid[6 + k] = dout_valid && 32'(dout_idx) == k;
      src_data[6 + k]  = dout_data[15:0];
    end
    src_valid[12] = res_valid;  src_data[12] = res_pos;
    src_valid[13] = res_valid;  src_data[13] = res_vel;
    src_valid[14] = pid_valid;  src_data[14] = pid_out;
    src_valid[15] = dds_valid && dds_ch == 0;  src_data[15] = dds_sin;
    for (int j = 0; j < 6; j++) cap_sel[j] = cfg[10][4 * j +: 4];
  end

  data_capture #(.NSRC(16), .NSEL(6), .DEPTH(CAP_DEPTH)) u_cap (
    .clk, .rst_n, .enable(cfg[0][2]), .resume(cfg[0][3]),
    .divider(cfg[9][15:0]), .trig_level(cfg[9][16 +: $clog2(CAP_DEPTH) + 1]),
    .sel(cap_sel), .src_valid, .src_data, .trig_out(cap_trig),
    .halted(cap_halted), .buf_done(cap_done), .out_valid(cap_valid),
    .out_ready(cap_ready), .out_data(cap_data), .level(cap_level));

  // ---------------- status ----------------
  logic [15:0] hb_cnt, ack_cnt, rx_cnt, cap_trig_cnt, cap_done_cnt;
  assign status[0] = 32'({cell_fault, ctrl_fault, trip, 1'b0, fault_fast, fault_dec});
  assign status[1] = 32'(run_cnt);
  assign status[2] = 32'(sum_corr);
  assign status[3] = 32'(sum_err);
  assign status[4] = 32'({cap_halted, cell_en, cell_sat});
  assign status[5] = {hb_cnt, ack_cnt};
  assign status[6] = {rx_cnt, cap_trig_cnt};
  assign status[7] = {cap_done_cnt, 16'(cap_level)};

  // event counters for the host
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      hb_cnt <= '0; ack_cnt <= '0; rx_cnt <= '0; cap_trig_cnt <= '0; cap_done_cnt <= '0;
    end else begin
      hb_cnt       <= hb_cnt + 16'($countones(hb_sent));
      ack_cnt      <= ack_cnt + 16'($countones(ack_rx));
      rx_cnt       <= rx_cnt + 16'($countones(rx_valid));
      cap_trig_cnt <= cap_trig_cnt + 16'(cap_trig);
      cap_done_cnt <= cap_done_cnt + 16'(cap_done);
    end
endmodule
