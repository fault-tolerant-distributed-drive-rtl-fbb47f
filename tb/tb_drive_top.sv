// tb_drive_top: end-to-end test of the whole drive at its default
// parameters (6 phases, 8-channel femtoCore, 10000-clock heartbeat,
// 25000-clock link timeout, 1024-word capture buffer).
//
// The host side is an APB master task. Six ADC models and a resolver model
// feed the sensor pins; the six serial lines in each direction are
// modelled fibres that can be cut or have single bits inverted. A small
// femtoCore program computes, per phase k,
//   duty_k = C + Ks * sin_k - Kc * i_k + Kp * pid
// in FP32 and the testbench recomputes every duty the core produces, then
// checks it arrives unchanged in the power cell. The test walks through
// every mechanism and counts it; each count must end non-zero
// (carrier sync messages and periods seen aligned on all six cells too):
//   ADC conversions, decimated samples, resolver reads, core runs, duty
//   messages delivered, mailbox messages, ACKs, heartbeats (sampling
//   paused), Hamming corrections, Reed-Solomon corrections, bus stalls on
//   a program write while the core runs, duty saturation in a cell, link
//   fault with gates off (fibre cut) and recovery, over-current trip,
//   capture trigger, capture halt with buffer streamed out, FEC mode
//   switches, PWM periods. Shoot-through (both switches of a cell on) is
//   a failure at any time.
`timescale 1ns/1ps
module tb_drive_top;
  import fcore_pkg::*;
  import fp_ref_pkg::*;
  localparam int NPH = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic psel = 0, penable = 0, pwrite = 0, pready, pslverr;
  logic [15:0] paddr = 0;
  logic [31:0] pwdata = 0, prdata;
  logic [15:0] aux_addr = 0;
  logic [31:0] aux_wdata = 0, aux_rdata;
  logic aux_read = 0, aux_write = 0, aux_ready_n;
  logic adc_sclk, adc_cs_n;
  logic [NPH-1:0] adc_miso;
  logic res_sample_n, res_cs_n, res_sclk, res_sdo;
  logic [1:0] res_a;
  logic [NPH-1:0] ctrl_line_tx, ctrl_line_rx, cell_line_rx, cell_line_tx;
  logic [5:0] gate [NPH];
  logic trip, cap_valid, cap_halted;
  logic cap_ready = 1;
  logic [31:0] cap_data;

  drive_top dut (.*);

  // ---------------- sensor models ----------------
  logic [13:0] adc_val [NPH];
  logic [15:0] angle = 0, speed = 16'd1000;
  for (genvar k = 0; k < NPH; k++) begin : g_adc
    ltc2313_model u_adc (.sclk(adc_sclk), .cs_n(adc_cs_n), .sample(adc_val[k]), .sdo(adc_miso[k]));
  end
  ad2s1210_model u_res (.sample_n(res_sample_n), .a(res_a), .cs_n(res_cs_n), .sclk(res_sclk),
                        .angle, .speed, .sdo(res_sdo));
  always @(posedge clk) angle <= angle + 16'd3;

  // ---------------- fibres ----------------
  logic [NPH-1:0] cut = '0, inj_arm = '0;
  logic [NPH-1:0] flip;
  int fpos [NPH];
  int flen;
  always_comb flen = (dut.fec_mode == rtcu_pkg::FEC_HAMMING) ? 48 :
                     (dut.fec_mode == rtcu_pkg::FEC_RS) ? 57 : 41;
  for (genvar k = 0; k < NPH; k++) begin : g_fib
    // position inside the current controller-to-cell frame (0 = idle)
    always @(posedge clk)
      if (!rst_n) fpos[k] <= 0;
      else if (fpos[k] == 0) fpos[k] <= ctrl_line_tx[k] ? 1 : 0;
      else fpos[k] <= (fpos[k] >= flen) ? 0 : fpos[k] + 1;
    assign flip[k] = inj_arm[k] && fpos[k] == 20;
    always @(posedge clk) if (flip[k]) inj_arm[k] <= 1'b0;
    assign cell_line_rx[k] = cut[k] ? 1'b0 : (ctrl_line_tx[k] ^ flip[k]);
    assign ctrl_line_rx[k] = cut[k] ? 1'b0 : cell_line_tx[k];
  end

  // ---------------- bookkeeping ----------------
  int checks = 0, failures = 0;
  int n_adc = 0, n_dec = 0, n_res = 0, n_run = 0, n_duty = 0, n_mbox = 0, n_ack = 0;
  int n_hb = 0, n_ham = 0, n_rs = 0, n_stall = 0, n_sat = 0, n_fault_off = 0, n_recover = 0;
  int n_trip = 0, n_ctrig = 0, n_chalt = 0, n_cwords = 0, n_fec = 0, n_pwm = 0;
  int n_sync = 0, n_aligned = 0;
  bit chk_align = 0, chk_mis = 0;
  int n_mis = 0, mis0;
  // with carrier sync on, all six carriers must start their periods together
  logic [NPH-1:0] ps;
  for (genvar k = 0; k < NPH; k++) begin : g_ps
    assign ps[k] = dut.g_ph[k].u_cell.pstart;
  end
  always @(posedge clk) if (rst_n && chk_mis && ps != 0 && ps != '1) n_mis++;
  always @(posedge clk) if (rst_n && chk_align) begin
    if (ps != 0) begin
      checks++;
      if (ps != '1) fail($sformatf("carriers not aligned %b", ps));
      else n_aligned++;
    end
  end

  task automatic fail(string s);
    failures++;
    $display("FAIL @%0t: %s", $time, s);
  endtask

  always @(posedge clk) if (rst_n) begin
    if (dut.adc_valid) n_adc++;
    if (dut.dec_valid) n_dec++;
    if (dut.res_valid) n_res++;
    if (dut.dout_done) n_run++;
    if (dut.cap_trig) n_ctrig++;
    if (cap_valid && cap_ready) n_cwords++;
    for (int k = 0; k < NPH; k++) begin
      if (dut.ack_rx[k]) n_ack++;
      if (dut.hb_sent[k]) n_hb++;
      if (gate[k][5] && gate[k][2]) fail($sformatf("shoot-through cell %0d", k));
    end
  end
  always @(posedge dut.g_ph[0].u_cell.pstart) if (rst_n) n_pwm++;
  always @(posedge cap_halted) if (rst_n) n_chalt++;
  always @(posedge trip) if (rst_n) n_trip++;
  for (genvar k = 0; k < NPH; k++) begin : g_mon
    always @(posedge dut.g_ph[k].u_cell.duty_saturated) if (rst_n) n_sat++;
  end

  // duty reference: recompute the core program in FP32
  logic [31:0] K_S, K_C, K_P, C0;
  function automatic logic [31:0] fmul(logic [31:0] a, logic [31:0] b); return r2f(f2r(a) * f2r(b)); endfunction
  function automatic logic [31:0] fadd(logic [31:0] a, logic [31:0] b); return r2f(f2r(a) + f2r(b)); endfunction
  function automatic logic [31:0] fsub(logic [31:0] a, logic [31:0] b); return r2f(f2r(a) - f2r(b)); endfunction
  function automatic logic [31:0] itf(logic [31:0] a); return r2f(real'($signed(a))); endfunction
  always @(posedge clk) if (rst_n && dut.dout_valid) begin
    int k;
    logic [31:0] t, exp_d;
    real r;
    k = int'(dut.dout_idx);
    t = fadd(fmul(itf(32'(dut.ref_sin[k])), K_S), C0);
    t = fsub(t, fmul(itf(32'(dut.cur[k])), K_C));
    t = fadd(t, fmul(itf(32'(dut.pid_hold)), K_P));
    r = f2r(t);
    exp_d = 32'($rtoi(r));
    checks++;
    if (dut.dout_data !== exp_d) fail($sformatf("duty ph%0d got %0d exp %0d", k, $signed(dut.dout_data), $signed(exp_d)));
  end
  // every duty sent must arrive in its cell
  for (genvar k = 0; k < NPH; k++) begin : g_dchk
    logic [31:0] last;
    always @(posedge clk) begin
      if (dut.tx_valid[k] && dut.tx_ready[k] && !dut.mb_pend[k] && !dut.sync_pend[k]) last <= dut.duty[k];
      if (dut.g_ph[k].u_cell.rx_valid) begin
        if (dut.g_ph[k].u_cell.rx_msg.addr == 8'h01) begin
          n_duty++;
          checks++;
          if (dut.g_ph[k].u_cell.rx_msg.data !== last) fail($sformatf("cell %0d duty mismatch", k));
        end else if (dut.g_ph[k].u_cell.rx_msg.addr == 8'h08) n_sync++;
        else if (dut.g_ph[k].u_cell.rx_msg.addr < 8'h08) n_mbox++;
      end
    end
  end

  // ---------------- APB ----------------
  task automatic apb(logic wr, logic [15:0] a, logic [31:0] d, output logic [31:0] r, output int waits);
    @(negedge clk); psel = 1; pwrite = wr; paddr = a; pwdata = d; penable = 0;
    @(negedge clk); penable = 1; waits = 0; #1;
    while (!pready) begin @(negedge clk); #1; waits++; end
    r = prdata;
    @(negedge clk); psel = 0; penable = 0;
  endtask
  task automatic wr(logic [15:0] a, logic [31:0] d);
    logic [31:0] r; int w;
    apb(1, a, d, r, w);
  endtask
  task automatic rd(logic [15:0] a, output logic [31:0] r);
    int w;
    apb(0, a, 0, r, w);
  endtask
  task automatic cell_msg(logic [5:0] mask, logic [7:0] addr, logic [31:0] data);
    wr(16'd12, data);
    wr(16'd11, {18'd0, mask, addr});
    repeat (400) @(posedge clk);
  endtask

  logic [31:0] prog [32];
  int plen;
  task automatic build_prog();
    int i = 0;
    prog[i++] = enc_un(OP_ITF, 6'd1, 6'd5);
    prog[i++] = enc_un(OP_ITF, 6'd2, 6'd6);
    prog[i++] = enc_un(OP_ITF, 6'd4, 6'd7);
    prog[i++] = enc_ldc(6'd8);  prog[i++] = K_S;
    prog[i++] = enc_ldc(6'd9);  prog[i++] = K_C;
    prog[i++] = enc_ldc(6'd10); prog[i++] = C0;
    prog[i++] = enc_ldc(6'd11); prog[i++] = K_P;
    prog[i++] = enc_bin(OP_MUL, 6'd6, 6'd8, 6'd12);
    prog[i++] = enc_bin(OP_MUL, 6'd5, 6'd9, 6'd13);
    prog[i++] = enc_bin(OP_MUL, 6'd7, 6'd11, 6'd14);
    prog[i++] = enc_bin(OP_NOP, 0, 0, 0);
    prog[i++] = enc_bin(OP_ADD, 6'd12, 6'd10, 6'd15);
    prog[i++] = enc_bin(OP_NOP, 0, 0, 0);
    prog[i++] = enc_bin(OP_SUB, 6'd15, 6'd13, 6'd16);
    prog[i++] = enc_bin(OP_NOP, 0, 0, 0);
    prog[i++] = enc_bin(OP_ADD, 6'd16, 6'd14, 6'd17);
    prog[i++] = enc_bin(OP_NOP, 0, 0, 0);
    prog[i++] = enc_un(OP_FTI, 6'd17, 6'd3);
    prog[i++] = enc_bin(OP_STOP, 0, 0, 0);
    plen = i;
  endtask

  initial begin
    #20ms; fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] r, c0, c1;
    int w, hb0;
    for (int k = 0; k < NPH; k++) adc_val[k] = 14'(8192 + 100 * k);
    K_S = r2f(0.01); K_C = r2f(0.05); K_P = r2f(0.01); C0 = r2f(500.0);
    build_prog();
    repeat (5) @(posedge clk); rst_n = 1;
    // program load and read-back through the bus
    for (int i = 0; i < plen; i++) wr(16'h1000 + 16'(i), prog[i]);
    for (int i = 0; i < plen; i++) begin
      rd(16'h1000 + 16'(i), r); checks++;
      if (r !== prog[i]) fail($sformatf("program word %0d", i));
    end
    // cell set-up through the mailbox: 60 kHz carrier, dead times, limits
    wr(16'd0, 32'h10);                 // ACK on, no FEC
    cell_msg(6'h3F, 8'h02, 32'd1664);
    cell_msg(6'h3F, 8'h03, 32'd20);
    cell_msg(6'h3F, 8'h04, 32'd20);
    cell_msg(6'h3F, 8'h05, 32'd100);
    cell_msg(6'h3F, 8'h06, 32'd900);
    cell_msg(6'h3F, 8'h07, 32'd1);
    checks++; if (dut.cell_en != 6'h3F) fail("cells not enabled");
    // speed loop and references
    wr(16'd4, 32'h0008_0100);  // kp = 256 >> 8
    wr(16'd7, {16'd2000, 16'd1000});
    wr(16'd8, 32'h0100_0000);
    wr(16'd3, 32'h1800_1800);  // current limits 6144 counts
    wr(16'd9, {16'd600, 16'd60});  // capture: divider 60, trigger at 600 words
    wr(16'd10, {8'd0, 4'd14, 4'd13, 4'd12, 4'd6, 4'd7, 4'd0});
    wr(16'd0, 32'h15);         // sampling on, capture on, ACKs on
    repeat (4000) @(posedge clk);
    // knock cell 3's carrier out of step with a one-off sync to count 500
    cell_msg(6'h08, 8'h08, 32'd500);
    mis0 = n_mis; chk_mis = 1;
    repeat (4000) @(posedge clk);
    chk_mis = 0;
    checks++; if (n_mis == mis0) fail("one-off sync did not move the carrier");
    wr(16'd13, 32'd1);         // carrier sync every control period
    repeat (3000) @(posedge clk);
    chk_align = 1;
    repeat (6000) @(posedge clk);
    chk_align = 0;
    checks++; if (n_aligned < 3) fail("carrier alignment not seen");
    checks++; if (n_run < 5) fail("control loop not running");

    // program update while the core runs: bus stall, then saturation
    wait (dut.core_running); @(negedge clk);
    apb(1, 16'h1000 + 16'd8, r2f(950.0), r, w);
    if (w > 1) n_stall++;
    // the run that held the bus off still used the old constant
    @(posedge clk iff dut.dout_done); @(posedge clk);
    C0 = r2f(950.0);
    repeat (6000) @(posedge clk);
    checks++; if (dut.cell_sat == 0) fail("no saturation");
    // sampling paused: only heartbeats keep the links alive
    wr(16'd0, 32'h14);
    repeat (2000) @(posedge clk);
    wr(16'h1008, r2f(500.0)); C0 = r2f(500.0);
    hb0 = n_hb;
    repeat (25000) @(posedge clk);
    checks++; if (n_hb == hb0) fail("no heartbeat");
    checks++; if (dut.ctrl_fault != 0 || dut.cell_fault != 0) fail("link fault with heartbeats");

    // Hamming, then Reed-Solomon, with single bit errors on every link
    for (int m = 1; m <= 2; m++) begin
      wr(16'd0, 32'h14 | (m << 6)); n_fec++;
      rd(16'd18, c0);
      wr(16'd0, 32'h15 | (m << 6));
      for (int j = 0; j < 4; j++) begin
        inj_arm = '1;
        repeat (2500) @(posedge clk);
      end
      rd(16'd18, c1);
      checks++;
      if (c1 - c0 < 12) fail($sformatf("FEC %0d corrections %0d", m, c1 - c0));
      else if (m == 1) n_ham += int'(c1 - c0); else n_rs += int'(c1 - c0);
      rd(16'd19, r); checks++; if (r != 0) fail("uncorrectable errors");
      wr(16'd0, 32'h14 | (m << 6));
      repeat (200) @(posedge clk);
    end
    wr(16'd0, 32'h15); n_fec++;

    // fibre cut on phase 2: cell must switch off, then recover
    repeat (2000) @(posedge clk);
    cut[2] = 1;
    repeat (26000) @(posedge clk);
    checks++;
    if (!dut.cell_fault[2] || !dut.ctrl_fault[2]) fail("fibre cut not detected");
    for (int i = 0; i < 3000; i++) begin
      @(posedge clk);
      if (gate[2][5] || gate[2][4] || gate[2][2] || gate[2][1]) begin fail("gates on during fault"); break; end
      if (i == 2999) n_fault_off++;
    end
    rd(16'd16, r); checks++; if (r[25:20] != 6'h04 || r[19:14] != 6'h04) fail($sformatf("cell fault status %h", r));
    cut[2] = 0;
    repeat (5000) @(posedge clk);
    checks++;
    if (dut.cell_fault[2] || dut.ctrl_fault[2]) fail("no recovery");
    else n_recover++;

    // capture: stream must have been read and the unit halted
    checks++; if (n_cwords < 1000) fail("capture stream");
    rd(16'd23, r); checks++; if (r[31:16] == 0) fail("capture buffer not done");

    // over-current on phase 4
    adc_val[4] = 14'(8192 + 7000);
    repeat (3000) @(posedge clk);
    rd(16'd16, r); checks++;
    if (!trip || !r[13] || !r[6 + 4] || !r[4]) fail($sformatf("over-current trip status %h", r));
    rd(16'd17, r); checks++; if (int'(r) != n_run) fail("run counter");

    $display("mechanisms: adc=%0d dec=%0d res=%0d runs=%0d duty=%0d mailbox=%0d ack=%0d hb=%0d",
             n_adc, n_dec, n_res, n_run, n_duty, n_mbox, n_ack, n_hb);
    $display("  hamming_corr=%0d rs_corr=%0d stall=%0d sat=%0d fault_off=%0d recover=%0d trip=%0d",
             n_ham, n_rs, n_stall, n_sat, n_fault_off, n_recover, n_trip);
    $display("  sync=%0d misaligned=%0d aligned=%0d", n_sync, n_mis, n_aligned);
    $display("  cap_trig=%0d cap_halt=%0d cap_words=%0d fec_switch=%0d pwm=%0d",
             n_ctrig, n_chalt, n_cwords, n_fec, n_pwm);
    begin
      int cnt [24];
      cnt = '{n_mis, n_sync, n_aligned, n_adc, n_dec, n_res, n_run, n_duty, n_mbox, n_ack, n_hb, n_ham, n_rs, n_stall,
              n_sat, n_fault_off, n_recover, n_trip, n_ctrig, n_chalt, n_cwords, n_fec, n_pwm, checks};
      for (int i = 0; i < 24; i++) begin
        checks++;
        if (cnt[i] == 0) fail($sformatf("mechanism %0d never happened", i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
