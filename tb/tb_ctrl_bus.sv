// tb_ctrl_bus: APB master -> apb_bridge -> ctrl_bus_switch (master 0) plus
// a second, directly driven bus master (master 1), sharing two register
// bank slaves and one slave that inserts wait states. Checks: APB writes
// and reads reach the right slave and register; reads through a busy
// slave wait for ready; master 0 wins when both request, master 1
// completes after it (fixed priority); unmapped addresses complete and
// read zero.
`timescale 1ns/1ps
module tb_ctrl_bus;
  localparam int AW = 16, SW = 4, NS = 3;
  logic clk = 0, rst_n = 0;
  // APB
  logic psel = 0, penable = 0, pwrite = 0, pready, pslverr;
  logic [AW-1:0] paddr = 0;
  logic [31:0] pwdata = 0, prdata;
  // switch
  logic [AW-1:0] m_addr [2];
  logic [31:0] m_wdata [2], m_rdata [2];
  logic m_read [2], m_write [2], m_ready_n [2];
  logic [AW-SW-1:0] s_addr [NS];
  logic [31:0] s_wdata [NS], s_rdata [NS];
  logic s_read [NS], s_write [NS], s_ready_n [NS];
  logic [31:0] regs0 [8], regs1 [8], st [2];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  apb_bridge u_br (.psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready, .pslverr,
    .bus_addr(m_addr[0]), .bus_wdata(m_wdata[0]), .bus_read(m_read[0]), .bus_write(m_write[0]),
    .bus_rdata(m_rdata[0]), .bus_ready_n(m_ready_n[0]));
  ctrl_bus_switch #(.NM(2), .NS(NS), .AW(AW), .SW(SW)) u_sw (.*);
  assign st[0] = 32'hCAFE_0001; assign st[1] = 32'hCAFE_0002;
  ctrl_regs #(.NREG(8), .NSTAT(2), .AW(AW - SW)) u_r0 (.clk, .rst_n, .addr(s_addr[0]), .wdata(s_wdata[0]),
    .read(s_read[0]), .write(s_write[0]), .rdata(s_rdata[0]), .ready_n(s_ready_n[0]), .regs(regs0), .status(st));
  ctrl_regs #(.NREG(8), .NSTAT(2), .AW(AW - SW)) u_r1 (.clk, .rst_n, .addr(s_addr[1]), .wdata(s_wdata[1]),
    .read(s_read[1]), .write(s_write[1]), .rdata(s_rdata[1]), .ready_n(s_ready_n[1]), .regs(regs1), .status(st));
  // slave 2: waits 3 clocks per access, reads return address + 0x100
  int wcnt = 0;
  always_ff @(posedge clk) wcnt <= (s_read[2] || s_write[2]) ? ((wcnt == 3) ? 0 : wcnt + 1) : 0;
  assign s_ready_n[2] = !(wcnt == 3);
  assign s_rdata[2] = 32'(s_addr[2]) + 32'h100;

  task automatic apb(logic wr, logic [AW-1:0] a, logic [31:0] d, output logic [31:0] r, output int waits);
    @(negedge clk); psel = 1; pwrite = wr; paddr = a; pwdata = d; penable = 0;
    @(negedge clk); penable = 1; waits = 0; #1;
    while (!pready) begin @(negedge clk); #1; waits++; end
    r = prdata;
    @(negedge clk); psel = 0; penable = 0; #1;
  endtask

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [31:0] r, ref0 [8], ref1 [8];
    int w;
    m_addr[1] = 0; m_wdata[1] = 0; m_read[1] = 0; m_write[1] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 8; i++) begin
      ref0[i] = $urandom; ref1[i] = $urandom;
      apb(1, 16'h0000 | 16'(i), ref0[i], r, w);
      apb(1, 16'h1000 | 16'(i), ref1[i], r, w);
    end
    for (int i = 0; i < 8; i++) begin
      apb(0, 16'h0000 | 16'(i), 0, r, w); checks++; if (r != ref0[i]) begin failures++; $display("FAIL s0 r%0d", i); end
      apb(0, 16'h1000 | 16'(i), 0, r, w); checks++; if (r != ref1[i]) begin failures++; $display("FAIL s1 r%0d", i); end
    end
    apb(0, 16'h0009, 0, r, w); checks++; if (r != 32'hCAFE_0002) begin failures++; $display("FAIL status"); end
    apb(0, 16'h2005, 0, r, w); checks++; if (r != 32'h105 || w != 3) begin failures++; $display("FAIL wait slave %h %0d", r, w); end
    apb(0, 16'h7000, 0, r, w); checks++; if (r != 0 || w != 0) begin failures++; $display("FAIL unmapped %h %0d", r, w); end
    // both masters at once: master 1 must wait while master 0 is served
    @(negedge clk);
    psel = 1; pwrite = 1; paddr = 16'h2001; pwdata = 1; penable = 0;
    m_addr[1] = 16'h1003; m_wdata[1] = 32'h1234_5678; m_write[1] = 1;
    @(negedge clk); penable = 1; #1;
    checks++; if (!m_ready_n[1]) begin failures++; $display("FAIL master 1 not held off %b %b %b", m_ready_n[0], m_write[0], u_sw.g); end
    while (!pready) begin
      @(negedge clk); #1;
      checks++; if (!m_ready_n[1] && !pready) begin failures++; $display("FAIL priority"); end
    end
    @(negedge clk); psel = 0; penable = 0; #1;
    checks++; if (m_ready_n[1]) begin failures++; $display("FAIL master 1 not served"); end
    @(negedge clk); m_write[1] = 0;
    checks++; if (regs1[3] != 32'h1234_5678) begin failures++; $display("FAIL master 1 write"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
