// ctrl_regs: a control bus slave holding NREG read/write configuration
// registers followed by NSTAT read-only status words. Writes complete in
// one clock; reads return the addressed word in the same clock (ready_n is
// always low). Addresses are word indices. Registers reset to zero except
// those given in RESET_VALS.
module ctrl_regs #(
  parameter int unsigned NREG  = 16,
  parameter int unsigned NSTAT = 4,
  parameter int unsigned AW    = 12,
  parameter logic [31:0] RESET_VALS [NREG] = '{default: 32'd0}
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW-1:0] addr,
  input  logic [31:0]   wdata,
  input  logic          read,
  input  logic          write,
  output logic [31:0]   rdata,
  output logic          ready_n,
  output logic [31:0]   regs [NREG],
  input  logic [31:0]   status [NSTAT]
);
  assign ready_n = 1'b0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NREG; i++) regs[i] <= RESET_VALS[i];
    end else if (write && 32'(addr) < NREG) begin
      regs[addr[$clog2(NREG)-1:0]] <= wdata;
    end
  end

  always_comb begin
    rdata = '0;
    if (read) begin
      if (32'(addr) < NREG) rdata = regs[addr[$clog2(NREG)-1:0]];
      else if (32'(addr) < NREG + NSTAT) rdata = status[32'(addr) - NREG];
    end
  end
endmodule
