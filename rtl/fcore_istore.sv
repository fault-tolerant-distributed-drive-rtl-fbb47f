// fcore_istore: instruction store of the femtoCore.
//
// A dual-port RAM. The host port (control software side) reads and writes
// program words; the core port is a read-only sequential stream. The core
// presents core_addr and sees the word one clock later on core_data
// (registered read, as a block RAM does). While core_running is high the
// host port is interlocked: writes are dropped and host_busy is raised, so a
// program can never be changed while it executes. Host reads take one cycle
// (host_rdata valid the cycle after host_re). The interlock and the dual-port
// structure follow the design description; depth (1024 words) and the plain
// synchronous host port in place of an AXI slave are this implementation's
// choices.
module fcore_istore #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  // host port
  input  logic          host_we,
  input  logic          host_re,
  input  logic [AW-1:0] host_addr,
  input  logic [31:0]   host_wdata,
  output logic [31:0]   host_rdata,
  output logic          host_busy,
  // core port
  input  logic          core_running,
  input  logic [AW-1:0] core_addr,
  output logic [31:0]   core_data
);
  logic [31:0] mem [DEPTH];

  assign host_busy = core_running;

  always_ff @(posedge clk) begin
    if (host_we && !core_running) mem[host_addr] <= host_wdata;
    if (host_re) host_rdata <= mem[host_addr];
  end

  always_ff @(posedge clk) core_data <= mem[core_addr];

endmodule
