// fcore_regfile: femtoCore register file.
//
// The only data memory of the core: one bank of 64 x 32-bit registers per
// SIMD channel, addressed as {channel, register}. Register 0 of every bank
// reads as zero and ignores writes. Two read ports (operands A and B) and one
// write port (writeback) give single-cycle issue; reads are registered (data
// one cycle after the address, old data when the same address is written in
// that cycle), matching block RAM behaviour. The storage is two copies that
// share the write port, one per read port, as the design maps it onto
// dual-port RAM blocks.
//
// A DMA endpoint lets external logic load inputs and fetch results. It is
// interlocked: it is granted (dma_gnt) only while core_running is low, and
// then uses the write port and read port A (dma_rdata one cycle after
// dma_re). One bank of 64 registers per channel is this implementation's
// reading of the SIMD register expansion.
module fcore_regfile #(
  parameter int unsigned CHANNELS = 8,
  parameter int unsigned CW       = (CHANNELS > 1) ? $clog2(CHANNELS) : 1,
  parameter int unsigned AW       = CW + fcore_pkg::RAW
) (
  input  logic          clk,
  input  logic          core_running,
  input  logic [AW-1:0] ra_addr,
  input  logic [AW-1:0] rb_addr,
  output logic [31:0]   ra_data,
  output logic [31:0]   rb_data,
  input  logic          w_en,
  input  logic [AW-1:0] w_addr,
  input  logic [31:0]   w_data,
  // DMA endpoint
  input  logic          dma_we,
  input  logic          dma_re,
  input  logic [AW-1:0] dma_addr,
  input  logic [31:0]   dma_wdata,
  output logic [31:0]   dma_rdata,
  output logic          dma_gnt
);
  localparam int unsigned DEPTH = CHANNELS << fcore_pkg::RAW;

  logic [31:0] bank_a [DEPTH];
  logic [31:0] bank_b [DEPTH];

  logic          we;
  logic [AW-1:0] wa, rda;
  logic [31:0]   wd;
  logic          rd_a_zero, rd_b_zero;
  logic [31:0]   ra_raw, rb_raw;

  assign dma_gnt = !core_running;
  assign we  = core_running ? w_en   : dma_we;
  assign wa  = core_running ? w_addr : dma_addr;
  assign wd  = core_running ? w_data : dma_wdata;
  assign rda = core_running ? ra_addr : dma_addr;

  always_ff @(posedge clk) begin
    if (we && wa[fcore_pkg::RAW-1:0] != '0) begin
      bank_a[wa] <= wd;
      bank_b[wa] <= wd;
    end
    ra_raw    <= bank_a[rda];
    rb_raw    <= bank_b[rb_addr];
    rd_a_zero <= rda[fcore_pkg::RAW-1:0] == '0;
    rd_b_zero <= rb_addr[fcore_pkg::RAW-1:0] == '0;
  end

  // r0 reads as zero whatever the RAM holds
  assign ra_data   = rd_a_zero ? 32'd0 : ra_raw;
  assign rb_data   = rd_b_zero ? 32'd0 : rb_raw;
  assign dma_rdata = ra_data;

endmodule
