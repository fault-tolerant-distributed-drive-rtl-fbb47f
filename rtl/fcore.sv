// fcore: the femtoCore embedded DSP.
//
// A deterministic floating point processor for control laws. A pulse on
// start runs the program held in the instruction store from address 0 to
// STOP; done pulses when every result is in the register file. The same
// program can run interleaved over n_ch channels (SIMD), each channel with
// its own register bank, which suits one identical current controller per
// machine phase. Pipeline: fetch (store read) -> decode (constant
// extraction, field split, register read) -> execute (LATENCY stages) ->
// writeback. There are no branches, so the run time depends only on the
// program and n_ch.
//
// Interfaces: the host port writes/reads the instruction store (refused
// while running); the DMA port reads/writes the register file at
// {channel, register} while the core is idle (dma_gnt).
module fcore #(
  parameter int unsigned CHANNELS   = 8,
  parameter int unsigned IMEM_DEPTH = 1024,
  parameter int unsigned LATENCY    = 5,
  parameter int unsigned CW         = (CHANNELS > 1) ? $clog2(CHANNELS) : 1,
  parameter int unsigned IAW        = $clog2(IMEM_DEPTH)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [CW:0]    n_ch,
  output logic           running,
  output logic           done,
  // host port to the instruction store
  input  logic           prog_we,
  input  logic           prog_re,
  input  logic [IAW-1:0] prog_addr,
  input  logic [31:0]    prog_wdata,
  output logic [31:0]    prog_rdata,
  output logic           prog_busy,
  // DMA endpoint of the register file
  input  logic           dma_we,
  input  logic           dma_re,
  input  logic [CW+5:0]  dma_addr,
  input  logic [31:0]    dma_wdata,
  output logic [31:0]    dma_rdata,
  output logic           dma_gnt
);
  logic [IAW-1:0] imem_addr;
  logic [31:0]    imem_data;
  logic [CW+5:0]  ra_addr, rb_addr, ex_tag, wb_tag;
  logic [31:0]    ra_data, rb_data, ex_imm, wb_data;
  logic           ex_valid, wb_valid;
  logic [4:0]     ex_op;

  fcore_istore #(.DEPTH(IMEM_DEPTH), .AW(IAW)) u_istore (
    .clk, .host_we(prog_we), .host_re(prog_re), .host_addr(prog_addr),
    .host_wdata(prog_wdata), .host_rdata(prog_rdata), .host_busy(prog_busy),
    .core_running(running), .core_addr(imem_addr), .core_data(imem_data));

  fcore_ctrl #(.CHANNELS(CHANNELS), .CW(CW), .IAW(IAW), .LATENCY(LATENCY)) u_ctrl (
    .clk, .rst_n, .start, .n_ch, .running, .done,
    .imem_addr, .imem_data, .ra_addr, .rb_addr,
    .ex_valid, .ex_op, .ex_imm, .ex_tag);

  fcore_regfile #(.CHANNELS(CHANNELS), .CW(CW)) u_rf (
    .clk, .core_running(running),
    .ra_addr, .rb_addr, .ra_data, .rb_data,
    .w_en(wb_valid), .w_addr(wb_tag), .w_data(wb_data),
    .dma_we, .dma_re, .dma_addr, .dma_wdata, .dma_rdata, .dma_gnt);

  fcore_exec #(.LATENCY(LATENCY), .TW(CW + 6)) u_exec (
    .clk, .rst_n, .in_valid(ex_valid), .in_op(ex_op), .in_a(ra_data),
    .in_b(rb_data), .in_imm(ex_imm), .in_tag(ex_tag),
    .out_valid(wb_valid), .out_result(wb_data), .out_tag(wb_tag));

endmodule
