// fcore_dma_in: input DMA engine of the femtoCore.
//
// On trigger it takes a snapshot of NIN input words (measured currents,
// references, parameters) and writes them, one per clock, into the core's
// register file at the programmable addresses map_addr[k] = {channel,
// register}. It only writes while the register file grants DMA access
// (core idle), so it can never disturb a run. done pulses one clock after
// the last write; with the core idle a transfer takes NIN + 1 clocks. The
// snapshot-then-sequence structure is this implementation's choice.
module fcore_dma_in #(
  parameter int unsigned NIN = 8,
  parameter int unsigned AW  = 9
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          trigger,
  input  logic [31:0]   in_data  [NIN],
  input  logic [AW-1:0] map_addr [NIN],
  output logic          busy,
  output logic          done,
  // register file DMA port
  input  logic          dma_gnt,
  output logic          dma_we,
  output logic [AW-1:0] dma_addr,
  output logic [31:0]   dma_wdata
);
  localparam int unsigned KW = $clog2(NIN + 1);
  logic [31:0]   snap [NIN];
  logic [KW-1:0] k;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      k    <= '0;
      for (int i = 0; i < NIN; i++) snap[i] <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (trigger) begin
          busy <= 1'b1;
          k    <= '0;
          for (int i = 0; i < NIN; i++) snap[i] <= in_data[i];
        end
      end else if (dma_gnt) begin
        k <= k + 1'b1;
        if (k == KW'(NIN - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign dma_we    = busy && dma_gnt;
  assign dma_addr  = map_addr[k[$clog2(NIN)-1:0]];
  assign dma_wdata = snap[k[$clog2(NIN)-1:0]];
endmodule
