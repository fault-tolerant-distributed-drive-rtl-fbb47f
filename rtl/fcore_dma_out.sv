// fcore_dma_out: output DMA engine of the femtoCore.
//
// On trigger (the core's done) it reads NOUT registers at the programmable
// addresses map_addr[k] from the register file, one per clock, and
// presents each as out_valid / out_idx / out_data one clock after its read
// (register file read latency). The words are typically the duty cycles
// that are then sent to the power cells. Reads wait for the DMA grant.
// done pulses with the last word; a transfer takes NOUT + 1 clocks.
module fcore_dma_out #(
  parameter int unsigned NOUT = 6,
  parameter int unsigned AW   = 9
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      trigger,
  input  logic [AW-1:0]             map_addr [NOUT],
  output logic                      busy,
  output logic                      done,
  output logic                      out_valid,
  output logic [$clog2(NOUT+1)-1:0] out_idx,
  output logic [31:0]               out_data,
  // register file DMA port
  input  logic                      dma_gnt,
  output logic                      dma_re,
  output logic [AW-1:0]             dma_addr,
  input  logic [31:0]               dma_rdata
);
  localparam int unsigned KW = $clog2(NOUT + 1);
  logic [KW-1:0] k, k_q;
  logic          rd_q, last_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      k      <= '0;
      k_q    <= '0;
      rd_q   <= 1'b0;
      last_q <= 1'b0;
    end else begin
      rd_q   <= dma_re;
      k_q    <= k;
      last_q <= dma_re && (k == KW'(NOUT - 1));
      if (!busy) begin
        if (trigger) begin
          busy <= 1'b1;
          k    <= '0;
        end
      end else if (dma_gnt) begin
        k <= k + 1'b1;
        if (k == KW'(NOUT - 1)) busy <= 1'b0;
      end
    end
  end

  assign dma_re    = busy && dma_gnt;
  assign dma_addr  = map_addr[k[$clog2(NOUT)-1:0]];
  assign out_valid = rd_q;
  assign out_idx   = k_q;
  assign out_data  = dma_rdata;
  assign done      = last_q;
endmodule
