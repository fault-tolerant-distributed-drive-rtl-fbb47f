// rtcu_deserializer: receives one frame from the serial line.
//
// The line is idle low; a high level starts a frame. Each bit is sampled in
// the middle of its CLK_PER_BIT-clock period (on every clock for one clock
// per bit), assuming the transmitter clock is available, distributed or
// recovered, as the design allows. After len bits (start bit included) the
// frame is presented left-aligned, start bit in bit 56, with out_valid for
// one clock. active is high while a frame is being received.
module rtcu_deserializer #(
  parameter int unsigned CLK_PER_BIT = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [5:0]  len,
  input  logic        line,
  output logic        active,
  output logic        out_valid,
  output logic [56:0] out_frame
);
  localparam int unsigned DW = $clog2(CLK_PER_BIT + 1);
  logic [56:0]   sr;
  logic [6:0]    cnt;
  logic [DW-1:0] div;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active    <= 1'b0;
      cnt       <= '0;
      div       <= '0;
      sr        <= '0;
      out_valid <= 1'b0;
      out_frame <= '0;
    end else begin
      out_valid <= 1'b0;
      if (!active) begin
        if (line) begin
          active <= 1'b1;
          sr     <= {1'b1, 56'd0};
          cnt    <= 7'd1;
          div    <= DW'((CLK_PER_BIT > 1) ? 1 : 0);  // bit periods start at div = 0
        end
      end else begin
        if (div == DW'(CLK_PER_BIT - 1)) begin
          div <= '0;
        end else begin
          div <= div + 1'b1;
        end
        // sample point: middle of the bit period
        if (div == DW'((CLK_PER_BIT - 1) / 2) ) begin
          sr[6'(7'd56 - cnt)] <= line;
        end
        if (div == DW'(CLK_PER_BIT - 1)) begin
          cnt <= cnt + 7'd1;
          if (cnt == 7'(len) - 7'd1) begin
            active    <= 1'b0;
            out_valid <= 1'b1;
            out_frame <= sr;
            if (CLK_PER_BIT == 1) out_frame[6'(7'd56 - cnt)] <= line;
          end
        end
      end
    end
  end
endmodule
