// rtcu_serializer: pushes one frame onto the serial line.
//
// A frame (left-aligned, start bit in bit 56) and its length are loaded
// when load is high and busy is low; the bits leave MSB first, each held
// for CLK_PER_BIT clocks, followed by one idle bit (line low) so the
// receiver always sees a rising start edge. busy covers the whole frame and
// the guard bit. The line rate of one bit per clock is this implementation's
// default, chosen to match the frame times measured for the design.
module rtcu_serializer #(
  parameter int unsigned CLK_PER_BIT = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic [56:0] frame,
  input  logic [5:0]  len,
  output logic        busy,
  output logic        line
);
  logic [56:0] sr;
  logic [6:0]  bits_left;
  logic [$clog2(CLK_PER_BIT+1)-1:0] div;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sr        <= '0;
      bits_left <= '0;
      div       <= '0;
      line      <= 1'b0;
    end else if (bits_left == 7'd0) begin
      line <= 1'b0;
      if (load) begin
        line      <= frame[56];
        sr        <= {frame[55:0], 1'b0};
        bits_left <= 7'(len) + 7'd1;  // frame bits + guard bit
        div       <= '0;
      end
    end else begin
      if (div == ($bits(div))'(CLK_PER_BIT - 1)) begin
        div       <= '0;
        bits_left <= bits_left - 7'd1;
        line      <= (bits_left > 7'd2) ? sr[56] : 1'b0;
        sr        <= {sr[55:0], 1'b0};
      end else begin
        div <= div + 1'b1;
      end
    end
  end

  assign busy = (bits_left != 7'd0);
endmodule
