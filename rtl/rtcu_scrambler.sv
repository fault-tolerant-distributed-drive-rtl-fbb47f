// rtcu_scrambler: multiplicative (self-synchronising) scrambler or
// descrambler of the 40-bit message payload.
//
// The payload is treated as a bit stream, bit 39 first, through the
// polynomial 1 + x^6 + x^7: the scrambler sends y[n] = x[n] ^ y[n-6] ^ y[n-7],
// the descrambler recovers x[n] = y[n] ^ y[n-6] ^ y[n-7]. The state (the last
// seven line bits) carries from message to message, so after a lost message
// the descrambler resynchronises by itself within seven bits. A whole
// payload is processed per clock; the result is registered (one cycle of
// latency). With bypass high the payload passes unchanged, as is allowed
// when the clock is distributed separately and the line needs no transition
// density. The polynomial is this implementation's choice.
module rtcu_scrambler #(
  parameter bit DESCRAMBLE = 1'b0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        bypass,
  input  logic        in_valid,
  input  logic [39:0] in_data,
  output logic        out_valid,
  output logic [39:0] out_data
);
  logic [6:0]  state;   // state[0] = y[n-1] ... state[6] = y[n-7]
  logic [6:0]  st_n;
  logic [39:0] res;

  always_comb begin
    st_n = state;
    for (int i = 39; i >= 0; i--) begin
      logic y;
      if (DESCRAMBLE) begin
        y      = in_data[i];
        res[i] = in_data[i] ^ st_n[5] ^ st_n[6];
      end else begin
        y      = in_data[i] ^ st_n[5] ^ st_n[6];
        res[i] = y;
      end
      st_n = {st_n[5:0], y};
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_data <= bypass ? in_data : res;
        if (!bypass) state <= st_n;
      end
    end
  end
endmodule
