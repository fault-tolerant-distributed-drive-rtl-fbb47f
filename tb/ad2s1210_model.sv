// ad2s1210_model: behavioural model of the resolver-to-digital converter's
// read-out for the testbenches. The rising edge of sample_n latches the
// angle and speed inputs; while cs_n is low the register selected by a[0]
// (0 position, 1 velocity) is shifted out MSB first, data changing on the
// falling sclk edge.
module ad2s1210_model (
  input  logic        sample_n,
  input  logic [1:0]  a,
  input  logic        cs_n,
  input  logic        sclk,
  input  logic [15:0] angle,
  input  logic [15:0] speed,
  output logic        sdo
);
  logic [15:0] pos_l, vel_l, sr;
  always @(posedge sample_n) begin pos_l = angle; vel_l = speed; end
  always @(negedge cs_n) begin sr = a[0] ? vel_l : pos_l; sdo = sr[15]; end
  always @(negedge sclk) if (!cs_n) begin sr = {sr[14:0], 1'b0}; sdo = sr[15]; end
endmodule
