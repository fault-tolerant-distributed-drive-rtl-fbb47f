// ltc2313_model: behavioural model of a serial ADC for the testbenches.
// On the falling edge of cs_n it takes the value `sample`; while cs_n is
// low it drives the frame MSB first (FRAME_BITS - DATA_BITS leading zeros,
// then the sample), changing the data line on falling sclk edges so it is
// stable at the rising edge.
module ltc2313_model #(
  parameter int unsigned DATA_BITS  = 14,
  parameter int unsigned FRAME_BITS = 16
) (
  input  logic                 sclk,
  input  logic                 cs_n,
  input  logic [DATA_BITS-1:0] sample,
  output logic                 sdo
);
  logic [FRAME_BITS-1:0] frame;
  always @(negedge cs_n) begin
    frame = FRAME_BITS'(sample);
    sdo   = frame[FRAME_BITS-1];
  end
  always @(negedge sclk) if (!cs_n) begin
    frame = {frame[FRAME_BITS-2:0], 1'b0};
    sdo   = frame[FRAME_BITS-1];
  end
endmodule
