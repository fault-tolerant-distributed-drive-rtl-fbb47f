// adc_postproc: calibration and decimation of the phase current samples.
//
// Every raw sample set (N channels, unsigned converter codes) has a
// per-channel offset removed, giving signed samples (fast stream, one
// clock after in_valid). The fast samples are then averaged over
// 2**LOG2_DECIM consecutive sets (boxcar average, sum shifted right) to
// bring the rate down to the control frequency (decimated stream,
// dec_valid one clock after the fast set that completes a block).
// The default factor of 4 turns 240 kSa/s into 60 kSa/s, as in the
// experimental setup; gain calibration is not part of this block.
module adc_postproc #(
  parameter int unsigned N          = 6,
  parameter int unsigned IN_BITS    = 14,
  parameter int unsigned LOG2_DECIM = 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic [IN_BITS-1:0]       raw    [N],
  input  logic signed [15:0]       offset [N],
  output logic                     fast_valid,
  output logic signed [15:0]       fast   [N],
  output logic                     dec_valid,
  output logic signed [15:0]       dec    [N]
);
  logic signed [15+LOG2_DECIM:0] acc [N];
  logic [LOG2_DECIM-1:0]         cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fast_valid <= 1'b0;
      dec_valid  <= 1'b0;
      cnt        <= '0;
      for (int i = 0; i < N; i++) begin
        fast[i] <= '0;
        dec[i]  <= '0;
        acc[i]  <= '0;
      end
    end else begin
      fast_valid <= in_valid;
      dec_valid  <= 1'b0;
      if (in_valid)
        for (int i = 0; i < N; i++) fast[i] <= 16'(signed'({1'b0, raw[i]}) - offset[i]);
      if (fast_valid) begin
        cnt <= cnt + 1'b1;
        for (int i = 0; i < N; i++) begin
          logic signed [15+LOG2_DECIM:0] s;
          s = ((cnt == '0) ? '0 : acc[i]) + (16+LOG2_DECIM)'(fast[i]);
          acc[i] <= s;
          if (cnt == '1) dec[i] <= 16'(s >>> LOG2_DECIM);
        end
        if (cnt == '1) dec_valid <= 1'b1;
      end
    end
  end
endmodule
