// edge_aligner: turns a duty-cycle command into PWM comparator values for
// one half bridge, with dead time.
//
// The duty command (carrier counts, 0..period) is first saturated into the
// range the hardware tolerates: at least dt_rise and at most
// period - dt_fall, and inside the user limits duty_min..duty_max. Then the
// two switch windows of an edge-aligned (sawtooth, 0..period-1) carrier are
// computed:
//   high side on for  dt_rise <= c < duty
//   low side  on for  duty + dt_fall <= c < period
// so the low->high transition gets dt_rise of dead time and the high->low
// transition dt_fall, independently, which covers asymmetric gate drivers.
// Both sides can never overlap, whatever the command. Output registered,
// one clock after in_valid; out_valid requests a (shadowed) modulator
// update. The window formulas are this implementation's.
module edge_aligner #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] period,
  input  logic [W-1:0] dt_rise,
  input  logic [W-1:0] dt_fall,
  input  logic [W-1:0] duty_min,
  input  logic [W-1:0] duty_max,
  input  logic         in_valid,
  input  logic [W-1:0] duty,
  output logic         out_valid,
  output logic         saturated,
  output logic [W-1:0] hs_on,
  output logic [W-1:0] hs_off,
  output logic [W-1:0] ls_on,
  output logic [W-1:0] ls_off
);
  logic [W:0] lo, hi, d;
  logic       sat;

  always_comb begin
    lo  = {1'b0, (duty_min > dt_rise) ? duty_min : dt_rise};
    hi  = {1'b0, period} - {1'b0, dt_fall};
    if ({1'b0, duty_max} < hi) hi = {1'b0, duty_max};
    if (hi < lo) hi = lo;
    d   = {1'b0, duty};
    sat = 1'b0;
    if (d < lo) begin d = lo; sat = 1'b1; end
    if (d > hi) begin d = hi; sat = 1'b1; end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      saturated <= 1'b0;
      hs_on     <= '0;
      hs_off    <= '0;
      ls_on     <= '0;
      ls_off    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        saturated <= sat;
        hs_on     <= dt_rise;
        hs_off    <= d[W-1:0];
        ls_on     <= W'(d + {1'b0, dt_fall});
        ls_off    <= period;
      end
    end
  end
endmodule
