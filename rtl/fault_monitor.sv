// fault_monitor: over-range protection on the current measurements.
//
// A bank of window comparators checks every channel of the fast stream
// (each converter sample) against fast_limit and of the decimated stream
// against dec_limit: |x| > limit sets that channel's fault bit. The fast
// check catches gross overloads within one sample; the decimated check,
// on the cleaner control input, allows a tighter limit. Fault bits are
// sticky until clear; trip is their OR and is registered (one clock
// after the offending sample).
module fault_monitor #(
  parameter int unsigned N = 6
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,
  input  logic [15:0]        fast_limit,
  input  logic [15:0]        dec_limit,
  input  logic               fast_valid,
  input  logic signed [15:0] fast [N],
  input  logic               dec_valid,
  input  logic signed [15:0] dec  [N],
  output logic [N-1:0]       fault_fast,
  output logic [N-1:0]       fault_dec,
  output logic               trip
);
  function automatic logic [16:0] mag(logic signed [15:0] x);
    return x[15] ? 17'(-{x[15], x}) : {1'b0, x};
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      fault_fast <= '0;
      fault_dec  <= '0;
    end else begin
      for (int i = 0; i < N; i++) begin
        if (fast_valid && mag(fast[i]) > {1'b0, fast_limit}) fault_fast[i] <= 1'b1;
        if (dec_valid && mag(dec[i]) > {1'b0, dec_limit}) fault_dec[i] <= 1'b1;
      end
    end
  end
  assign trip = |{fault_fast, fault_dec};
endmodule
