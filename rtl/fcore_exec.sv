// fcore_exec: femtoCore execution unit.
//
// Executes one operation per clock: floating point add/sub/multiply,
// int<->float conversion, compares, bitwise logic, saturation and the
// constant load (see fcore_pkg for the exact semantics). The operation is
// evaluated in the first stage and its result, destination and channel tag
// travel through a pipeline of LATENCY registers, so every operation retires
// exactly LATENCY cycles after issue, with no stalls and no flushes: the
// core's execution time is fixed by the program length alone. The document
// gives the five-stage depth; placing all logic ahead of the registers (to
// be balanced by retiming) is this implementation's simplification.
//
// Timing: in_* sampled at a rising edge appear on out_* LATENCY edges later.
module fcore_exec #(
  parameter int unsigned LATENCY = 5,
  parameter int unsigned TW      = 9     // width of the {channel,register} tag
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [4:0]    in_op,
  input  logic [31:0]   in_a,
  input  logic [31:0]   in_b,
  input  logic [31:0]   in_imm,
  input  logic [TW-1:0] in_tag,
  output logic          out_valid,
  output logic [31:0]   out_result,
  output logic [TW-1:0] out_tag
);
  logic          v_q   [LATENCY];
  logic [31:0]   r_q   [LATENCY];
  logic [TW-1:0] t_q   [LATENCY];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LATENCY; i++) v_q[i] <= 1'b0;
    end else begin
      v_q[0] <= in_valid && fcore_pkg::op_writes(in_op);
      for (int i = 1; i < LATENCY; i++) v_q[i] <= v_q[i-1];
    end
  end

  // result and tag pipeline: data only, no reset needed
  always_ff @(posedge clk) begin
    r_q[0] <= fcore_pkg::fcore_op(in_op, in_a, in_b, in_imm);
    t_q[0] <= in_tag;
    for (int i = 1; i < LATENCY; i++) begin
      r_q[i] <= r_q[i-1];
      t_q[i] <= t_q[i-1];
    end
  end

  assign out_valid  = v_q[LATENCY-1];
  assign out_result = r_q[LATENCY-1];
  assign out_tag    = t_q[LATENCY-1];

endmodule
