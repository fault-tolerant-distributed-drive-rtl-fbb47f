// pid_ctrl: fixed-point PID speed controller, fully pipelined.
//
// Each gain is an integer multiplier and a right shift (K = k_m / 2**k_s),
// so fractional gains cost one multiplier each and the denominators are
// powers of two. For each input sample (in_valid):
//   e  = setpoint - measure
//   I += (ki_m * e) >>> ki_s          (clamped to +-out_lim: anti-windup)
//   u  = (kp_m * e) >>> kp_s + I + (kd_m * (e - e_prev)) >>> kd_s
// and u is saturated to +-out_lim. Three pipeline stages (error, products,
// sum/saturate) accept a new sample every clock; out_valid follows in_valid
// by three clocks. clear resets the integrator and the derivative memory.
// Signal widths, the clamping rule and the integrator placement are this
// implementation's choices.
module pid_ctrl (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,
  input  logic [15:0]        kp_m, ki_m, kd_m,
  input  logic [4:0]         kp_s, ki_s, kd_s,
  input  logic [15:0]        out_lim,
  input  logic               in_valid,
  input  logic signed [15:0] setpoint,
  input  logic signed [15:0] measure,
  output logic               out_valid,
  output logic signed [15:0] out
);
  logic               v1, v2;
  logic signed [16:0] e1, de1, e_prev;
  logic signed [33:0] p2, i2, d2;
  logic signed [33:0] integ;
  logic signed [33:0] lim;

  assign lim = 34'(out_lim);

  function automatic logic signed [33:0] clamp(logic signed [35:0] x, logic signed [33:0] l);
    if (x > 36'(l)) return l;
    if (x < -36'(l)) return -l;
    return 34'(x);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; out_valid <= 1'b0;
      e1 <= '0; de1 <= '0; e_prev <= '0;
      p2 <= '0; i2 <= '0; d2 <= '0;
      integ <= '0; out <= '0;
    end else begin
      // stage 1: error and its difference
      v1 <= in_valid;
      if (in_valid) begin
        e1     <= 17'(setpoint) - 17'(measure);
        de1    <= 17'(setpoint) - 17'(measure) - e_prev;
        e_prev <= 17'(setpoint) - 17'(measure);
      end
      // stage 2: gains (multiply, then shift)
      v2 <= v1;
      p2 <= (34'(e1)  * 34'(signed'({1'b0, kp_m}))) >>> kp_s;
      i2 <= (34'(e1)  * 34'(signed'({1'b0, ki_m}))) >>> ki_s;
      d2 <= (34'(de1) * 34'(signed'({1'b0, kd_m}))) >>> kd_s;
      // stage 3: integrate, sum, saturate
      out_valid <= v2;
      if (v2) begin
        logic signed [33:0] ni;
        ni    = clamp(36'(integ) + 36'(i2), lim);
        integ <= ni;
        out   <= 16'(clamp(36'(p2) + 36'(ni) + 36'(d2), lim));
      end
      if (clear) begin
        integ  <= '0;
        e_prev <= '0;
      end
    end
  end
endmodule
