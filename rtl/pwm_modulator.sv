// pwm_modulator: multi-carrier PWM generator with shadow registers.
//
// NCAR sawtooth carriers count 0..period-1 together; carrier k is offset
// by its own phase shift, so interleaved or phase-shifted patterns need no
// extra logic. Each carrier drives NCH channels; each channel has two
// comparators and its output is high while cmp_on <= carrier < cmp_off.
// With comp_en set, the channel's second output is the complement of the
// first (for drivers that need a complementary pair without dead time),
// otherwise it is low.
//
// Shadow loading: shadow_we copies all inputs into shadow registers at any
// time; they become active together at the next period start (carrier 0
// wrap), so a half-written set is never used and the writer needs no
// synchronisation with the carrier. The first load after enable is taken at
// once. Outputs are registered and low while enable is low.
//
// Synchronisation: a sync pulse restarts carrier 0 at sync_val (and takes
// a pending register set, as a period start does). Cells that receive the
// same sync message at the same time therefore run aligned carriers, and
// different sync_val values give phase-interleaved cells.
module pwm_modulator #(
  parameter int unsigned W    = 16,
  parameter int unsigned NCAR = 1,
  parameter int unsigned NCH  = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         enable,
  input  logic         shadow_we,
  input  logic         sync,
  input  logic [W-1:0] sync_val,
  input  logic [W-1:0] period,
  input  logic [W-1:0] phase   [NCAR],
  input  logic [W-1:0] cmp_on  [NCAR][NCH],
  input  logic [W-1:0] cmp_off [NCAR][NCH],
  input  logic         comp_en [NCAR][NCH],
  output logic         out_a   [NCAR][NCH],
  output logic         out_b   [NCAR][NCH],
  output logic         period_start
);
  // shadow and active register sets
  logic [W-1:0] sh_period, act_period;
  logic [W-1:0] sh_phase [NCAR], act_phase [NCAR];
  logic [W-1:0] sh_on [NCAR][NCH], sh_off [NCAR][NCH], act_on [NCAR][NCH], act_off [NCAR][NCH];
  logic         sh_comp [NCAR][NCH], act_comp [NCAR][NCH];
  logic         pending, running;
  logic [W-1:0] base;            // carrier 0
  logic [W-1:0] car [NCAR];
  logic         wrap, take;

  assign wrap = running && (base >= act_period - 1'b1);
  assign take = pending && (wrap || sync || !running);
  assign period_start = wrap;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pending    <= 1'b0;
      running    <= 1'b0;
      base       <= '0;
      act_period <= '0;
      sh_period  <= '0;
      for (int k = 0; k < NCAR; k++) begin
        act_phase[k] <= '0;
        sh_phase[k]  <= '0;
        for (int j = 0; j < NCH; j++) begin
          act_on[k][j] <= '0; act_off[k][j] <= '0; act_comp[k][j] <= 1'b0;
          sh_on[k][j]  <= '0; sh_off[k][j]  <= '0; sh_comp[k][j]  <= 1'b0;
          out_a[k][j]  <= 1'b0; out_b[k][j]  <= 1'b0;
        end
      end
    end else begin
      if (shadow_we) begin
        pending   <= 1'b1;
        sh_period <= period;
        for (int k = 0; k < NCAR; k++) begin
          sh_phase[k] <= phase[k];
          for (int j = 0; j < NCH; j++) begin
            sh_on[k][j]   <= cmp_on[k][j];
            sh_off[k][j]  <= cmp_off[k][j];
            sh_comp[k][j] <= comp_en[k][j];
          end
        end
      end else if (take) begin
        pending <= 1'b0;
      end
      if (take) begin
        act_period <= sh_period;
        for (int k = 0; k < NCAR; k++) begin
          act_phase[k] <= sh_phase[k];
          for (int j = 0; j < NCH; j++) begin
            act_on[k][j]   <= sh_on[k][j];
            act_off[k][j]  <= sh_off[k][j];
            act_comp[k][j] <= sh_comp[k][j];
          end
        end
      end
      // carrier
      if (!enable) begin
        running <= 1'b0;
        base    <= '0;
      end else if (take && !running) begin
        running <= 1'b1;
        base    <= '0;
      end else if (running && sync) begin
        base <= (sync_val >= act_period) ? '0 : sync_val;
      end else if (running) begin
        base <= wrap ? '0 : base + 1'b1;
      end
      // comparators
      for (int k = 0; k < NCAR; k++)
        for (int j = 0; j < NCH; j++) begin
          logic a;
          a = running && enable && (car[k] >= act_on[k][j]) && (car[k] < act_off[k][j]);
          out_a[k][j] <= a;
          out_b[k][j] <= running && enable && act_comp[k][j] && !a;
        end
    end
  end

  // carrier k = (carrier 0 + phase k) mod period
  always_comb
    for (int k = 0; k < NCAR; k++) begin
      logic [W:0] s;
      s = {1'b0, base} + {1'b0, act_phase[k]};
      car[k] = (s >= {1'b0, act_period}) ? W'(s - {1'b0, act_period}) : s[W-1:0];
    end

endmodule
