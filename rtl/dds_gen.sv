// dds_gen: multichannel direct digital synthesis of sine/cosine references.
//
// One 32-bit phase accumulator advances by freq_word on every tick (the
// control sample). Channel k adds its own phase offset, so any number of
// phase-shifted sinusoids (for example two three-phase sets 30 degrees
// apart, or a rearranged set after a phase is lost) come from one
// accumulator and one table. The table holds only the first quarter wave,
// 2**LUT_AW samples of sin((i + 0.5) * pi/2 / 2**LUT_AW) at full scale 32767;
// the half-sample offset makes the mirrored quadrants exact. Quadrant bits
// select mirroring and sign, giving sine and cosine over the whole circle
// from a quarter of the memory. The table is computed at elaboration.
//
// After a tick the channels are produced one per clock, k = 0..N-1:
// out_valid, out_ch, out_sin, out_cos; channel k appears k+3 clocks after
// the tick. Ticks must be at least N+1 clocks apart.
module dds_gen #(
  parameter int unsigned N      = 6,
  parameter int unsigned LUT_AW = 10
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     tick,
  input  logic [31:0]              freq_word,
  input  logic [31:0]              phase_off [N],
  output logic                     out_valid,
  output logic [$clog2(N+1)-1:0]   out_ch,
  output logic signed [15:0]       out_sin,
  output logic signed [15:0]       out_cos
);
  localparam int unsigned DEPTH = 1 << LUT_AW;
  localparam int unsigned CHW   = $clog2(N + 1);

  // sine by Taylor series, x in [0, pi/2]
  function automatic real sin_q(real x);
    real t, s;
    t = x;
    s = x;
    for (int k = 1; k < 12; k++) begin
      t = -t * x * x / real'((2 * k) * (2 * k + 1));
      s = s + t;
    end
    return s;
  endfunction

  typedef logic [15:0] lut_t [DEPTH];
  function automatic lut_t make_lut();
    lut_t l;
    for (int i = 0; i < DEPTH; i++)
      l[i] = 16'($rtoi(32767.0 * sin_q((real'(i) + 0.5) * 1.5707963267948966 / real'(DEPTH)) + 0.5));
    return l;
  endfunction
  localparam lut_t LUT = make_lut();

  logic [31:0]    acc;
  logic           busy;
  logic [CHW-1:0] ch;
  logic [31:0]    ph_s, ph_c;
  logic [15:0]    t_s, t_c;
  logic [1:0]     q_s, q_c;
  logic           v1;
  logic [CHW-1:0] ch1;

  function automatic logic [LUT_AW-1:0] idx(logic [31:0] p);
    logic [LUT_AW-1:0] i;
    i = p[29 -: LUT_AW];
    return p[30] ? ~i : i;
  endfunction

  assign ph_s = acc + phase_off[ch];
  assign ph_c = ph_s + 32'h4000_0000;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc  <= '0;
      busy <= 1'b0;
      ch   <= '0;
      v1   <= 1'b0;
      ch1  <= '0;
      q_s  <= '0;
      q_c  <= '0;
      t_s  <= '0;
      t_c  <= '0;
      out_valid <= 1'b0;
      out_ch    <= '0;
      out_sin   <= '0;
      out_cos   <= '0;
    end else begin
      // stage 0: accumulator and channel sequencing
      if (tick) begin
        acc  <= acc + freq_word;
        busy <= 1'b1;
        ch   <= '0;
      end else if (busy) begin
        ch <= ch + 1'b1;
        if (ch == CHW'(N - 1)) busy <= 1'b0;
      end
      // stage 1: table read
      v1  <= busy;
      ch1 <= ch;
      t_s <= LUT[idx(ph_s)];
      t_c <= LUT[idx(ph_c)];
      q_s <= ph_s[31:30];
      q_c <= ph_c[31:30];
      // stage 2: sign
      out_valid <= v1;
      out_ch    <= ch1;
      out_sin   <= q_s[1] ? -signed'(t_s) : signed'(t_s);
      out_cos   <= q_c[1] ? -signed'(t_c) : signed'(t_c);
    end
  end
endmodule
