// data_capture: on-line signal capture for tuning and monitoring.
//
// NSRC capture points (taps on internal sample streams) each keep their
// latest value. A bank of multiplexers picks NSEL of them (sel[k]). Every
// `divider` clocks (the user-selected sample rate) the NSEL values are
// snapshotted and written, one per clock, into an inline FIFO as tagged
// words {8'(k), 8'(sel[k]), 16-bit value}. When the fill level reaches
// trig_level, trig_out pulses once (for the acquisition of fast
// transients with external instruments). When the FIFO is full, capture
// stops and the whole FIFO is streamed out (out_valid/out_ready/out_data,
// towards a DMA into main memory); buf_done then pulses, standing for the
// transfer-complete interrupt, and capture stays halted until resume, so
// software can fetch the buffer. enable starts and stops sampling.
// The sample rate must leave NSEL clocks per sample (divider >= NSEL).
// FIFO depth and tag layout are this implementation's choices.
module data_capture #(
  parameter int unsigned NSRC  = 16,
  parameter int unsigned NSEL  = 6,
  parameter int unsigned DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     enable,
  input  logic                     resume,
  input  logic [15:0]              divider,
  input  logic [$clog2(DEPTH):0]   trig_level,
  input  logic [$clog2(NSRC)-1:0]  sel [NSEL],
  input  logic                     src_valid [NSRC],
  input  logic [15:0]              src_data  [NSRC],
  output logic                     trig_out,
  output logic                     halted,
  output logic                     buf_done,
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic [31:0]              out_data,
  output logic [$clog2(DEPTH):0]   level
);
  localparam int unsigned PW = $clog2(DEPTH);
  typedef enum logic [1:0] {S_CAP, S_DRAIN, S_HOLD} state_t;
  state_t state;

  logic [15:0]        latest [NSRC];
  logic [15:0]        snap [NSEL];
  logic [15:0]        divc;
  logic [$clog2(NSEL+1)-1:0] pk;
  logic               pushing;
  logic [31:0]        mem [DEPTH];
  logic [PW-1:0]      wp, rp;
  logic               push, pop, full;

  assign full    = (level == (PW+1)'(DEPTH));
  assign push    = (state == S_CAP) && pushing && !full;
  assign pop     = (state == S_DRAIN) && out_valid && out_ready;
  assign halted  = (state != S_CAP);

  always_ff @(posedge clk) begin
    for (int i = 0; i < NSRC; i++) if (src_valid[i]) latest[i] <= src_data[i];
    if (push) mem[wp] <= {8'(pk), 8'(sel[pk[$clog2(NSEL)-1:0]]), snap[pk[$clog2(NSEL)-1:0]]};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_CAP;
      divc      <= '0;
      pk        <= '0;
      pushing   <= 1'b0;
      wp        <= '0;
      rp        <= '0;
      level     <= '0;
      trig_out  <= 1'b0;
      buf_done  <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
      for (int k = 0; k < NSEL; k++) snap[k] <= '0;
    end else begin
      trig_out <= 1'b0;
      buf_done <= 1'b0;
      case (state)
        S_CAP: begin
          // sample timer and snapshot
          if (enable) begin
            if (divc >= divider - 16'd1) begin
              divc <= '0;
              if (!pushing) begin
                for (int k = 0; k < NSEL; k++) snap[k] <= latest[sel[k]];
                pushing <= 1'b1;
                pk      <= '0;
              end
            end else divc <= divc + 1'b1;
          end
          if (push) begin
            wp    <= (wp == PW'(DEPTH - 1)) ? '0 : wp + 1'b1;
            level <= level + 1'b1;
            if (level + 1'b1 == trig_level) trig_out <= 1'b1;
            pk <= pk + 1'b1;
            if (pk == ($bits(pk))'(NSEL - 1)) pushing <= 1'b0;
          end
          if (full) begin
            state   <= S_DRAIN;
            pushing <= 1'b0;
          end
        end
        S_DRAIN: begin
          // stream the buffer out, first in first out
          if (!out_valid || out_ready) begin
            if (level != '0 && !(out_valid && level == (PW+1)'(1))) begin
              out_valid <= 1'b1;
              out_data  <= mem[rp];
              rp        <= (rp == PW'(DEPTH - 1)) ? '0 : rp + 1'b1;
            end else begin
              out_valid <= 1'b0;
            end
          end
          if (pop) begin
            level <= level - 1'b1;
            if (level == (PW+1)'(1)) begin
              state    <= S_HOLD;
              buf_done <= 1'b1;
            end
          end
        end
        default: if (resume) begin
          state <= S_CAP;
          divc  <= '0;
        end
      endcase
    end
  end
endmodule
