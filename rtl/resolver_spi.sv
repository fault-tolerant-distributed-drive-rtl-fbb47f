// resolver_spi: reads shaft angle and speed from an AD2S1210-class
// resolver-to-digital converter over a single SPI channel.
//
// On start the converter's outputs are frozen with a sample_n pulse
// (SAMPLE_LOW clocks low), then two 16-bit words are read MSB first with
// the address pins a[1:0] selecting the register: 2'b00 position, then
// 2'b01 velocity. The converter drives data while cs_n is low; it is
// sampled on the rising sclk edge. Both values are left-aligned in the
// word; only the top RES bits are kept (RES = 10..16, the converter's
// resolution setting), position as an unsigned angle, velocity as a signed
// speed. out_valid pulses when both are updated. The pin sequence follows
// the converter's normal mode as this implementation reads it.
module resolver_spi #(
  parameter int unsigned RES        = 16,
  parameter int unsigned SCLK_DIV   = 4,
  parameter int unsigned SAMPLE_LOW = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  output logic                  busy,
  output logic                  sample_n,
  output logic [1:0]            a,
  output logic                  cs_n,
  output logic                  sclk,
  input  logic                  sdo,
  output logic                  out_valid,
  output logic [RES-1:0]        position,
  output logic signed [RES-1:0] velocity
);
  typedef enum logic [2:0] {S_IDLE, S_SAMPLE, S_SETUP, S_SHIFT, S_NEXT} state_t;
  state_t state;
  logic        word;      // 0 position, 1 velocity
  logic [15:0] sr;
  logic [4:0]  bitn;
  logic [7:0]  div;

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      sample_n  <= 1'b1;
      a         <= 2'b00;
      cs_n      <= 1'b1;
      sclk      <= 1'b0;
      word      <= 1'b0;
      sr        <= '0;
      bitn      <= '0;
      div       <= '0;
      out_valid <= 1'b0;
      position  <= '0;
      velocity  <= '0;
    end else begin
      out_valid <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          sample_n <= 1'b0;
          div      <= '0;
          word     <= 1'b0;
          state    <= S_SAMPLE;
        end
        S_SAMPLE: begin
          div <= div + 1'b1;
          if (div == 8'(SAMPLE_LOW - 1)) begin
            sample_n <= 1'b1;
            div      <= '0;
            state    <= S_SETUP;
          end
        end
        S_SETUP: begin
          // select the register, then open the frame
          a     <= {1'b0, word};
          cs_n  <= 1'b0;
          sclk  <= 1'b0;
          bitn  <= '0;
          div   <= '0;
          state <= S_SHIFT;
        end
        S_SHIFT: begin
          if (div == 8'(SCLK_DIV - 1)) begin
            div  <= '0;
            sclk <= ~sclk;
            if (!sclk) sr <= {sr[14:0], sdo};
            else begin
              bitn <= bitn + 1'b1;
              if (bitn == 5'd15) state <= S_NEXT;
            end
          end else div <= div + 1'b1;
        end
        default: begin
          cs_n <= 1'b1;
          if (!word) begin
            position <= sr[15 -: RES];
            word     <= 1'b1;
            state    <= S_SETUP;
          end else begin
            velocity  <= sr[15 -: RES];
            out_valid <= 1'b1;
            state     <= S_IDLE;
          end
        end
      endcase
    end
  end
endmodule
