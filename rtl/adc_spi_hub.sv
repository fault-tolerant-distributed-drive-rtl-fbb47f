// adc_spi_hub: synchronous sampling of NADC serial ADCs (LTC2313-14 class)
// through one shared SPI master.
//
// One FSM and one clock/chip-select pair serve all converters; each
// converter has its own data line and shift register, so all channels are
// sampled at the same instant and read in parallel. A start pulse (the
// sample timer) lowers cs_n and runs FRAME_BITS clock cycles of sclk
// (SCLK_DIV system clocks per half period); the data lines are sampled on
// the rising sclk edge, MSB first. The last DATA_BITS bits of each frame
// are the sample. out_valid pulses for one clock with all NADC samples.
// Conversion time from start to out_valid is
// 2 + 2 * SCLK_DIV * FRAME_BITS clocks. Frame length and alignment are this
// implementation's reading of the converter's serial format.
module adc_spi_hub #(
  parameter int unsigned NADC       = 6,
  parameter int unsigned DATA_BITS  = 14,
  parameter int unsigned FRAME_BITS = 16,
  parameter int unsigned SCLK_DIV   = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  output logic                 busy,
  output logic                 sclk,
  output logic                 cs_n,
  input  logic [NADC-1:0]      miso,
  output logic                 out_valid,
  output logic [DATA_BITS-1:0] out_data [NADC]
);
  typedef enum logic [1:0] {S_IDLE, S_SHIFT, S_DONE} state_t;
  state_t state;
  logic [FRAME_BITS-1:0] sr [NADC];
  logic [$clog2(FRAME_BITS+1)-1:0] bitn;
  logic [$clog2(SCLK_DIV+1)-1:0]   div;

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      sclk      <= 1'b0;
      cs_n      <= 1'b1;
      bitn      <= '0;
      div       <= '0;
      out_valid <= 1'b0;
      for (int i = 0; i < NADC; i++) begin
        sr[i]       <= '0;
        out_data[i] <= '0;
      end
    end else begin
      out_valid <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          cs_n  <= 1'b0;
          sclk  <= 1'b0;
          bitn  <= '0;
          div   <= '0;
          state <= S_SHIFT;
        end
        S_SHIFT: begin
          if (div == ($bits(div))'(SCLK_DIV - 1)) begin
            div  <= '0;
            sclk <= ~sclk;
            if (!sclk) begin
              // rising edge: sample every data line
              for (int i = 0; i < NADC; i++) sr[i] <= {sr[i][FRAME_BITS-2:0], miso[i]};
            end else begin
              bitn <= bitn + 1'b1;
              if (bitn == ($bits(bitn))'(FRAME_BITS - 1)) state <= S_DONE;
            end
          end else begin
            div <= div + 1'b1;
          end
        end
        default: begin
          cs_n      <= 1'b1;
          out_valid <= 1'b1;
          for (int i = 0; i < NADC; i++) out_data[i] <= sr[i][DATA_BITS-1:0];
          state     <= S_IDLE;
        end
      endcase
    end
  end
endmodule
