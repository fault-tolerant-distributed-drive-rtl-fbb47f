// rtcu_fec_enc: forward error correction encoder and frame builder.
//
// Adds the check bits of the selected code to a (scrambled) payload and
// assembles the frame, start bit first, left-aligned in a FRAME_MAX vector:
// none (41 bits), Hamming SECDED (48 bits: 6 check bits, overall parity) or
// RS(15,11) shortened to 10 data symbols (57 bits: 4 parity symbols). One
// clock of latency; out_len is the frame length in bits. The code choice per
// channel quality follows the design description; the bit layout is given
// in rtcu_pkg.
module rtcu_fec_enc (
  input  logic         clk,
  input  logic         rst_n,
  input  rtcu_pkg::fec_t mode,
  input  logic         in_valid,
  input  logic [39:0]  in_data,
  output logic         out_valid,
  output logic [rtcu_pkg::FRAME_MAX-1:0]  out_frame,
  output logic [5:0]   out_len
);
  import rtcu_pkg::*;
  logic [rtcu_pkg::FRAME_MAX-1:0] f;
  always_comb begin
    case (mode)
      FEC_HAMMING: f = {1'b1, ham_encode(in_data), in_data, 9'd0};
      FEC_RS:      f = {1'b1, rs_encode(in_data), in_data};
      default:     f = {1'b1, in_data, 16'd0};
    endcase
  end
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_frame <= '0;
      out_len   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_frame <= f;
        out_len   <= 6'(frame_len(mode));
      end
    end
  end
endmodule
