// rtcu_pkg: message format and forward error correction of the power cell
// link protocol.
//
// A message is a 40-bit payload: 8-bit address (message purpose) and 32-bit
// data. On the wire a frame is, first bit first: start bit (1), FEC check
// bits, payload. Frame lengths per FEC mode:
//   FEC_NONE    1 + 40           = 41 bits
//   FEC_HAMMING 1 + 6 + 1 + 40   = 48 bits  (Hamming check bits, overall parity)
//   FEC_RS      1 + 16 + 40      = 57 bits  (4 parity symbols of RS(15,11),
//                                             shortened to 10 data symbols)
// The idle line is 0.
//
// Hamming SECDED: codeword positions 1..46, check bits at 1,2,4,8,16,32,
// data bits in the remaining positions in ascending order; the overall
// parity bit covers all 46 positions. RS: GF(16) with x^4+x+1, generator
// (x-a)(x-a^2)(x-a^3)(x-a^4), payload nibble k (payload[4k+3:4k]) is the
// coefficient of x^(k+4), parity symbol j of x^j. Reserved addresses:
// 0xFF heartbeat, 0xFE acknowledge. Polynomials, bit orders and reserved
// addresses are this implementation's choices.
package rtcu_pkg;

  typedef enum logic [1:0] {FEC_NONE = 2'd0, FEC_HAMMING = 2'd1, FEC_RS = 2'd2} fec_t;

  typedef struct packed {
    logic [7:0]  addr;
    logic [31:0] data;
  } msg_t;

  localparam int unsigned FRAME_MAX = 57;
  localparam logic [7:0] ADDR_HEARTBEAT = 8'hFF;
  localparam logic [7:0] ADDR_ACK       = 8'hFE;

  function automatic int unsigned frame_len(fec_t m);
    case (m)
      FEC_HAMMING: return 48;
      FEC_RS:      return 57;
      default:     return 41;
    endcase
  endfunction

  // ---------------- Hamming SECDED (46,40) + overall parity ----------------
  function automatic logic [46:1] ham_place(logic [39:0] d);
    logic [46:1] cw;
    int k;
    cw = '0;
    k = 0;
    for (int p = 1; p <= 46; p++) begin
      if ((p & (p - 1)) != 0) begin
        cw[p] = d[k];
        k++;
      end
    end
    return cw;
  endfunction

  function automatic logic [5:0] ham_syndrome(logic [46:1] cw);
    logic [5:0] s;
    s = '0;
    for (int p = 1; p <= 46; p++)
      if (cw[p]) s = s ^ 6'(p);
    return s;
  endfunction

  // returns {check[5:0], overall}
  function automatic logic [6:0] ham_encode(logic [39:0] d);
    logic [46:1] cw;
    logic [5:0]  c;
    cw = ham_place(d);
    c  = ham_syndrome(cw);
    for (int i = 0; i < 6; i++) cw[1 << i] = c[i];
    return {c, ^cw};
  endfunction

  // ---------------- GF(16) and RS(15,11) ----------------
  function automatic logic [3:0] gf_mul(logic [3:0] a, logic [3:0] b);
    logic [3:0] r;
    r = '0;
    for (int i = 3; i >= 0; i--) begin
      r = {r[2:0], 1'b0} ^ (r[3] ? 4'b0011 : 4'b0000);
      if (b[i]) r = r ^ a;
    end
    return r;
  endfunction

  function automatic logic [3:0] gf_pow(logic [3:0] a, int n);
    logic [3:0] r;
    r = 4'd1;
    for (int i = 0; i < n; i++) r = gf_mul(r, a);
    return r;
  endfunction

  function automatic logic [3:0] gf_inv(logic [3:0] a);
    return gf_pow(a, 14);
  endfunction

  localparam logic [3:0] ALPHA = 4'd2;
  // generator polynomial coefficients g0..g3 (g4 = 1)
  localparam logic [3:0] RS_G0 = 4'h7, RS_G1 = 4'h8, RS_G2 = 4'hC, RS_G3 = 4'hD;

  function automatic logic [15:0] rs_encode(logic [39:0] d);
    logic [3:0] r [4];
    logic [3:0] fb;
    for (int j = 0; j < 4; j++) r[j] = '0;
    for (int k = 9; k >= 0; k--) begin
      fb   = d[4*k +: 4] ^ r[3];
      r[3] = r[2] ^ gf_mul(fb, RS_G3);
      r[2] = r[1] ^ gf_mul(fb, RS_G2);
      r[1] = r[0] ^ gf_mul(fb, RS_G1);
      r[0] = gf_mul(fb, RS_G0);
    end
    return {r[3], r[2], r[1], r[0]};
  endfunction

  // received word: 14 symbols, symbol j = coefficient of x^j
  function automatic logic [3:0] rs_sym(logic [39:0] d, logic [15:0] p, int j);
    return (j < 4) ? p[4*j +: 4] : d[4*(j-4) +: 4];
  endfunction

  function automatic logic [3:0] rs_syn(logic [39:0] d, logic [15:0] p, int i);
    logic [3:0] s, x;
    s = '0;
    x = gf_pow(ALPHA, i);
    for (int j = 13; j >= 0; j--) s = gf_mul(s, x) ^ rs_sym(d, p, j);
    return s;
  endfunction

endpackage
