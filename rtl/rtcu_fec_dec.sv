// rtcu_fec_dec: frame check and forward error correction decoder.
//
// Takes a received frame in the layout built by rtcu_fec_enc and returns
// the payload, corrected where the code allows it, with no retransmission:
//   FEC_NONE    payload passed through, no check.
//   FEC_HAMMING single-bit errors corrected, double-bit errors detected.
//   FEC_RS      up to two wrong 4-bit symbols corrected (Peterson-
//               Gorenstein-Zierler solution for two errors, Chien search,
//               Forney error values); patterns it cannot resolve are flagged.
// out_corrected flags a repaired frame, out_error an uncorrectable one.
// One clock of latency. The decoding algorithm is this implementation's
// choice; the codes and their strength follow the design description.
module rtcu_fec_dec (
  input  logic           clk,
  input  logic           rst_n,
  input  rtcu_pkg::fec_t mode,
  input  logic           in_valid,
  input  logic [56:0]    in_frame,
  output logic           out_valid,
  output logic [39:0]    out_data,
  output logic           out_corrected,
  output logic           out_error
);
  import rtcu_pkg::*;

  logic [39:0] d;
  logic        corr, err;

  function automatic logic [39:0] ham_extract(logic [46:1] cw);
    logic [39:0] r;
    int k;
    r = '0;
    k = 0;
    for (int p = 1; p <= 46; p++) begin
      if ((p & (p - 1)) != 0) begin
        r[k] = cw[p];
        k++;
      end
    end
    return r;
  endfunction

  // Hamming SECDED decode: returns {corrected, error, data}
  function automatic logic [41:0] ham_decode(logic [5:0] c, logic ov, logic [39:0] data);
    logic [46:1] cw;
    logic [5:0]  syn;
    logic        par;
    cw = ham_place(data);
    for (int i = 0; i < 6; i++) cw[1 << i] = c[i];
    syn = ham_syndrome(cw);
    par = (^cw) ^ ov;
    if (!par && syn == 6'd0) return {2'b00, data};
    if (!par)                return {2'b01, data};           // double error
    if (syn == 6'd0)         return {2'b10, data};           // overall bit hit
    if (syn > 6'd46)         return {2'b01, data};
    cw[syn] = ~cw[syn];
    return {2'b10, ham_extract(cw)};
  endfunction

  // RS(14,10) over GF(16), t = 2: returns {corrected, error, data}
  function automatic logic [41:0] rs_decode(logic [15:0] p, logic [39:0] data);
    logic [3:0] s1, s2, s3, s4, det, l1, l2, xi, xi2, v, om, e;
    logic [39:0] r;
    int roots;
    logic bad;
    s1 = rs_syn(data, p, 1);
    s2 = rs_syn(data, p, 2);
    s3 = rs_syn(data, p, 3);
    s4 = rs_syn(data, p, 4);
    if ({s1, s2, s3, s4} == 16'd0) return {2'b00, data};
    bad = 1'b0;
    det = gf_mul(s2, s2) ^ gf_mul(s1, s3);
    if (det != 4'd0) begin
      l2 = gf_mul(gf_mul(s3, s3) ^ gf_mul(s2, s4), gf_inv(det));
      l1 = gf_mul(gf_mul(s1, s4) ^ gf_mul(s2, s3), gf_inv(det));
    end else begin
      l2 = 4'd0;
      l1 = (s1 != 4'd0) ? gf_mul(s2, gf_inv(s1)) : 4'd0;
      if (s1 == 4'd0 || s3 != gf_mul(s2, l1) || s4 != gf_mul(s3, l1)) bad = 1'b1;
    end
    r = data;
    roots = 0;
    for (int j = 0; j < 14; j++) begin
      xi  = gf_pow(ALPHA, (15 - j) % 15);     // X^-1 for position j
      xi2 = gf_mul(xi, xi);
      v   = 4'd1 ^ gf_mul(l1, xi) ^ gf_mul(l2, xi2);
      if (v == 4'd0) begin
        roots++;
        om = s1 ^ gf_mul(s2 ^ gf_mul(s1, l1), xi);
        e  = gf_mul(om, gf_inv(l1));
        if (j >= 4) r[4*(j-4) +: 4] = r[4*(j-4) +: 4] ^ e;
      end
    end
    if (l1 == 4'd0 || roots != ((l2 != 4'd0) ? 2 : 1)) bad = 1'b1;
    if (bad) return {2'b01, data};
    return {2'b10, r};
  endfunction

  always_comb begin
    corr = 1'b0;
    err  = 1'b0;
    case (mode)
      FEC_HAMMING: {corr, err, d} = ham_decode(in_frame[55:50], in_frame[49], in_frame[48:9]);
      FEC_RS:      {corr, err, d} = rs_decode(in_frame[55:40], in_frame[39:0]);
      default:     d = in_frame[55:16];
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid     <= 1'b0;
      out_data      <= '0;
      out_corrected <= 1'b0;
      out_error     <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_data      <= d;
        out_corrected <= corr;
        out_error     <= err;
      end
    end
  end
endmodule
