// tb_rtcu_fec: encoder/decoder pair for the three FEC modes. Random
// payloads are encoded, bit or symbol errors are injected and the decoded
// payload and flags are compared with the original: no-FEC passes data
// through; Hamming corrects every single-bit error and flags every double
// error; RS corrects every pattern of one or two wrong symbols.
`timescale 1ns/1ps
module tb_rtcu_fec;
  import rtcu_pkg::*;
  logic clk = 0, rst_n = 0;
  fec_t mode;
  logic in_valid = 0, enc_v, dec_v, corr, err;
  logic [39:0] in_data, dec_d;
  logic [56:0] frame, rx;
  logic [5:0] len;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  rtcu_fec_enc u_enc (.clk, .rst_n, .mode, .in_valid, .in_data, .out_valid(enc_v), .out_frame(frame), .out_len(len));
  rtcu_fec_dec u_dec (.clk, .rst_n, .mode, .in_valid(enc_v), .in_frame(rx), .out_valid(dec_v), .out_data(dec_d), .out_corrected(corr), .out_error(err));

  logic [56:0] flip;
  assign rx = frame ^ flip;

  task automatic one(fec_t m, logic [56:0] f, logic exp_corr, logic exp_err, logic check_data);
    @(negedge clk); mode = m; in_data = {$urandom, 8'($urandom)}; flip = f; in_valid = 1;
    @(negedge clk); in_valid = 0;
    checks++;
    if (len != 6'(m == FEC_NONE ? 41 : m == FEC_HAMMING ? 48 : 57) || frame[56] != 1'b1) begin
      failures++; $display("FAIL frame length/start mode %0d", m);
    end
    @(negedge clk);
    checks++;
    if (!dec_v || corr != exp_corr || err != exp_err || (check_data && dec_d != in_data)) begin
      failures++;
      $display("FAIL mode %0d flip %h: corr %b err %b data %h exp %h", m, f, corr, err, dec_d, in_data);
    end
  endtask

  initial begin
    #5000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    flip = '0; mode = FEC_NONE; in_data = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 50; i++) one(FEC_NONE, '0, 0, 0, 1);
    for (int i = 0; i < 50; i++) one(FEC_HAMMING, '0, 0, 0, 1);
    for (int i = 0; i < 50; i++) one(FEC_RS, '0, 0, 0, 1);
    // Hamming: every single error position (check bits, parity, data)
    for (int b = 9; b <= 55; b++) one(FEC_HAMMING, 57'd1 << b, 1, 0, 1);
    // Hamming: random double errors are detected
    for (int i = 0; i < 300; i++) begin
      int b1, b2;
      b1 = $urandom_range(9, 55);
      do b2 = $urandom_range(9, 55); while (b2 == b1);
      one(FEC_HAMMING, (57'd1 << b1) | (57'd1 << b2), 0, 1, 0);
    end
    // RS: one wrong symbol, every position and random values
    for (int s = 0; s < 14; s++)
      for (int k = 0; k < 6; k++) one(FEC_RS, 57'(4'($urandom_range(1, 15))) << (4 * s), 1, 0, 1);
    // RS: two wrong symbols
    for (int i = 0; i < 400; i++) begin
      int s1, s2;
      s1 = $urandom_range(0, 13);
      do s2 = $urandom_range(0, 13); while (s2 == s1);
      one(FEC_RS, (57'(4'($urandom_range(1, 15))) << (4 * s1)) | (57'(4'($urandom_range(1, 15))) << (4 * s2)), 1, 0, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
