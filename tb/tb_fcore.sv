// tb_fcore: self-checking test of the femtoCore (control unit, decoder,
// register file, execution unit, instruction store together).
// Runs a scalar program that uses every instruction with the required
// delay slots, and SIMD programs on 7 and 8 channels without delay slots.
// Results are compared with real-number arithmetic rounded to binary32;
// the start-to-done cycle count is compared with the fixed-time formula;
// the instruction store and DMA interlocks are exercised.
`timescale 1ns/1ps
module tb_fcore;
  import fcore_pkg::*;
  import fp_ref_pkg::*;
  localparam int CH = 8;
  logic clk = 0, rst_n = 0, start = 0;
  logic [3:0] n_ch;
  logic running, done, prog_we = 0, prog_re = 0, prog_busy, dma_we = 0, dma_re = 0, dma_gnt;
  logic [9:0] prog_addr;
  logic [31:0] prog_wdata, prog_rdata, dma_wdata, dma_rdata;
  logic [8:0] dma_addr;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  fcore #(.CHANNELS(CH)) dut (.*);

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  int pa;
  task automatic emit(logic [31:0] w);
    @(negedge clk); prog_we = 1; prog_addr = 10'(pa); prog_wdata = w; pa++;
    @(negedge clk); prog_we = 0;
  endtask
  task automatic nops(int n); repeat (n) emit(enc_bin(OP_NOP, 0, 0, 0)); endtask

  task automatic rf_wr(int ch, int r, logic [31:0] v);
    @(negedge clk); dma_we = 1; dma_addr = 9'((ch << 6) | r); dma_wdata = v;
    @(negedge clk); dma_we = 0;
  endtask
  task automatic rf_rd(int ch, int r, output logic [31:0] v);
    @(negedge clk); dma_re = 1; dma_addr = 9'((ch << 6) | r);
    @(negedge clk); dma_re = 0; v = dma_rdata;
  endtask

  task automatic run(int nch, output int cycles);
    @(negedge clk); n_ch = 4'(nch); start = 1;
    @(negedge clk); start = 0; cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
  endtask

  initial begin
    #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [31:0] a, b, v, lc, ex;
  int c, cyc;
  initial begin
    n_ch = 1; prog_addr = 0; prog_wdata = 0; dma_addr = 0; dma_wdata = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    // ---------------- scalar program ----------------
    lc = 32'h4020_0000; // 2.5
    pa = 0;
    emit(enc_ldc(4)); emit(lc);
    nops(6);
    emit(enc_bin(OP_ADD, 1, 2, 5));  emit(enc_bin(OP_SUB, 1, 2, 6));
    emit(enc_bin(OP_MUL, 1, 2, 7));  emit(enc_un(OP_ITF, 3, 8));
    emit(enc_un(OP_FTI, 1, 9));      emit(enc_bin(OP_CGT, 1, 2, 10));
    emit(enc_bin(OP_CLE, 1, 2, 11)); emit(enc_bin(OP_CEQ, 1, 1, 12));
    emit(enc_bin(OP_CNE, 1, 2, 13)); emit(enc_bin(OP_AND, 1, 2, 14));
    emit(enc_bin(OP_OR, 1, 2, 15));  emit(enc_un(OP_NOT, 1, 16));
    emit(enc_bin(OP_SATP, 1, 4, 17)); emit(enc_bin(OP_SATN, 1, 4, 18));
    emit(enc_bin(OP_MUL, 4, 4, 19));
    nops(6);
    emit(enc_bin(OP_ADD, 5, 7, 20));
    emit(enc_bin(OP_ADD, 1, 1, 0)); // write to r0 is ignored
    nops(6);
    emit(enc_bin(OP_ADD, 0, 1, 21)); // r0 still reads zero
    emit({27'd0, OP_STOP});
    for (int it = 0; it < 40; it++) begin
      a = rnd_f(-6, 6); b = (it % 5 == 0) ? a : rnd_f(-6, 6);
      c = int'($urandom_range(0, 2000000)) - 1000000;
      rf_wr(0, 1, a); rf_wr(0, 2, b); rf_wr(0, 3, c);
      run(1, cyc);
      // slots: LDC 2 + 6 + 15 + 6 + 1 + 1 + 6 + 1 = 38; + STOP + start + drain
      chk("scalar cycles", 32'(cyc), 32'(38 + 2 + LATENCY_TB + 2));
      rf_rd(0, 4, v);  chk("ldc", v, lc);
      rf_rd(0, 5, v);  chk("add", v, r2f(f2r(a) + f2r(b)));
      rf_rd(0, 6, v);  chk("sub", v, r2f(f2r(a) - f2r(b)));
      rf_rd(0, 7, v);  chk("mul", v, r2f(f2r(a) * f2r(b)));
      rf_rd(0, 8, v);  chk("itf", v, r2f(real'(c)));
      rf_rd(0, 9, v);  chk("fti", v, 32'($rtoi(f2r(a))));
      rf_rd(0, 10, v); chk("cgt", v, (f2r(a) > f2r(b)) ? FP_ONE : 0);
      rf_rd(0, 11, v); chk("cle", v, (f2r(a) <= f2r(b)) ? FP_ONE : 0);
      rf_rd(0, 12, v); chk("ceq", v, FP_ONE);
      rf_rd(0, 13, v); chk("cne", v, (a != b) ? FP_ONE : 0);
      rf_rd(0, 14, v); chk("and", v, a & b);
      rf_rd(0, 15, v); chk("or", v, a | b);
      rf_rd(0, 16, v); chk("not", v, ~a);
      rf_rd(0, 17, v); chk("satp", v, (f2r(a) < 2.5) ? a : lc);
      rf_rd(0, 18, v); chk("satn", v, (f2r(a) > 2.5) ? a : lc);
      rf_rd(0, 19, v); chk("mul const", v, 32'h40C8_0000);
      rf_rd(0, 20, v); chk("dependent", v, r2f(f2r(r2f(f2r(a) + f2r(b))) + f2r(r2f(f2r(a) * f2r(b)))));
      rf_rd(0, 21, v); chk("r0 zero", v, a);
    end
    // ---------------- interlocks ----------------
    @(negedge clk); n_ch = 1; start = 1;
    @(negedge clk); start = 0;
    checks++; if (!prog_busy || dma_gnt) begin failures++; $display("FAIL interlock flags"); end
    prog_we = 1; prog_addr = 10'd8; prog_wdata = 32'hDEAD_BEEF; // must be refused
    @(negedge clk); prog_we = 0;
    while (!done) @(negedge clk);
    @(negedge clk); prog_re = 1; prog_addr = 10'd8; @(negedge clk); prog_re = 0;
    chk("istore write refused while running", prog_rdata, enc_bin(OP_ADD, 1, 2, 5));
    // ---------------- SIMD programs ----------------
    pa = 0;
    emit(enc_ldc(4)); emit(lc);
    emit(enc_bin(OP_ADD, 1, 2, 5));
    emit(enc_bin(OP_MUL, 5, 4, 6));
    emit(enc_bin(OP_SUB, 6, 1, 7));
    emit({27'd0, OP_STOP});
    for (int nch = 7; nch <= 8; nch++) begin
      logic [31:0] av [8], bv [8];
      for (int ch = 0; ch < nch; ch++) begin
        av[ch] = rnd_f(-4, 4); bv[ch] = rnd_f(-4, 4);
        rf_wr(ch, 1, av[ch]); rf_wr(ch, 2, bv[ch]);
      end
      run(nch, cyc);
      chk("simd cycles", 32'(cyc), 32'((nch + 1) + 3 * nch + 2 + LATENCY_TB + 2));
      for (int ch = 0; ch < nch; ch++) begin
        ex = r2f(f2r(av[ch]) + f2r(bv[ch]));
        ex = r2f(f2r(ex) * 2.5);
        ex = r2f(f2r(ex) - f2r(av[ch]));
        rf_rd(ch, 7, v); chk($sformatf("simd ch%0d", ch), v, ex);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  localparam int LATENCY_TB = 5;
endmodule
