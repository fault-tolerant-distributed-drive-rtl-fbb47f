// fcore_pkg: instruction set of the femtoCore embedded DSP and the
// single-precision arithmetic used by its execution unit.
//
// Instructions are 32 bits: a 5-bit opcode in [4:0] followed by 6-bit
// register fields. Binary: A[10:5] B[16:11] DEST[22:17]. Unary: A[10:5]
// DEST[16:11]. Load constant: DEST[10:5], with the 32-bit constant in the
// following word. Independent (NOP, STOP): opcode only. Unused bits are zero.
// Opcode numbers follow the instruction table of the design; opcode 7 is
// unused, CLE is 9.
//
// Arithmetic is IEEE-754 binary32 with round-to-nearest-even. Subnormal
// inputs and results are flushed to zero, NaN inputs give the quiet NaN
// 0x7FC00000 (design choices: the core targets control arithmetic where
// subnormals do not occur). FTI truncates toward zero and saturates to the
// int32 range. Compares return 1.0 (0x3F800000) for true and 0.0 for false.
package fcore_pkg;

  localparam int unsigned RAW = 6;   // register address width
  localparam logic [31:0] FP_ONE = 32'h3F80_0000;
  localparam logic [31:0] FP_NAN = 32'h7FC0_0000;

  typedef enum logic [4:0] {
    OP_NOP  = 5'd0,  OP_ADD  = 5'd1,  OP_SUB  = 5'd2,  OP_MUL  = 5'd3,
    OP_ITF  = 5'd4,  OP_FTI  = 5'd5,  OP_LDC  = 5'd6,  OP_CGT  = 5'd8,
    OP_CLE  = 5'd9,  OP_CEQ  = 5'd10, OP_CNE  = 5'd11, OP_STOP = 5'd12,
    OP_AND  = 5'd13, OP_OR   = 5'd14, OP_NOT  = 5'd15, OP_SATP = 5'd16,
    OP_SATN = 5'd17
  } opcode_t;

  typedef enum logic [1:0] {FMT_INDEP, FMT_LOAD, FMT_UNARY, FMT_BINARY} format_t;

  function automatic format_t op_format(logic [4:0] op);
    case (op)
      OP_NOP, OP_STOP:          return FMT_INDEP;
      OP_LDC:                   return FMT_LOAD;
      OP_ITF, OP_FTI, OP_NOT:   return FMT_UNARY;
      default:                  return FMT_BINARY;
    endcase
  endfunction

  // Instruction encoders (used by testbenches and program generators).
  function automatic logic [31:0] enc_bin(opcode_t op, logic [5:0] a, logic [5:0] b, logic [5:0] d);
    return {9'd0, d, b, a, op};
  endfunction
  function automatic logic [31:0] enc_un(opcode_t op, logic [5:0] a, logic [5:0] d);
    return {15'd0, d, a, op};
  endfunction
  function automatic logic [31:0] enc_ldc(logic [5:0] d);
    return {21'd0, d, OP_LDC};
  endfunction

  // Round a normalised significand: keep = 24 bits with hidden one,
  // r = round bit, s = sticky. Returns packed result with overflow handling.
  function automatic logic [31:0] fp_pack(logic sign, int e, logic [23:0] keep, logic r, logic s);
    logic [24:0] m;
    m = {1'b0, keep} + 25'((r & (s | keep[0])) ? 1 : 0);
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (e >= 255) return {sign, 8'hFF, 23'd0};
    if (e <= 0)   return {sign, 31'd0};
    return {sign, e[7:0], m[22:0]};
  endfunction

  function automatic logic [31:0] fp_ftz(logic [31:0] x);
    return (x[30:23] == 8'd0) ? {x[31], 31'd0} : x;
  endfunction

  function automatic logic fp_isnan(logic [31:0] x);
    return (x[30:23] == 8'hFF) && (x[22:0] != 23'd0);
  endfunction

  function automatic logic [31:0] fp_add(logic [31:0] a, logic [31:0] b);
    logic [31:0] x, y;
    logic [49:0] mx, my, sh;
    logic [50:0] sum;
    int d, e;
    a = fp_ftz(a);
    b = fp_ftz(b);
    if (fp_isnan(a) || fp_isnan(b)) return FP_NAN;
    if (a[30:0] >= b[30:0]) begin x = a; y = b; end
    else begin x = b; y = a; end
    if (x[30:23] == 8'hFF) begin
      if (y[30:23] == 8'hFF && x[31] != y[31]) return FP_NAN;
      return x;
    end
    if (y[30:23] == 8'd0) begin
      if (x[30:23] == 8'd0) return {x[31] & y[31], 31'd0};
      return x;
    end
    mx = {1'b1, x[22:0], 26'd0};
    my = {1'b1, y[22:0], 26'd0};
    d  = int'(x[30:23]) - int'(y[30:23]);
    if (d > 49) sh = 50'd1;
    else begin
      sh = my >> d;
      if ((my & ((50'd1 << d) - 50'd1)) != 50'd0) sh[0] = 1'b1;
    end
    if (x[31] == y[31]) sum = {1'b0, mx} + {1'b0, sh};
    else                sum = {1'b0, mx} - {1'b0, sh};
    if (sum == 51'd0) return 32'd0;
    e = int'(x[30:23]);
    if (sum[50]) begin
      sum = {1'b0, sum[50:1]} | {50'd0, sum[0]};
      e = e + 1;
    end else begin
      for (int i = 0; i < 50; i++) begin
        if (!sum[49]) begin
          sum = sum << 1;
          e = e - 1;
        end
      end
    end
    return fp_pack(x[31], e, sum[49:26], sum[25], |sum[24:0]);
  endfunction

  function automatic logic [31:0] fp_mul(logic [31:0] a, logic [31:0] b);
    logic        s;
    logic [47:0] p;
    int e;
    a = fp_ftz(a);
    b = fp_ftz(b);
    s = a[31] ^ b[31];
    if (fp_isnan(a) || fp_isnan(b)) return FP_NAN;
    if (a[30:23] == 8'hFF || b[30:23] == 8'hFF) begin
      if (a[30:23] == 8'd0 || b[30:23] == 8'd0) return FP_NAN;
      return {s, 8'hFF, 23'd0};
    end
    if (a[30:23] == 8'd0 || b[30:23] == 8'd0) return {s, 31'd0};
    p = {24'd0, 1'b1, a[22:0]} * {24'd0, 1'b1, b[22:0]};
    e = int'(a[30:23]) + int'(b[30:23]) - 127;
    if (p[47]) e = e + 1;
    else       p = p << 1;
    return fp_pack(s, e, p[47:24], p[23], |p[22:0]);
  endfunction

  function automatic logic [31:0] fp_itf(logic [31:0] v);
    logic        s;
    logic [31:0] m;
    int e;
    if (v == 32'd0) return 32'd0;
    s = v[31];
    m = s ? (~v + 32'd1) : v;
    e = 127 + 31;
    for (int i = 0; i < 32; i++) begin
      if (!m[31]) begin
        m = m << 1;
        e = e - 1;
      end
    end
    return fp_pack(s, e, m[31:8], m[7], |m[6:0]);
  endfunction

  function automatic logic [31:0] fp_fti(logic [31:0] f);
    logic [55:0] m;
    logic [31:0] mag;
    int e;
    f = fp_ftz(f);
    e = int'(f[30:23]);
    if (fp_isnan(f)) return 32'd0;
    if (e < 127) return 32'd0;
    if (e >= 158) return f[31] ? 32'h8000_0000 : 32'h7FFF_FFFF;
    m = {32'd0, 1'b1, f[22:0]};
    if (e >= 150) m = m << (e - 150);
    else          m = m >> (150 - e);
    mag = m[31:0];
    return f[31] ? (~mag + 32'd1) : mag;
  endfunction

  // Total order key for non-NaN values (after flushing zeros to +0).
  function automatic logic [31:0] fp_key(logic [31:0] x);
    x = fp_ftz(x);
    if (x[30:0] == 31'd0) x = 32'd0;
    return x[31] ? ~x : (x | 32'h8000_0000);
  endfunction

  function automatic logic fp_gt(logic [31:0] a, logic [31:0] b);
    return fp_key(a) > fp_key(b);
  endfunction

  function automatic logic fp_eq(logic [31:0] a, logic [31:0] b);
    return fp_key(a) == fp_key(b);
  endfunction

  // Complete operation of the execution unit.
  function automatic logic [31:0] fcore_op(logic [4:0] op, logic [31:0] a, logic [31:0] b, logic [31:0] imm);
    case (op)
      OP_ADD:  return fp_add(a, b);
      OP_SUB:  return fp_add(a, {~b[31], b[30:0]});
      OP_MUL:  return fp_mul(a, b);
      OP_ITF:  return fp_itf(a);
      OP_FTI:  return fp_fti(a);
      OP_LDC:  return imm;
      OP_CGT:  return fp_gt(a, b) ? FP_ONE : 32'd0;
      OP_CLE:  return fp_gt(a, b) ? 32'd0 : FP_ONE;
      OP_CEQ:  return fp_eq(a, b) ? FP_ONE : 32'd0;
      OP_CNE:  return fp_eq(a, b) ? 32'd0 : FP_ONE;
      OP_AND:  return a & b;
      OP_OR:   return a | b;
      OP_NOT:  return ~a;
      OP_SATP: return fp_gt(b, a) ? a : b;
      OP_SATN: return fp_gt(a, b) ? a : b;
      default: return 32'd0;
    endcase
  endfunction

  function automatic logic op_writes(logic [4:0] op);
    return !(op == OP_NOP || op == OP_STOP);
  endfunction

endpackage
