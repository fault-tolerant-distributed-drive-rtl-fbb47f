// fp_ref_pkg: reference conversions between SystemVerilog real and IEEE-754
// binary32 bit patterns for the testbenches, written independently of the
// RTL arithmetic: it works on the double representation of real and rounds
// to nearest-even, flushing subnormals to zero like the core does.
package fp_ref_pkg;
  function automatic real f2r(logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return 0.0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(real r);
    logic [63:0] d;
    logic [23:0] m;
    int e;
    logic rb, st;
    d = $realtobits(r);
    if (d[62:52] == 11'd0) return 32'd0;
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {1'b1, d[51:29]};
    rb = d[28];
    st = |d[27:0];
    if (rb && (st || m[0])) begin
      m = m + 24'd1;
      if (m == 24'd0) begin m = 24'h800000; e = e + 1; end
    end
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    if (e <= 0) return {d[63], 31'd0};
    return {d[63], e[7:0], m[22:0]};
  endfunction

  // random float with exponent in [2^lo, 2^hi)
  function automatic logic [31:0] rnd_f(int lo, int hi);
    logic [31:0] f;
    f[31]    = 1'($urandom_range(0, 1));
    f[30:23] = 8'(127 + $urandom_range(0, hi - lo) + lo);
    f[22:0]  = 23'($urandom);
    return f;
  endfunction
endpackage
