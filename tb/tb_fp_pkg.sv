// tb_fp_pkg: reference FP32 helpers for the testbenches, built on the
// simulator's double-precision arithmetic. A double-precision sum or product
// of two single-precision numbers rounded once more to single precision equals
// the correctly rounded single-precision result, so these give independent
// expected values. Subnormals are flushed to zero, as in the design.
package tb_fp_pkg;

  function automatic real f2r(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'h00) return 0.0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'b0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d;
    logic [23:0] m;
    logic        g, st;
    int          e;
    d = $realtobits(r);
    if (d[62:0] == 63'd0) return {d[63], 31'b0};
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {1'b0, d[51:29]};
    g  = d[28];
    st = |d[27:0];
    if (g && (st || m[0])) m = m + 24'd1;
    if (m[23]) begin
      m = 24'd0;
      e = e + 1;
    end
    if (e >= 255) return {d[63], 8'hff, 23'b0};
    if (e <= 0)   return {d[63], 31'b0};
    return {d[63], e[7:0], m[22:0]};
  endfunction

  // a random normal number with exponent field in [lo, hi]
  function automatic logic [31:0] rand_f(input int lo, input int hi);
    logic [7:0] e;
    e = 8'(lo + int'($urandom_range(0, hi - lo)));
    return {1'($urandom), e, 23'($urandom)};
  endfunction

  // small integers are exact in FP32, so sums of them do not depend on order
  function automatic logic [31:0] int_f(input int v);
    return r2f(real'(v));
  endfunction

endpackage
