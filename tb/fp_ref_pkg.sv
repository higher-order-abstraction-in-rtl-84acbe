// fp_ref_pkg: reference IEEE-754 single-precision arithmetic for testbenches.
//
// Single values are widened exactly to double precision, added there, and
// rounded back to single with round-to-nearest-even. Rounding the exact sum
// of two singles via double gives the correctly rounded single result, so
// this is an independent reference for fp_add. Like fp_add, subnormals are
// read and written as zero.
package fp_ref_pkg;

  function automatic real f2r(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return 0.0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d;
    int          e;
    logic [24:0] m;
    logic        up;
    if (r == 0.0) return 32'd0;
    d  = $realtobits(r);
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {2'b01, d[51:29]};
    up = d[28] && ((|d[27:0]) || m[0]);
    m  = m + 25'(up);
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (e >= 255) return {d[63], 8'hff, 23'd0};
    if (e <= 0)   return {d[63], 31'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  function automatic logic [31:0] fadd_ref(input logic [31:0] a, input logic [31:0] b);
    return r2f(f2r(a) + f2r(b));
  endfunction

  // Single-precision encoding of a small integer (exact).
  function automatic logic [31:0] int2f(input int v);
    return r2f(real'(v));
  endfunction

endpackage
