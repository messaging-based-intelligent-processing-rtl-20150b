// tb_fp_pkg: reference IEEE 754 single-precision helpers for the testbenches.
//
// Converts between 32-bit float encodings and SystemVerilog reals (doubles)
// without relying on the simulator's shortreal support. r2f rounds a double to
// the nearest single (ties to even) and flushes results below the normal range
// to a signed zero, the same convention as the m-IPU FPU. Because a double has
// more than twice the precision of a single, computing a single-precision
// +, -, * or / in double and rounding once gives the correctly rounded result.
package tb_fp_pkg;

  function automatic real f2r(logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'h00) return f[31] ? -0.0 : 0.0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(real r);
    logic [63:0] d;
    logic [24:0] m;
    int          e;
    logic        g, st;
    d = $realtobits(r);
    if (d[62:52] == 11'h000) return {d[63], 31'd0};
    if (d[62:52] == 11'h7ff) return (d[51:0] != 0) ? 32'h7fc0_0000 : {d[63], 8'hff, 23'd0};
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {2'b01, d[51:29]};
    g  = d[28];
    st = |d[27:0];
    if (g && (st || m[0])) m = m + 1'b1;
    if (m[24]) begin m = m >> 1; e = e + 1; end
    if (e >= 255) return {d[63], 8'hff, 23'd0};
    if (e <= 0)   return {d[63], 31'd0};
    return {d[63], e[7:0], m[22:0]};
  endfunction

  // A random normal single with exponent within +-span of 2^0.
  function automatic logic [31:0] rand_f(int span);
    logic [31:0] x;
    int          e;
    e = 127 + int'($urandom_range(2 * span)) - span;
    x = {1'($urandom), 8'(e), 23'($urandom)};
    return x;
  endfunction

endpackage
