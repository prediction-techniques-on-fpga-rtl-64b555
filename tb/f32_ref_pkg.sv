// f32_ref_pkg -- reference single-precision arithmetic for the testbenches.
//
// Values are widened exactly to double precision, combined with the
// simulator's real arithmetic and rounded back once to binary32 (nearest
// even), with results below the smallest normal number flushed to zero
// like the design does. For the operands the testbenches use, the double
// result is exact or its rounding cannot change the binary32 result, so
// these functions give the correctly rounded binary32 answer.
package f32_ref_pkg;

  function automatic real f2r(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return 0.0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d;
    int          e;
    logic [52:0] m;
    logic [24:0] keep;
    logic        half, rest;
    d = $realtobits(r);
    if (d[62:0] == 63'd0) return {d[63], 31'd0};
    e = int'(d[62:52]) - 1023 + 127;
    m = {1'b1, d[51:0]};
    keep = {1'b0, m[52:29]};
    half = m[28];
    rest = (m[27:0] != 0);
    if (half && (rest || keep[0])) keep = keep + 1;
    if (keep[24]) begin keep = keep >> 1; e++; end
    if (e >= 255) return {d[63], 8'hff, 23'd0};
    if (e <= 0)   return {d[63], 31'd0};
    return {d[63], 8'(e), keep[22:0]};
  endfunction

  function automatic logic [31:0] add(input logic [31:0] a, input logic [31:0] b);
    return r2f(f2r(a) + f2r(b));
  endfunction

  function automatic logic [31:0] sub(input logic [31:0] a, input logic [31:0] b);
    return r2f(f2r(a) - f2r(b));
  endfunction

  function automatic logic [31:0] mul(input logic [31:0] a, input logic [31:0] b);
    return r2f(f2r(a) * f2r(b));
  endfunction

  // random normal number with exponent in [ebase-espan, ebase+espan]
  function automatic logic [31:0] rnd(input int ebase, input int espan);
    int e;
    e = ebase - espan + int'($urandom_range(0, 2 * espan));
    return {1'($urandom), 8'(e), 23'($urandom)};
  endfunction

  // cascading (left to right) sum as the hardware orders it
  function automatic logic [31:0] csum(input logic [31:0] x [], input int n);
    logic [31:0] s;
    s = x[0];
    for (int k = 1; k < n; k++) s = add(s, x[k]);
    return s;
  endfunction

endpackage
