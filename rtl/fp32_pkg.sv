// fp32_pkg -- shared type, constants and elaboration-time helpers for the
// IEEE 754 single-precision (binary32) datapath of the linear-regression
// predictor.
//
// The linear-regression circuits work entirely in 32-bit floating point.
// This package gives the word type, the special encodings used by the
// arithmetic units, and a constant function that turns a real number into
// binary32 bits (round to nearest even) so that the regression constants
// can be computed from module parameters while the design elaborates.
// Subnormal numbers are not supported anywhere in the design: they are
// flushed to zero, a choice of this implementation.
package fp32_pkg;

  typedef logic [31:0] float32_t;

  localparam float32_t F32_ZERO  = 32'h0000_0000;
  localparam float32_t F32_QNAN  = 32'h7fc0_0000;
  localparam logic [30:0] F32_INF_MAG = 31'h7f80_0000;

  // Real -> binary32, round to nearest even, subnormals flushed to zero,
  // overflow to infinity. Used only on constants at elaboration.
  function automatic float32_t real_to_f32(input real r);
    logic [63:0] d;
    logic        s;
    int          e;
    logic [23:0] m;
    logic        g, st, up;
    logic [24:0] mr;
    d  = $realtobits(r);
    s  = d[63];
    if (d[62:52] == 11'd0) return {s, 31'd0};
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {1'b1, d[51:29]};
    g  = d[28];
    st = |d[27:0];
    up = g & (st | m[0]);
    mr = {1'b0, m} + {24'd0, up};
    if (mr[24]) begin
      e  = e + 1;
      mr = mr >> 1;
    end
    if (e >= 255) return {s, F32_INF_MAG};
    if (e <= 0)   return {s, 31'd0};
    return {s, e[7:0], mr[22:0]};
  endfunction

endpackage
