// fp32_mul -- combinational IEEE 754 single-precision multiplier.
//
// This is the multiplier used throughout the linear-regression predictor
// (the blocks of Equations (1)-(3)). The 24x24-bit significand product is
// normalised by at most one position and rounded to nearest even using a
// guard bit and a sticky bit. NaN and infinity follow IEEE 754
// (inf x 0 = NaN, NaNs become the canonical quiet NaN). As a choice of this
// implementation, subnormal inputs are read as zero and results below the
// smallest normal number are flushed to a signed zero.
//
// Interface: a, b in, y = a*b out. Purely combinational, no clock.
module fp32_mul
  import fp32_pkg::*;
(
  input  float32_t a,
  input  float32_t b,
  output float32_t y
);

  logic        sa, sb, sy;
  logic [7:0]  ea, eb;
  logic [22:0] fa, fb;
  logic        a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  logic [47:0] prod, prod_n;
  logic signed [10:0] exp_y;
  logic [23:0] mant;
  logic        guard, sticky, round_up;
  logic [24:0] mant_r;

  always_comb begin
    sa = a[31];  ea = a[30:23];  fa = a[22:0];
    sb = b[31];  eb = b[30:23];  fb = b[22:0];
    sy = sa ^ sb;
    a_zero = (ea == 8'd0);
    b_zero = (eb == 8'd0);
    a_inf  = (ea == 8'hff) && (fa == 23'd0);
    b_inf  = (eb == 8'hff) && (fb == 23'd0);
    a_nan  = (ea == 8'hff) && (fa != 23'd0);
    b_nan  = (eb == 8'hff) && (fb != 23'd0);

    prod   = {1'b1, fa} * {1'b1, fb};
    exp_y  = 11'(signed'({3'b000, ea})) + 11'(signed'({3'b000, eb})) - 11'sd127;
    if (prod[47]) begin
      prod_n = prod;
      exp_y  = exp_y + 11'sd1;
    end else begin
      prod_n = prod << 1;
    end
    mant     = prod_n[47:24];
    guard    = prod_n[23];
    sticky   = |prod_n[22:0];
    round_up = guard & (sticky | mant[0]);
    mant_r   = {1'b0, mant} + {24'd0, round_up};
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      exp_y  = exp_y + 11'sd1;
    end

    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero))
      y = F32_QNAN;
    else if (a_inf || b_inf)
      y = {sy, F32_INF_MAG};
    else if (a_zero || b_zero)
      y = {sy, 31'd0};
    else if (exp_y >= 11'sd255)
      y = {sy, F32_INF_MAG};
    else if (exp_y <= 11'sd0)
      y = {sy, 31'd0};
    else
      y = {sy, exp_y[7:0], mant_r[22:0]};
  end

endmodule
