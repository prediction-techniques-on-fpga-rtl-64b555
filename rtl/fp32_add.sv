// fp32_add -- combinational IEEE 754 single-precision adder / subtractor.
//
// Computes y = a + b, or y = a - b when sub is 1. These are the adders and
// subtractors of the linear-regression circuits, including each stage of
// the cascading sum. The operand of larger magnitude is kept, the other is
// aligned with guard, round and sticky bits, the significands are added or
// subtracted, the result is normalised with a leading-zero count and rounded
// to nearest even. NaN and infinity follow IEEE 754; an exact zero
// difference is +0. As a choice of this implementation subnormal inputs are
// read as zero and results below the smallest normal number are flushed to
// zero.
//
// Interface: a, b, sub in, y out. Purely combinational, no clock.
module fp32_add
  import fp32_pkg::*;
(
  input  float32_t a,
  input  float32_t b,
  input  logic     sub,
  output float32_t y
);

  logic        sa, sb;
  logic [7:0]  ea, eb;
  logic [22:0] fa, fb;
  logic        a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  logic        swap, sl;
  logic [7:0]  el, es, d;
  logic [26:0] ml, ms, ms_sh, mask, man, diff;
  logic [27:0] sum;
  logic [4:0]  lz;
  logic        found;
  logic signed [10:0] exp_y;
  logic [23:0] mant;
  logic        guard, rs, round_up;
  logic [24:0] mant_r;
  float32_t    y_norm;
  logic        exact_zero;

  always_comb begin
    sa = a[31];        ea = a[30:23];  fa = a[22:0];
    sb = b[31] ^ sub;  eb = b[30:23];  fb = b[22:0];
    a_zero = (ea == 8'd0);
    b_zero = (eb == 8'd0);
    a_inf  = (ea == 8'hff) && (fa == 23'd0);
    b_inf  = (eb == 8'hff) && (fb == 23'd0);
    a_nan  = (ea == 8'hff) && (fa != 23'd0);
    b_nan  = (eb == 8'hff) && (fb != 23'd0);

    // order the operands by magnitude
    swap = {eb, fb} > {ea, fa};
    sl   = swap ? sb : sa;
    el   = swap ? eb : ea;
    es   = swap ? ea : eb;
    ml   = {1'b1, (swap ? fb : fa), 3'b000};
    ms   = {1'b1, (swap ? fa : fb), 3'b000};
    d    = el - es;

    // align the smaller operand, folding shifted-out bits into the sticky bit
    if (d >= 8'd27) begin
      ms_sh = 27'd1;
      mask  = '0;
    end else begin
      mask  = (27'd1 << d) - 27'd1;
      ms_sh = ms >> d;
      ms_sh[0] = ms_sh[0] | (|(ms & mask));
    end

    exact_zero = 1'b0;
    sum   = '0;
    diff  = '0;
    lz    = '0;
    found = 1'b0;
    exp_y = 11'(signed'({3'b000, el}));
    if (sa == sb) begin
      sum = {1'b0, ml} + {1'b0, ms_sh};
      if (sum[27]) begin
        man   = {sum[27:2], sum[1] | sum[0]};
        exp_y = exp_y + 11'sd1;
      end else begin
        man = sum[26:0];
      end
    end else begin
      diff = ml - ms_sh;
      exact_zero = (diff == 27'd0);
      for (int i = 26; i >= 0; i--) begin
        if (!found && diff[i]) begin
          found = 1'b1;
          lz    = 5'(26 - i);
        end
      end
      man   = diff << lz;
      exp_y = exp_y - 11'(signed'({6'd0, lz}));
    end

    mant     = man[26:3];
    guard    = man[2];
    rs       = man[1] | man[0];
    round_up = guard & (rs | mant[0]);
    mant_r   = {1'b0, mant} + {24'd0, round_up};
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      exp_y  = exp_y + 11'sd1;
    end

    if (exact_zero)               y_norm = F32_ZERO;
    else if (exp_y >= 11'sd255)   y_norm = {sl, F32_INF_MAG};
    else if (exp_y <= 11'sd0)     y_norm = {sl, 31'd0};
    else                          y_norm = {sl, exp_y[7:0], mant_r[22:0]};

    if (a_nan || b_nan)             y = F32_QNAN;
    else if (a_inf && b_inf)        y = (sa == sb) ? {sa, F32_INF_MAG} : F32_QNAN;
    else if (a_inf)                 y = {sa, F32_INF_MAG};
    else if (b_inf)                 y = {sb, F32_INF_MAG};
    else if (a_zero && b_zero)      y = {sa & sb, 31'd0};
    else if (a_zero)                y = {sb, eb, fb};
    else if (b_zero)                y = {sa, ea, fa};
    else                            y = y_norm;
  end

endmodule
