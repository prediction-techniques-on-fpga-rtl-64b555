// fxp_mul -- signed fixed-point [sT.W] multiplier with saturation.
//
// The full 2T-bit product of a and b has 2W fractional bits; it is shifted
// right arithmetically by W (truncation towards minus infinity) and
// saturated to the T-bit range. Truncation and saturation are choices of
// this implementation. Purely combinational.
module fxp_mul #(
  parameter int T = 14,
  parameter int W = 10
) (
  input  logic signed [T-1:0] a,
  input  logic signed [T-1:0] b,
  output logic signed [T-1:0] p
);

  localparam logic signed [2*T-1:0] MAXV = (2*T)'((64'sd1 <<< (T-1)) - 1);
  localparam logic signed [2*T-1:0] MINV = -(2*T)'(64'sd1 <<< (T-1));

  logic signed [2*T-1:0] full, shifted;

  always_comb begin
    full    = a * b;
    shifted = full >>> W;
    if (shifted > MAXV)      p = MAXV[T-1:0];
    else if (shifted < MINV) p = MINV[T-1:0];
    else                     p = shifted[T-1:0];
  end

endmodule
