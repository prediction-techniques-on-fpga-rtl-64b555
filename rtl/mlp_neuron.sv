// mlp_neuron -- weighted sum of one fixed-point neuron,
//   x = w[0]*bias + sum_{j=1..N_IN} w[j]*y[j-1].
// One multiplier per input (bias included) feeds an adder chain; the
// products are truncated to [sT.W] by the multipliers and the sum is
// accumulated with guard bits and saturated once to T bits (a choice of
// this implementation). The activation function is applied outside.
// Interface: y[N_IN], bias, w[N_IN+1] in, x out. Purely combinational.
module mlp_neuron #(
  parameter int N_IN = 4,
  parameter int T    = 14,
  parameter int W    = 10
) (
  input  logic signed [T-1:0] y [N_IN],
  input  logic signed [T-1:0] bias,
  input  logic signed [T-1:0] w [N_IN+1],
  output logic signed [T-1:0] x
);

  localparam int G = $clog2(N_IN + 1) + 1;
  localparam logic signed [T+G-1:0] MAXV = (T+G)'((64'sd1 <<< (T-1)) - 1);
  localparam logic signed [T+G-1:0] MINV = -(T+G)'(64'sd1 <<< (T-1));

  logic signed [T-1:0]   prod [N_IN+1];
  logic signed [T+G-1:0] acc;

  fxp_mul #(.T(T), .W(W)) u_mul_bias (.a(w[0]), .b(bias), .p(prod[0]));

  for (genvar j = 1; j <= N_IN; j++) begin : g_mul
    fxp_mul #(.T(T), .W(W)) u_mul (.a(w[j]), .b(y[j-1]), .p(prod[j]));
  end

  always_comb begin
    acc = '0;
    for (int j = 0; j <= N_IN; j++) acc += (T+G)'(prod[j]);
    if (acc > MAXV)      x = MAXV[T-1:0];
    else if (acc < MINV) x = MINV[T-1:0];
    else                 x = acc[T-1:0];
  end

endmodule
