// bp_hidden_gradient -- local gradient of one hidden neuron.
//
// The neuron's error is the sum of the next layer's local gradients
// weighted by the connections leaving this neuron,
//   e = sum_k w_next[k] * delta_next[k],
// and its local gradient is delta = e * f'(.), where f' of the ReLU is 1
// for a positive neuron output and 0 otherwise. Products are [sT.W] with
// truncation and saturation; the sum is saturated once.
// Interface: y (neuron output), w_next[NO], delta_next[NO] in; delta out.
// Purely combinational.
module bp_hidden_gradient #(
  parameter int T  = 14,
  parameter int W  = 10,
  parameter int NO = 1
) (
  input  logic signed [T-1:0] y,
  input  logic signed [T-1:0] w_next     [NO],
  input  logic signed [T-1:0] delta_next [NO],
  output logic signed [T-1:0] delta
);

  localparam int G = $clog2(NO + 1) + 1;
  localparam logic signed [T+G-1:0] MAXV = (T+G)'((64'sd1 <<< (T-1)) - 1);
  localparam logic signed [T+G-1:0] MINV = -(T+G)'(64'sd1 <<< (T-1));

  logic signed [T-1:0]   prod [NO];
  logic signed [T+G-1:0] acc;
  logic signed [T-1:0]   err;

  for (genvar k = 0; k < NO; k++) begin : g_mul
    fxp_mul #(.T(T), .W(W)) u_mul (.a(w_next[k]), .b(delta_next[k]), .p(prod[k]));
  end

  always_comb begin
    acc = '0;
    for (int k = 0; k < NO; k++) acc += (T+G)'(prod[k]);
    if (acc > MAXV)      err = MAXV[T-1:0];
    else if (acc < MINV) err = MINV[T-1:0];
    else                 err = acc[T-1:0];
    delta = (y > 0) ? err : '0;
  end

endmodule
