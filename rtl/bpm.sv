// bpm -- backpropagation module of the B-H-1 network.
//
// From the network inputs x_in, the hidden outputs y1, the output
// neuron's derivative act2 and the error e = d - yhat it forms the output
// gradient delta2 = e * f'(output), the hidden gradients
// delta1[i] = f'(y1[i]) * w2[i+1] * delta2, and the new value of every
// weight with bp_weight_update. The input seen by bias weights is the
// constant bias input -1. Fully combinational: the caller registers the
// new weights, so that one training step takes one clock cycle.
// Interface: x_in[B], y1[H], act2, e, w1, w2, w1_prev, w2_prev in;
// w1_new, w2_new, delta1[H], delta2 out.
module bpm #(
  parameter int  T     = 14,
  parameter int  W     = 10,
  parameter int  B     = 4,
  parameter int  H     = 4,
  parameter real ETA   = 0.008,
  parameter real ALPHA = 0.0
) (
  input  logic signed [T-1:0] x_in    [B],
  input  logic signed [T-1:0] y1      [H],
  input  logic                act2,
  input  logic signed [T-1:0] e,
  input  logic signed [T-1:0] w1      [H][B+1],
  input  logic signed [T-1:0] w2      [H+1],
  input  logic signed [T-1:0] w1_prev [H][B+1],
  input  logic signed [T-1:0] w2_prev [H+1],
  output logic signed [T-1:0] w1_new  [H][B+1],
  output logic signed [T-1:0] w2_new  [H+1],
  output logic signed [T-1:0] delta1  [H],
  output logic signed [T-1:0] delta2
);

  localparam logic signed [T-1:0] BIAS_IN = -T'(64'sd1 <<< W);

  assign delta2 = act2 ? e : '0;

  // output layer
  for (genvar j = 0; j <= H; j++) begin : g_w2
    bp_weight_update #(.T(T), .W(W), .ETA(ETA), .ALPHA(ALPHA)) u_upd (
      .w      (w2[j]),
      .w_prev (w2_prev[j]),
      .delta  (delta2),
      .y      ((j == 0) ? BIAS_IN : y1[(j == 0) ? 0 : j-1]),
      .w_new  (w2_new[j])
    );
  end

  // hidden layer
  for (genvar i = 0; i < H; i++) begin : g_hid
    logic signed [T-1:0] wn [1];
    logic signed [T-1:0] dn [1];
    assign wn[0] = w2[i+1];
    assign dn[0] = delta2;

    bp_hidden_gradient #(.T(T), .W(W), .NO(1)) u_grad (
      .y          (y1[i]),
      .w_next     (wn),
      .delta_next (dn),
      .delta      (delta1[i])
    );

    for (genvar j = 0; j <= B; j++) begin : g_w1
      bp_weight_update #(.T(T), .W(W), .ETA(ETA), .ALPHA(ALPHA)) u_upd (
        .w      (w1[i][j]),
        .w_prev (w1_prev[i][j]),
        .delta  (delta1[i]),
        .y      ((j == 0) ? BIAS_IN : x_in[(j == 0) ? 0 : j-1]),
        .w_new  (w1_new[i][j])
      );
    end
  end

endmodule
