// mlpm -- multilayer perceptron module: forward pass of the B-H-1 network
// (4-4-1 by default) in signed fixed point [sT.W].
//
// H hidden neurons each weigh the B inputs and the bias input (-1) and pass
// the sum through a ReLU; one output neuron weighs the H hidden outputs and
// the bias and, when OUT_RELU = 1, also passes through a ReLU (as the
// source describes for the output layer); with OUT_RELU = 0 the output is
// the plain linear combination. The whole pass is combinational: the
// network has no internal registers and produces a result in the same
// cycle as its inputs and weights.
//
// Interface: v[B] network inputs, w1[H][B+1] hidden weights (index 0 is the
// bias weight), w2[H+1] output weights; y1[H] and act1[H] are the hidden
// outputs and their ReLU derivative, yhat the network output and act2 the
// output neuron's derivative (1 when OUT_RELU = 0).
module mlpm #(
  parameter int T        = 14,
  parameter int W        = 10,
  parameter int B        = 4,
  parameter int H        = 4,
  parameter bit OUT_RELU = 1'b1
) (
  input  logic signed [T-1:0] v    [B],
  input  logic signed [T-1:0] w1   [H][B+1],
  input  logic signed [T-1:0] w2   [H+1],
  output logic signed [T-1:0] y1   [H],
  output logic                act1 [H],
  output logic signed [T-1:0] yhat,
  output logic                act2
);

  localparam logic signed [T-1:0] BIAS_IN = -T'(64'sd1 <<< W);

  logic signed [T-1:0] x1 [H];
  logic signed [T-1:0] x2, y2_relu;
  logic                act2_relu;

  for (genvar i = 0; i < H; i++) begin : g_hidden
    mlp_neuron #(.N_IN(B), .T(T), .W(W)) u_neuron (
      .y    (v),
      .bias (BIAS_IN),
      .w    (w1[i]),
      .x    (x1[i])
    );
    relu #(.T(T)) u_relu (
      .x      (x1[i]),
      .y      (y1[i]),
      .active (act1[i])
    );
  end

  mlp_neuron #(.N_IN(H), .T(T), .W(W)) u_out (
    .y    (y1),
    .bias (BIAS_IN),
    .w    (w2),
    .x    (x2)
  );

  relu #(.T(T)) u_out_relu (
    .x      (x2),
    .y      (y2_relu),
    .active (act2_relu)
  );

  assign yhat = OUT_RELU ? y2_relu : x2;
  assign act2 = OUT_RELU ? act2_relu : 1'b1;

endmodule
