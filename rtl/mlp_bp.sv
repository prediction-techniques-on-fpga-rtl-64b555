// mlp_bp -- MLP-BP predictor: a B-H-1 multilayer perceptron (4-4-1 by
// default) trained online by backpropagation, in signed fixed point [sT.W]
// (14.10 by default).
//
// A delay line holds the last B samples v(n-1)..v(n-B); they are the
// network inputs, and the network output v_hat is the prediction of the
// next sample v(n). When that sample arrives (in_valid) it is the desired
// value: the error e = v(n) - v_hat is formed, the backpropagation module
// computes every new weight from the same inputs and hidden outputs, and on
// the clock edge the weights, the previous weights (for the alpha term) and
// the delay line are all updated. Everything between the registers is
// combinational, so the predictor takes one sample per clock and v_hat for
// the following sample is ready in the next cycle.
//
// Interface: in_valid / v_in carry one sample per accepted cycle; v_hat is
// the current prediction of the next sample; err is the error of the last
// accepted sample. Reset (synchronous, active low) loads the weight
// pattern of mlp_pkg and clears the delay line and the error.
module mlp_bp
  import mlp_pkg::*;
#(
  parameter int  T        = 14,
  parameter int  W        = 10,
  parameter int  B        = 4,
  parameter int  H        = 4,
  parameter real ETA      = 0.008,
  parameter real ALPHA    = 0.0,
  parameter bit  OUT_RELU = 1'b1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [T-1:0] v_in,
  output logic signed [T-1:0] v_hat,
  output logic signed [T-1:0] err
);

  localparam logic signed [T:0] MAXV = (T+1)'((64'sd1 <<< (T-1)) - 1);
  localparam logic signed [T:0] MINV = -(T+1)'(64'sd1 <<< (T-1));

  logic signed [T-1:0] taps [B];     // taps[k] = v(n-1-k)
  logic signed [T-1:0] net_in [B];
  logic signed [T-1:0] w1      [H][B+1];
  logic signed [T-1:0] w2      [H+1];
  logic signed [T-1:0] w1_prev [H][B+1];
  logic signed [T-1:0] w2_prev [H+1];
  logic signed [T-1:0] w1_new  [H][B+1];
  logic signed [T-1:0] w2_new  [H+1];
  logic signed [T-1:0] y1      [H];
  logic                act1    [H];
  logic signed [T-1:0] delta1  [H];
  logic signed [T-1:0] delta2;
  logic signed [T-1:0] yhat;
  logic                act2;
  logic signed [T:0]   e_full;
  logic signed [T-1:0] e;

  assign net_in = taps;

  mlpm #(.T(T), .W(W), .B(B), .H(H), .OUT_RELU(OUT_RELU)) u_mlpm (
    .v    (net_in),
    .w1   (w1),
    .w2   (w2),
    .y1   (y1),
    .act1 (act1),
    .yhat (yhat),
    .act2 (act2)
  );

  // error against the desired value, the newly arrived sample
  always_comb begin
    e_full = (T+1)'(v_in) - (T+1)'(yhat);
    if (e_full > MAXV)      e = MAXV[T-1:0];
    else if (e_full < MINV) e = MINV[T-1:0];
    else                    e = e_full[T-1:0];
  end

  bpm #(.T(T), .W(W), .B(B), .H(H), .ETA(ETA), .ALPHA(ALPHA)) u_bpm (
    .x_in    (net_in),
    .y1      (y1),
    .act2    (act2),
    .e       (e),
    .w1      (w1),
    .w2      (w2),
    .w1_prev (w1_prev),
    .w2_prev (w2_prev),
    .w1_new  (w1_new),
    .w2_new  (w2_new),
    .delta1  (delta1),
    .delta2  (delta2)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < H; i++)
        for (int j = 0; j <= B; j++) begin
          w1[i][j]      <= T'(init_w1(i, j, W));
          w1_prev[i][j] <= T'(init_w1(i, j, W));
        end
      for (int j = 0; j <= H; j++) begin
        w2[j]      <= T'(init_w2(j, W));
        w2_prev[j] <= T'(init_w2(j, W));
      end
      for (int k = 0; k < B; k++) taps[k] <= '0;
      err <= '0;
    end else if (in_valid) begin
      w1      <= w1_new;
      w2      <= w2_new;
      w1_prev <= w1;
      w2_prev <= w2;
      taps[0] <= v_in;
      for (int k = 1; k < B; k++) taps[k] <= taps[k-1];
      err <= e;
    end
  end

  assign v_hat = yhat;

endmodule
