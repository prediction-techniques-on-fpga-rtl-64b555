// rmlp_bp -- RMLP-BP predictor: the MLP-BP predictor with a recurrent
// output. The first network input is the network's own previous output
// (the prediction made one sample earlier, held in a register); the other
// B-1 inputs are the last samples v(n-1)..v(n-B+1) from a delay line.
// Training is the same online backpropagation: when sample v(n) arrives
// (in_valid) the error e = v(n) - v_hat updates all weights on the clock
// edge, the current prediction moves into the feedback register and the
// sample enters the delay line. The feedback register is treated as an
// ordinary input during training (no backpropagation through time), as in
// the source. One sample per clock; v_hat is valid the cycle after a
// sample is accepted.
//
// Interface: as mlp_bp. Reset (synchronous, active low) loads the weight
// pattern of mlp_pkg and clears the feedback register, delay line and
// error.
module rmlp_bp
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

  logic signed [T-1:0] taps [B-1];   // taps[k] = v(n-1-k)
  logic signed [T-1:0] fb;           // previous prediction
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

  always_comb begin
    net_in[0] = fb;
    for (int k = 1; k < B; k++) net_in[k] = taps[k-1];
  end

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
      for (int k = 0; k < B-1; k++) taps[k] <= '0;
      fb <= '0;
      err <= '0;
    end else if (in_valid) begin
      w1      <= w1_new;
      w2      <= w2_new;
      w1_prev <= w1;
      w2_prev <= w2;
      taps[0] <= v_in;
      for (int k = 1; k < B-1; k++) taps[k] <= taps[k-1];
      fb <= yhat;
      err <= e;
    end
  end

  assign v_hat = yhat;

endmodule
