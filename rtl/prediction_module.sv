// prediction_module -- one prediction module of a tactile link (the
// master-side or the slave-side predictor), running in parallel with the
// device's own computational system and fed with the same input signals.
//
// It holds NI independent channels, one per predicted variable (for
// example one per joint or Cartesian coordinate), and every channel carries
// the two prediction techniques of the design side by side: the linear
// regression predictor in single-precision floating point over an
// (M+1)-sample window, and the online-trained MLP-BP and RMLP-BP predictors
// in signed fixed point [sT.W]. All channels take one sample per clock on
// a shared in_valid; there is no arbitration or sharing between channels,
// so the throughput in samples per second is NI times the clock rate.
//
// Interface (per channel c): t_in[c], v_f32[c], t_pred[c] feed the linear
// regression (time marker, value, time at which to evaluate the fitted
// line) and give lr_vhat[c]; v_fx[c] feeds the two neural predictors and
// gives mlp_vhat[c] / mlp_err[c] and rmlp_vhat[c] / rmlp_err[c]. lr_valid
// is high once the regression windows are full. Latency: one clock from an
// accepted sample to the updated predictions.
module prediction_module
  import fp32_pkg::*;
#(
  parameter int  NI       = 3,
  parameter int  M        = 3,
  parameter real TS       = 1.0,
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
  input  float32_t            t_in      [NI],
  input  float32_t            v_f32     [NI],
  input  float32_t            t_pred    [NI],
  output float32_t            lr_vhat   [NI],
  output logic                lr_valid,
  input  logic signed [T-1:0] v_fx      [NI],
  output logic signed [T-1:0] mlp_vhat  [NI],
  output logic signed [T-1:0] mlp_err   [NI],
  output logic signed [T-1:0] rmlp_vhat [NI],
  output logic signed [T-1:0] rmlp_err  [NI]
);

  logic     lr_ok [NI];

  for (genvar c = 0; c < NI; c++) begin : g_ch
    float32_t beta0, beta1;

    lr_predictor #(.M(M), .TS(TS)) u_lr (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (in_valid),
      .t_in      (t_in[c]),
      .v_in      (v_f32[c]),
      .t_pred    (t_pred[c]),
      .vhat      (lr_vhat[c]),
      .beta0     (beta0),
      .beta1     (beta1),
      .out_valid (lr_ok[c])
    );

    mlp_bp #(.T(T), .W(W), .B(B), .H(H), .ETA(ETA), .ALPHA(ALPHA),
             .OUT_RELU(OUT_RELU)) u_mlp (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (in_valid),
      .v_in     (v_fx[c]),
      .v_hat    (mlp_vhat[c]),
      .err      (mlp_err[c])
    );

    rmlp_bp #(.T(T), .W(W), .B(B), .H(H), .ETA(ETA), .ALPHA(ALPHA),
              .OUT_RELU(OUT_RELU)) u_rmlp (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (in_valid),
      .v_in     (v_fx[c]),
      .v_hat    (rmlp_vhat[c]),
      .err      (rmlp_err[c])
    );
  end

  // all channels share in_valid and reset, so their windows fill together
  assign lr_valid = lr_ok[0];

endmodule
