// tactile_prediction_top -- the prediction hardware of a tactile-internet
// link: a master-side prediction module (MPD) fed with the master device's
// signals q(n), and a slave-side prediction module (SPD) fed with the slave
// device's signals c(n). Each side predicts its NI variables in parallel
// with that device's computational system, so that the link can use
// predicted values to hide network delay and lost samples. The two sides
// are independent; the computational systems and the network between them
// are outside this design, and their signals are the ports here.
//
// Each side is a prediction_module with NI channels carrying a
// single-precision linear-regression predictor and the fixed-point MLP-BP
// and RMLP-BP predictors. Ports are prefixed mpd_ and spd_; see
// prediction_module for their meaning. One sample per clock and side,
// one clock of latency.
module tactile_prediction_top
  import fp32_pkg::*;
#(
  parameter int  NI       = 3,
  parameter int  M        = 3,
  parameter real TS       = 1.0,
  parameter int  T        = 14,
  parameter int  W        = 10,
  parameter real ETA      = 0.008,
  parameter real ALPHA    = 0.0,
  parameter bit  OUT_RELU = 1'b1
) (
  input  logic                clk,
  input  logic                rst_n,
  // master side
  input  logic                mpd_valid,
  input  float32_t            mpd_t_in      [NI],
  input  float32_t            mpd_v_f32     [NI],
  input  float32_t            mpd_t_pred    [NI],
  output float32_t            mpd_lr_vhat   [NI],
  output logic                mpd_lr_valid,
  input  logic signed [T-1:0] mpd_v_fx      [NI],
  output logic signed [T-1:0] mpd_mlp_vhat  [NI],
  output logic signed [T-1:0] mpd_mlp_err   [NI],
  output logic signed [T-1:0] mpd_rmlp_vhat [NI],
  output logic signed [T-1:0] mpd_rmlp_err  [NI],
  // slave side
  input  logic                spd_valid,
  input  float32_t            spd_t_in      [NI],
  input  float32_t            spd_v_f32     [NI],
  input  float32_t            spd_t_pred    [NI],
  output float32_t            spd_lr_vhat   [NI],
  output logic                spd_lr_valid,
  input  logic signed [T-1:0] spd_v_fx      [NI],
  output logic signed [T-1:0] spd_mlp_vhat  [NI],
  output logic signed [T-1:0] spd_mlp_err   [NI],
  output logic signed [T-1:0] spd_rmlp_vhat [NI],
  output logic signed [T-1:0] spd_rmlp_err  [NI]
);

  prediction_module #(.NI(NI), .M(M), .TS(TS), .T(T), .W(W), .ETA(ETA),
                      .ALPHA(ALPHA), .OUT_RELU(OUT_RELU)) u_mpd (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (mpd_valid),
    .t_in      (mpd_t_in),
    .v_f32     (mpd_v_f32),
    .t_pred    (mpd_t_pred),
    .lr_vhat   (mpd_lr_vhat),
    .lr_valid  (mpd_lr_valid),
    .v_fx      (mpd_v_fx),
    .mlp_vhat  (mpd_mlp_vhat),
    .mlp_err   (mpd_mlp_err),
    .rmlp_vhat (mpd_rmlp_vhat),
    .rmlp_err  (mpd_rmlp_err)
  );

  prediction_module #(.NI(NI), .M(M), .TS(TS), .T(T), .W(W), .ETA(ETA),
                      .ALPHA(ALPHA), .OUT_RELU(OUT_RELU)) u_spd (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (spd_valid),
    .t_in      (spd_t_in),
    .v_f32     (spd_v_f32),
    .t_pred    (spd_t_pred),
    .lr_vhat   (spd_lr_vhat),
    .lr_valid  (spd_lr_valid),
    .v_fx      (spd_v_fx),
    .mlp_vhat  (spd_mlp_vhat),
    .mlp_err   (spd_mlp_err),
    .rmlp_vhat (spd_rmlp_vhat),
    .rmlp_err  (spd_rmlp_err)
  );

endmodule
