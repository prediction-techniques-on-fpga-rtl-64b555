// lr_predictor -- linear-regression prediction technique for one variable.
//
// Each accepted sample (in_valid) pushes its time marker t_in and value
// v_in into two (M+1)-deep windows. From the registered windows a fully
// combinational single-precision datapath computes the mean time marker and
// the mean value (cascading sum times 1/(M+1)), the slope beta1 with the
// constant-factor form of the least-squares formula, the intercept
// beta0 = vbar - beta1*tbar and finally vhat = beta0 + beta1*t_pred, the
// value of the fitted line at the requested time marker t_pred. Feeding
// t_pred = t(n) + TS gives a one-step-ahead prediction.
//
// Timing: one sample per clock. vhat, beta0 and beta1 are valid in the
// cycle after the sample that filled the window was accepted, and then
// follow every new sample with the same one-cycle latency; out_valid rises
// once M+1 samples have been received since reset. The time markers are
// assumed uniformly spaced by TS (the slope's constants depend on it).
// Reset is active low and synchronous; it clears the windows.
module lr_predictor
  import fp32_pkg::*;
#(
  parameter int  M  = 3,
  parameter real TS = 1.0
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  input  float32_t t_in,
  input  float32_t v_in,
  input  float32_t t_pred,
  output float32_t vhat,
  output float32_t beta0,
  output float32_t beta1,
  output logic     out_valid
);

  localparam int N = M + 1;
  localparam int CW = $clog2(N + 1);

  float32_t t_win [N];
  float32_t v_win [N];
  logic [CW-1:0] fill;
  float32_t tbar, vbar;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int j = 0; j < N; j++) begin
        t_win[j] <= F32_ZERO;
        v_win[j] <= F32_ZERO;
      end
      fill <= '0;
    end else if (in_valid) begin
      t_win[0] <= t_in;
      v_win[0] <= v_in;
      for (int j = 1; j < N; j++) begin
        t_win[j] <= t_win[j-1];
        v_win[j] <= v_win[j-1];
      end
      if (fill != CW'(N)) fill <= fill + 1'b1;
    end
  end

  assign out_valid = (fill == CW'(N));

  lr_mean #(.N(N)) u_tmean (.x(t_win), .mean(tbar));
  lr_mean #(.N(N)) u_vmean (.x(v_win), .mean(vbar));

  lr_beta1 #(.M(M), .TS(TS)) u_beta1 (
    .v     (v_win),
    .vbar  (vbar),
    .beta1 (beta1)
  );

  lr_beta0 u_beta0 (
    .tbar  (tbar),
    .beta1 (beta1),
    .vbar  (vbar),
    .beta0 (beta0)
  );

  lr_eval u_eval (
    .tm    (t_pred),
    .beta0 (beta0),
    .beta1 (beta1),
    .vhat  (vhat)
  );

endmodule
