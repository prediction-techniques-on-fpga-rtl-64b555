// bp_weight_update -- update of one synaptic weight,
//   w(n+1) = w(n) + eta * delta(n) * y(n) + alpha * w(n-1),
// with the learning rate eta and the term alpha as [sT.W] constants
// (defaults 0.008 and 0.0, rounded to the nearest step of the format:
// eta = 8/1024 at W = 10). Three multipliers (delta*y, eta*(delta*y),
// alpha*w(n-1)) and a saturating adder. Purely combinational.
// Interface: w, w_prev (w(n-1)), delta, y in; w_new out.
module bp_weight_update
  import mlp_pkg::*;
#(
  parameter int  T     = 14,
  parameter int  W     = 10,
  parameter real ETA   = 0.008,
  parameter real ALPHA = 0.0
) (
  input  logic signed [T-1:0] w,
  input  logic signed [T-1:0] w_prev,
  input  logic signed [T-1:0] delta,
  input  logic signed [T-1:0] y,
  output logic signed [T-1:0] w_new
);

  localparam logic signed [T-1:0] ETA_FX   = T'(real_to_fxp(ETA, W));
  localparam logic signed [T-1:0] ALPHA_FX = T'(real_to_fxp(ALPHA, W));
  localparam logic signed [T+1:0] MAXV = (T+2)'((64'sd1 <<< (T-1)) - 1);
  localparam logic signed [T+1:0] MINV = -(T+2)'(64'sd1 <<< (T-1));

  logic signed [T-1:0] grad, step, mom;
  logic signed [T+1:0] acc;

  fxp_mul #(.T(T), .W(W)) u_grad (.a(delta),    .b(y),      .p(grad));
  fxp_mul #(.T(T), .W(W)) u_eta  (.a(ETA_FX),   .b(grad),   .p(step));
  fxp_mul #(.T(T), .W(W)) u_mom  (.a(ALPHA_FX), .b(w_prev), .p(mom));

  always_comb begin
    acc = (T+2)'(w) + (T+2)'(step) + (T+2)'(mom);
    if (acc > MAXV)      w_new = MAXV[T-1:0];
    else if (acc < MINV) w_new = MINV[T-1:0];
    else                 w_new = acc[T-1:0];
  end

endmodule
