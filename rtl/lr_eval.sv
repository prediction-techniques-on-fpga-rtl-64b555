// lr_eval -- evaluates the fitted regression line at a time marker,
//   vhat = beta0 + beta1 * tm,
// with one single-precision multiplier and one adder.
//
// Interface: tm, beta0, beta1 in, vhat out. Purely combinational.
module lr_eval
  import fp32_pkg::*;
(
  input  float32_t tm,
  input  float32_t beta0,
  input  float32_t beta1,
  output float32_t vhat
);

  float32_t b1_t;

  fp32_mul u_mul (
    .a (beta1),
    .b (tm),
    .y (b1_t)
  );

  fp32_add u_add (
    .a   (beta0),
    .b   (b1_t),
    .sub (1'b0),
    .y   (vhat)
  );

endmodule
