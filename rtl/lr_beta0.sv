// lr_beta0 -- least-squares intercept estimate of the linear regression,
//   beta0 = vbar - beta1 * tbar,
// built from one single-precision multiplier and one subtractor.
//
// Interface: tbar, beta1, vbar in, beta0 out. Purely combinational.
module lr_beta0
  import fp32_pkg::*;
(
  input  float32_t tbar,
  input  float32_t beta1,
  input  float32_t vbar,
  output float32_t beta0
);

  float32_t b1_t;

  fp32_mul u_mul (
    .a (beta1),
    .b (tbar),
    .y (b1_t)
  );

  fp32_add u_sub (
    .a   (vbar),
    .b   (b1_t),
    .sub (1'b1),
    .y   (beta0)
  );

endmodule
