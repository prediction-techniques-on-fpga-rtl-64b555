// lr_mean -- mean of the N samples held in a regression window.
//
// The samples are summed by the cascading sum and the result is multiplied
// by the constant 1/N, itself rounded to single precision at elaboration,
// so no divider is needed. The same block produces the mean time marker and
// the mean sample value of the linear-regression predictor.
//
// Interface: x[N] in, mean out. Purely combinational.
module lr_mean
  import fp32_pkg::*;
#(
  parameter int N = 4
) (
  input  float32_t x [N],
  output float32_t mean
);

  localparam float32_t INV_N = real_to_f32(1.0 / real'(N));

  float32_t sum;

  lr_cascade_sum #(.N(N)) u_cs (
    .x   (x),
    .sum (sum)
  );

  fp32_mul u_scale (
    .a (sum),
    .b (INV_N),
    .y (mean)
  );

endmodule
