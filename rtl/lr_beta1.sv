// lr_beta1 -- least-squares slope estimate beta1 of the linear regression.
//
// For the window v(n-j), j = 0..M, the slope is
//   beta1 = sum_j (t(n-j) - tbar)(v(n-j) - vbar) / sum_j (t(n-j) - tbar)^2.
// The time markers are taken as uniformly spaced by TS, so that
// t(n-j) - tbar = (M/2 - j) * TS does not depend on n. Both the
// per-tap factors C1[j] = (M/2 - j) * TS and the reciprocal of the
// denominator C2 = 1 / sum_j C1[j]^2 are therefore constants, computed at
// elaboration, and the division disappears. Per tap one subtractor forms
// v(n-j) - vbar and one multiplier scales it by C1[j]; a cascading sum
// adds the taps and a last multiplier applies C2.
//
// Interface: v[M+1] in (v[0] is the newest sample), vbar in, beta1 out.
// Purely combinational.
module lr_beta1
  import fp32_pkg::*;
#(
  parameter int  M  = 3,
  parameter real TS = 1.0
) (
  input  float32_t v [M+1],
  input  float32_t vbar,
  output float32_t beta1
);

  function automatic real c1_real(input int j);
    return (real'(M) / 2.0 - real'(j)) * TS;
  endfunction

  function automatic real c2_real();
    real acc;
    acc = 0.0;
    for (int j = 0; j <= M; j++) acc += c1_real(j) * c1_real(j);
    return 1.0 / acc;
  endfunction

  localparam float32_t C2 = real_to_f32(c2_real());

  float32_t dv   [M+1];
  float32_t prod [M+1];
  float32_t sxy;

  for (genvar j = 0; j <= M; j++) begin : g_tap
    localparam float32_t C1 = real_to_f32(c1_real(j));
    fp32_add u_sub (
      .a   (v[j]),
      .b   (vbar),
      .sub (1'b1),
      .y   (dv[j])
    );
    fp32_mul u_mul (
      .a (dv[j]),
      .b (C1),
      .y (prod[j])
    );
  end

  lr_cascade_sum #(.N(M+1)) u_cs (
    .x   (prod),
    .sum (sxy)
  );

  fp32_mul u_norm (
    .a (sxy),
    .b (C2),
    .y (beta1)
  );

endmodule
