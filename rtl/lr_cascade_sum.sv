// lr_cascade_sum -- cascading sum (CS) of N single-precision values.
//
// The N inputs are added by a chain of N-1 floating-point adders:
// s(0) = x[0], s(k) = s(k-1) + x[k], sum = s(N-1). The chain, rather than a
// tree, follows the cascading structure described for the regression
// hardware, where the critical path grows with the regression window; the
// order of addition also fixes the rounding of the result.
//
// Interface: x[N] in, sum out. Purely combinational. N >= 1.
module lr_cascade_sum
  import fp32_pkg::*;
#(
  parameter int N = 4
) (
  input  float32_t x [N],
  output float32_t sum
);

  float32_t partial [N];

  assign partial[0] = x[0];

  for (genvar k = 1; k < N; k++) begin : g_stage
    fp32_add u_add (
      .a   (partial[k-1]),
      .b   (x[k]),
      .sub (1'b0),
      .y   (partial[k])
    );
  end

  assign sum = partial[N-1];

endmodule
