// relu -- rectified linear unit f(x) = max{0, x} on a signed fixed-point
// word: a comparator on the sign bit driving a multiplexer. It also
// reports the derivative f'(x) (1 when x > 0), which the backpropagation
// module uses. Purely combinational.
module relu #(
  parameter int T = 14
) (
  input  logic signed [T-1:0] x,
  output logic signed [T-1:0] y,
  output logic                active
);

  always_comb begin
    active = (x > 0);
    y      = active ? x : '0;
  end

endmodule
