// bp_hidden_gradient_tb -- checks delta = f'(y) * sum_k w_next[k] *
// delta_next[k] for one and for three next-layer neurons, including
// inactive neurons (y <= 0) and saturating sums.
module bp_hidden_gradient_tb;
  import mlp_ref_pkg::*;
  localparam int T = 14, W = 10;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic signed [T-1:0] y, d1, d3;
  logic signed [T-1:0] w1n [1], dl1 [1], w3n [3], dl3 [3];

  bp_hidden_gradient #(.T(T), .W(W), .NO(1)) dut1 (.y(y), .w_next(w1n), .delta_next(dl1), .delta(d1));
  bp_hidden_gradient #(.T(T), .W(W), .NO(3)) dut3 (.y(y), .w_next(w3n), .delta_next(dl3), .delta(d3));

  task automatic cmp(input longint got, input longint exp_v, input string what);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp_v);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint acc;
    // 0.5 * 0.25 = 0.125 for an active neuron
    y = 14'sd100; w1n[0] = 14'sd512; dl1[0] = 14'sd256;
    for (int k = 0; k < 3; k++) begin w3n[k] = 0; dl3[k] = 0; end
    #1 cmp(d1, 128, "hand case");
    for (int n = 0; n < 3000; n++) begin
      y = 14'($signed(12'($urandom)));
      w1n[0] = 14'($urandom); dl1[0] = 14'($signed(12'($urandom)));
      for (int k = 0; k < 3; k++) begin
        w3n[k] = 14'($urandom); dl3[k] = 14'($urandom);
      end
      #1;
      cmp(d1, (y > 0) ? sat(fmul(w1n[0], dl1[0], T, W), T) : 0, "NO=1");
      acc = 0;
      for (int k = 0; k < 3; k++) acc += fmul(w3n[k], dl3[k], T, W);
      cmp(d3, (y > 0) ? sat(acc, T) : 0, "NO=3");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
