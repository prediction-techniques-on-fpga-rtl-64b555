// mlpm_tb -- checks the 4-4-1 forward pass (hidden outputs, derivative
// flags, network output) against the reference model for random weights
// and inputs, with the ReLU output neuron (default) and with a linear
// output neuron.
module mlpm_tb;
  import mlp_ref_pkg::*;
  localparam int T = 14, W = 10, B = 4, H = 4;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic signed [T-1:0] v [B], w1 [H][B+1], w2 [H+1];
  logic signed [T-1:0] y1_a [H], y1_b [H], yhat_a, yhat_b;
  logic act1_a [H], act1_b [H], act2_a, act2_b;

  mlpm #(.T(T), .W(W), .B(B), .H(H)) dut_a (
    .v(v), .w1(w1), .w2(w2), .y1(y1_a), .act1(act1_a), .yhat(yhat_a), .act2(act2_a));
  mlpm #(.T(T), .W(W), .B(B), .H(H), .OUT_RELU(1'b0)) dut_b (
    .v(v), .w1(w1), .w2(w2), .y1(y1_b), .act1(act1_b), .yhat(yhat_b), .act2(act2_b));

  mlp_model ma, mb;

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
    int neg_out;
    neg_out = 0;
    ma = new(T, W, B, H, 1'b0, 1'b1, 0.008, 0.0);
    mb = new(T, W, B, H, 1'b0, 1'b0, 0.008, 0.0);
    for (int n = 0; n < 2000; n++) begin
      for (int k = 0; k < B; k++) begin
        v[k] = 14'($signed(12'($urandom)));
        ma.taps[k] = v[k]; mb.taps[k] = v[k];
      end
      for (int i = 0; i < H; i++) for (int j = 0; j <= B; j++) begin
        w1[i][j] = 14'($signed(11'($urandom)));
        ma.w1[i][j] = w1[i][j]; mb.w1[i][j] = w1[i][j];
      end
      for (int j = 0; j <= H; j++) begin
        w2[j] = 14'($signed(11'($urandom)));
        ma.w2[j] = w2[j]; mb.w2[j] = w2[j];
      end
      void'(ma.forward());
      void'(mb.forward());
      #1;
      for (int i = 0; i < H; i++) begin
        cmp(y1_a[i], ma.y1[i], "hidden y");
        cmp(act1_a[i], ma.y1[i] > 0, "hidden f'");
      end
      cmp(yhat_a, ma.yhat, "output (ReLU)");
      cmp(act2_a, ma.yhat > 0, "output f'");
      cmp(yhat_b, mb.yhat, "output (linear)");
      if (mb.yhat < 0) neg_out++;
    end
    checks++;
    if (neg_out == 0) begin failures++; $display("FAIL no negative linear output seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
