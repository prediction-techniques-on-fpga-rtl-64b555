// bpm_tb -- checks one complete backpropagation step. A forward pass
// (mlpm) feeds the backpropagation module with random weights, previous
// weights, inputs and desired value; every new weight is compared with the
// reference model's training step (alpha = 0.25 here so that the w(n-1)
// term is exercised too). Steps where the output ReLU is inactive (no
// update) and where hidden neurons are inactive are counted and required.
module bpm_tb;
  import mlp_ref_pkg::*;
  localparam int T = 14, W = 10, B = 4, H = 4;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic signed [T-1:0] v [B], w1 [H][B+1], w2 [H+1], w1p [H][B+1], w2p [H+1];
  logic signed [T-1:0] w1n [H][B+1], w2n [H+1], y1 [H], d1 [H], yhat, d2, e;
  logic act1 [H], act2;

  mlpm #(.T(T), .W(W), .B(B), .H(H)) u_fwd (
    .v(v), .w1(w1), .w2(w2), .y1(y1), .act1(act1), .yhat(yhat), .act2(act2));
  bpm #(.T(T), .W(W), .B(B), .H(H), .ALPHA(0.25)) dut (
    .x_in(v), .y1(y1), .act2(act2), .e(e), .w1(w1), .w2(w2), .w1_prev(w1p), .w2_prev(w2p),
    .w1_new(w1n), .w2_new(w2n), .delta1(d1), .delta2(d2));

  mlp_model m;

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
    longint d;
    int out_dead, hid_dead;
    out_dead = 0; hid_dead = 0;
    m = new(T, W, B, H, 1'b0, 1'b1, 0.008, 0.25);
    for (int n = 0; n < 2000; n++) begin
      for (int k = 0; k < B; k++) begin v[k] = 14'($signed(12'($urandom))); m.taps[k] = v[k]; end
      for (int i = 0; i < H; i++) for (int j = 0; j <= B; j++) begin
        w1[i][j] = 14'($signed(11'($urandom)));  m.w1[i][j] = w1[i][j];
        w1p[i][j] = 14'($signed(11'($urandom))); m.w1p[i][j] = w1p[i][j];
      end
      for (int j = 0; j <= H; j++) begin
        w2[j] = 14'($signed(11'($urandom)));  m.w2[j] = w2[j];
        w2p[j] = 14'($signed(11'($urandom))); m.w2p[j] = w2p[j];
      end
      d = longint'($signed(13'($urandom)));
      void'(m.forward());
      e = 14'(sat(d - m.yhat, T));
      m.step(d);
      #1;
      for (int i = 0; i < H; i++) for (int j = 0; j <= B; j++) cmp(w1n[i][j], m.w1[i][j], "w1_new");
      for (int j = 0; j <= H; j++) cmp(w2n[j], m.w2[j], "w2_new");
      if (!act2) out_dead++;
      for (int i = 0; i < H; i++) if (!act1[i]) hid_dead++;
    end
    checks++;
    if (out_dead == 0 || hid_dead == 0) begin
      failures++;
      $display("FAIL inactive cases not reached: out %0d hidden %0d", out_dead, hid_dead);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
