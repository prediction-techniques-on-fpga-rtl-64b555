// bp_weight_update_tb -- checks w(n+1) = w + eta*(delta*y) + alpha*w(n-1)
// for the default constants (eta = 0.008 -> 8/1024, alpha = 0) and for
// alpha = 0.5, against the reference model and a hand-worked case.
module bp_weight_update_tb;
  import mlp_ref_pkg::*;
  localparam int T = 14, W = 10;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic signed [T-1:0] w, wp, d, y, wn_a, wn_b;

  bp_weight_update #(.T(T), .W(W)) dut_a (.w(w), .w_prev(wp), .delta(d), .y(y), .w_new(wn_a));
  bp_weight_update #(.T(T), .W(W), .ETA(0.25), .ALPHA(0.5)) dut_b (
    .w(w), .w_prev(wp), .delta(d), .y(y), .w_new(wn_b));

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
    // delta*y = 2*2 = 4.0; eta*4 = 32/1024; w = 0.5
    w = 14'sd512; wp = 14'sd1024; d = 14'sd2048; y = 14'sd2048;
    #1;
    cmp(wn_a, 512 + 32, "hand case, alpha 0");
    cmp(wn_b, 512 + 1024 + 512, "hand case, eta 0.25 alpha 0.5");
    for (int n = 0; n < 3000; n++) begin
      w = 14'($urandom); wp = 14'($urandom);
      d = 14'($urandom); y = 14'($urandom);
      #1;
      cmp(wn_a, sat(w + fmul(8, fmul(d, y, T, W), T, W), T), "default");
      cmp(wn_b, sat(w + fmul(256, fmul(d, y, T, W), T, W) + fmul(512, wp, T, W), T), "alpha");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
