// rmlp_bp_tb -- end-to-end test of the RMLP-BP (recurrent output) predictor at its default
// size (4-4-1, s14.10, eta = 0.008, alpha = 0) on a joint-angle-like
// trajectory of 3000 samples, with idle cycles between some samples.
//  * v_hat and err are compared bit for bit with the reference model
//    after every accepted sample (one clock of latency).
//  * Idle cycles (in_valid = 0) must change nothing.
//  * Online training must reduce the prediction error: the mean squared
//    error of the last 500 samples must be below that of the first 500.
module rmlp_bp_tb;
  import mlp_ref_pkg::*;
  localparam int T = 14, W = 10;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, in_valid;
  logic signed [T-1:0] v_in, v_hat, err;

  rmlp_bp dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .v_in(v_in), .v_hat(v_hat), .err(err));

  mlp_model m;

  task automatic cmp(input longint got, input longint exp_v, input string what);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp_v);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real phase, mse_first, mse_last, x;
    longint s;
    logic signed [T-1:0] hold;
    m = new(T, W, 4, 4, 1'b1, 1'b1, 0.008, 0.0);
    rst_n = 1'b0; in_valid = 1'b0; v_in = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    #1 cmp(v_hat, m.yhat, "prediction after reset");
    phase = 0.0; mse_first = 0.0; mse_last = 0.0;
    for (int n = 0; n < 3000; n++) begin
      phase += 0.03;
      x = 1.2 + 0.6 * $sin(phase) + 0.2 * $sin(2.7 * phase);
      s = longint'($floor(x * 1024.0));
      @(negedge clk);
      v_in = 14'(s); in_valid = 1'b1;
      #1 cmp(err, m.err, "err before the edge");
      m.step(s);
      @(negedge clk);
      in_valid = 1'b0;
      #1;
      cmp(v_hat, m.yhat, "v_hat");
      cmp(err, m.err, "err");
      if (n < 500) mse_first += (real'(m.err) / 1024.0) ** 2;
      if (n >= 2500) mse_last += (real'(m.err) / 1024.0) ** 2;
      if (n % 97 == 0) begin
        hold = v_hat;
        repeat (3) @(negedge clk);
        cmp(v_hat, hold, "hold while idle");
      end
    end
    mse_first /= 500.0; mse_last /= 500.0;
    $display("MSE first 500: %g, last 500: %g", mse_first, mse_last);
    checks++;
    if (!(mse_last < mse_first)) begin
      failures++;
      $display("FAIL training did not reduce the error");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
