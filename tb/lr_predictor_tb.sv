// lr_predictor_tb -- end-to-end test of the linear-regression predictor
// with M = 3 and TS = 1 (time markers t(n) = n).
//  * out_valid must rise exactly after M+1 accepted samples.
//  * Every output (beta0, beta1, vhat at t_pred = t(n) + 1) is compared bit
//    for bit with a reference built from f32_ref_pkg in the hardware's
//    order of operations, one clock after the sample is accepted.
//  * On a straight line the one-step prediction must equal the next point.
//  * Samples held back by in_valid = 0 must leave the outputs unchanged.
module lr_predictor_tb;
  import fp32_pkg::*;
  import f32_ref_pkg::*;

  localparam int M = 3;
  localparam int N = M + 1;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, in_valid, out_valid;
  float32_t t_in, v_in, t_pred, vhat, beta0, beta1;

  lr_predictor #(.M(M), .TS(1.0)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .t_in(t_in), .v_in(v_in),
    .t_pred(t_pred), .vhat(vhat), .beta0(beta0), .beta1(beta1), .out_valid(out_valid)
  );

  float32_t tw [N], vw [N];
  int nacc;

  task automatic expect_eq(input logic [31:0] got, input logic [31:0] exp_v, input string what);
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h (sample %0d)", what, got, exp_v, nacc);
    end
  endtask

  // reference model of the whole datapath
  task automatic ref_model(output float32_t rb0, output float32_t rb1, output float32_t rv);
    float32_t x [];
    float32_t tbar, vbar;
    real den;
    x = new[N];
    for (int k = 0; k < N; k++) x[k] = tw[k];
    tbar = mul(csum(x, N), r2f(1.0 / N));
    for (int k = 0; k < N; k++) x[k] = vw[k];
    vbar = mul(csum(x, N), r2f(1.0 / N));
    den = 0.0;
    for (int j = 0; j < N; j++) begin
      x[j] = mul(f32_ref_pkg::sub(vw[j], vbar), r2f(real'(M) / 2.0 - real'(j)));
      den += (real'(M) / 2.0 - real'(j)) ** 2;
    end
    rb1 = mul(csum(x, N), r2f(1.0 / den));
    rb0 = f32_ref_pkg::sub(vbar, mul(rb1, tbar));
    rv  = add(rb0, mul(rb1, t_pred));
  endtask

  task automatic push(input real t, input real v);
    float32_t rb0, rb1, rv;
    @(negedge clk);
    t_in = r2f(t); v_in = r2f(v); in_valid = 1'b1;
    for (int k = N - 1; k > 0; k--) begin tw[k] = tw[k-1]; vw[k] = vw[k-1]; end
    tw[0] = t_in; vw[0] = v_in;
    nacc++;
    @(negedge clk);
    in_valid = 1'b0;
    t_pred = r2f(t + 1.0);
    #1;
    checks++;
    if (out_valid !== (nacc >= N)) begin
      failures++;
      $display("FAIL out_valid=%b after %0d samples", out_valid, nacc);
    end
    ref_model(rb0, rb1, rv);
    expect_eq(beta1, rb1, "beta1");
    expect_eq(beta0, rb0, "beta0");
    expect_eq(vhat, rv, "vhat");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    float32_t hold;
    real phase;
    nacc = 0;
    for (int k = 0; k < N; k++) begin tw[k] = F32_ZERO; vw[k] = F32_ZERO; end
    rst_n = 1'b0; in_valid = 1'b0; t_in = '0; v_in = '0; t_pred = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // straight line v = 2 + 0.5 t: prediction must hit the next point
    for (int n = 0; n < 12; n++) begin
      push(real'(n), 2.0 + 0.5 * real'(n));
      if (nacc >= N) begin
        checks++;
        if (f2r(vhat) != 2.0 + 0.5 * real'(n + 1)) begin
          failures++;
          $display("FAIL line prediction %f at n=%0d", f2r(vhat), n);
        end
      end
    end

    // idle cycles: nothing may change
    hold = vhat;
    repeat (5) @(negedge clk);
    expect_eq(vhat, hold, "hold while idle");

    // joint-angle-like trajectory
    phase = 0.0;
    for (int n = 12; n < 400; n++) begin
      phase += 0.02 + 0.01 * real'($urandom_range(0, 100)) / 100.0;
      push(real'(n), 0.8 * $sin(phase) + 0.3 * $sin(3.1 * phase));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
