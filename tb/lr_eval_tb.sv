// lr_eval_tb -- checks vhat = beta0 + beta1*tm bit for bit against the
// reference rounding order (product rounded, then sum rounded), plus an
// exact case.
module lr_eval_tb;
  import fp32_pkg::*;
  import f32_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  float32_t tm, beta0, beta1, vhat;

  lr_eval dut (.tm(tm), .beta0(beta0), .beta1(beta1), .vhat(vhat));

  task automatic expect_eq(input float32_t got, input float32_t exp_v);
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL tm=%h beta0=%h beta1=%h: got %h expected %h",
                                  tm, beta0, beta1, got, exp_v);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tm = r2f(6.0); beta0 = r2f(-1.0); beta1 = r2f(0.25);
    #1 expect_eq(vhat, r2f(0.5));
    for (int i = 0; i < 3000; i++) begin
      tm = rnd(130, 6); beta0 = rnd(127, 6); beta1 = rnd(125, 6);
      #1 expect_eq(vhat, add(beta0, mul(beta1, tm)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
