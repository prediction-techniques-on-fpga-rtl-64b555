// lr_beta0_tb -- checks beta0 = vbar - beta1*tbar bit for bit against the
// reference rounding order (product rounded, then difference rounded),
// plus an exact case.
module lr_beta0_tb;
  import fp32_pkg::*;
  import f32_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  float32_t tbar, beta1, vbar, beta0;

  lr_beta0 dut (.tbar(tbar), .beta1(beta1), .vbar(vbar), .beta0(beta0));

  task automatic expect_eq(input float32_t got, input float32_t exp_v);
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL tbar=%h beta1=%h vbar=%h: got %h expected %h",
                                  tbar, beta1, vbar, got, exp_v);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tbar = r2f(4.0); beta1 = r2f(0.5); vbar = r2f(3.0);
    #1 expect_eq(beta0, r2f(1.0));
    for (int i = 0; i < 3000; i++) begin
      tbar = rnd(130, 6); beta1 = rnd(125, 6); vbar = rnd(127, 6);
      #1 expect_eq(beta0, f32_ref_pkg::sub(vbar, mul(beta1, tbar)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
