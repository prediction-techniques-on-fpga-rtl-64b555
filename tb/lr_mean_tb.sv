// lr_mean_tb -- checks the window mean (cascading sum times the rounded
// constant 1/N) bit for bit, for N = 2 and N = 4, plus exact small cases.
module lr_mean_tb;
  import fp32_pkg::*;
  import f32_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  float32_t x2 [2], x4 [4];
  float32_t m2, m4;

  lr_mean #(.N(2)) dut2 (.x(x2), .mean(m2));
  lr_mean #(.N(4)) dut4 (.x(x4), .mean(m4));

  task automatic expect_eq(input float32_t got, input float32_t exp_v, input string what);
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp_v);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    float32_t v [];
    x4 = '{32'h3f80_0000, 32'h4000_0000, 32'h4040_0000, 32'h4080_0000};
    x2 = '{32'h4000_0000, 32'h4080_0000};
    #1;
    expect_eq(m4, 32'h4020_0000, "mean(1,2,3,4) = 2.5");
    expect_eq(m2, 32'h4040_0000, "mean(2,4) = 3");
    for (int i = 0; i < 2000; i++) begin
      for (int k = 0; k < 2; k++) x2[k] = rnd(127, 8);
      for (int k = 0; k < 4; k++) x4[k] = rnd(127, 8);
      #1;
      v = new[2];
      for (int k = 0; k < 2; k++) v[k] = x2[k];
      expect_eq(m2, mul(csum(v, 2), r2f(0.5)), "N=2");
      v = new[4];
      for (int k = 0; k < 4; k++) v[k] = x4[k];
      expect_eq(m4, mul(csum(v, 4), r2f(0.25)), "N=4");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
