// lr_cascade_sum_tb -- checks the cascading sum for N = 1, 4 and 10 terms
// against a left-to-right reference sum rounded after every addition.
module lr_cascade_sum_tb;
  import fp32_pkg::*;
  import f32_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  float32_t x1 [1], x4 [4], x10 [10];
  float32_t s1, s4, s10;

  lr_cascade_sum #(.N(1))  dut1  (.x(x1),  .sum(s1));
  lr_cascade_sum #(.N(4))  dut4  (.x(x4),  .sum(s4));
  lr_cascade_sum #(.N(10)) dut10 (.x(x10), .sum(s10));

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
    // 1+2+3+4 = 10
    x4 = '{32'h3f80_0000, 32'h4000_0000, 32'h4040_0000, 32'h4080_0000};
    #1 expect_eq(s4, 32'h4120_0000, "1+2+3+4");
    for (int i = 0; i < 2000; i++) begin
      x1[0] = rnd(127, 20);
      for (int k = 0; k < 4; k++)  x4[k]  = rnd(127, 6);
      for (int k = 0; k < 10; k++) x10[k] = rnd(127, 6);
      #1;
      expect_eq(s1, x1[0], "N=1");
      v = new[4];
      for (int k = 0; k < 4; k++) v[k] = x4[k];
      expect_eq(s4, csum(v, 4), "N=4");
      v = new[10];
      for (int k = 0; k < 10; k++) v[k] = x10[k];
      expect_eq(s10, csum(v, 10), "N=10");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
