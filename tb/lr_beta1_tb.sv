// lr_beta1_tb -- checks the slope block for M = 3 (TS = 1) and M = 6
// (TS = 0.5). Each random window is compared bit for bit with a reference
// that forms (v - vbar) * (M/2 - j) * TS per tap, sums left to right and
// scales by 1 / sum((M/2 - j) * TS)^2. An exact straight line must also
// give back its slope.
module lr_beta1_tb;
  import fp32_pkg::*;
  import f32_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  float32_t va [4], vb [7];
  float32_t vbar_a, vbar_b, b1a, b1b;

  lr_beta1 #(.M(3), .TS(1.0)) dut_a (.v(va), .vbar(vbar_a), .beta1(b1a));
  lr_beta1 #(.M(6), .TS(0.5)) dut_b (.v(vb), .vbar(vbar_b), .beta1(b1b));

  function automatic float32_t ref_beta1(input float32_t v [], input int m, input real ts,
                                         input float32_t vbar);
    float32_t p [];
    real den;
    den = 0.0;
    p = new[m+1];
    for (int j = 0; j <= m; j++) begin
      p[j] = mul(f32_ref_pkg::sub(v[j], vbar), r2f((real'(m) / 2.0 - real'(j)) * ts));
      den += ((real'(m) / 2.0 - real'(j)) * ts) ** 2;
    end
    return mul(csum(p, m + 1), r2f(1.0 / den));
  endfunction

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
    // v(n-j) = 10 - 2j on unit spacing: slope +2 (newest sample is largest)
    va = '{r2f(10.0), r2f(8.0), r2f(6.0), r2f(4.0)};
    vbar_a = r2f(7.0);
    #1 expect_eq(b1a, r2f(2.0), "line slope 2");
    for (int i = 0; i < 2000; i++) begin
      for (int k = 0; k < 4; k++) va[k] = rnd(127, 4);
      for (int k = 0; k < 7; k++) vb[k] = rnd(127, 4);
      vbar_a = rnd(127, 2);
      vbar_b = rnd(127, 2);
      #1;
      v = new[4];
      for (int k = 0; k < 4; k++) v[k] = va[k];
      expect_eq(b1a, ref_beta1(v, 3, 1.0, vbar_a), "M=3");
      v = new[7];
      for (int k = 0; k < 7; k++) v[k] = vb[k];
      expect_eq(b1b, ref_beta1(v, 6, 0.5, vbar_b), "M=6");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
