// fp32_mul_tb -- self-checking testbench of the single-precision multiplier.
// Random normal operands are compared bit for bit with the correctly
// rounded product from f32_ref_pkg; special cases (zeros, infinities, NaN,
// overflow, flush to zero, exact values) are checked against fixed results.
module fp32_mul_tb;
  import fp32_pkg::*;
  import f32_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  float32_t a, b, y;

  fp32_mul dut (.a(a), .b(b), .y(y));

  task automatic check(input float32_t ea, input float32_t eb, input float32_t exp_y);
    a = ea; b = eb;
    #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h = %h, expected %h", ea, eb, y, exp_y);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    float32_t ra, rb;
    check(32'h3fc0_0000, 32'h3fc0_0000, 32'h4010_0000);  // 1.5*1.5 = 2.25
    check(32'hc000_0000, 32'h4040_0000, 32'hc0c0_0000);  // -2*3 = -6
    check(32'h3f80_0000, 32'h0000_0000, 32'h0000_0000);  // 1*0
    check(32'hbf80_0000, 32'h0000_0000, 32'h8000_0000);  // -1*0 = -0
    check(32'h7f80_0000, 32'h0000_0000, F32_QNAN);       // inf*0
    check(32'h7f80_0000, 32'hc000_0000, 32'hff80_0000);  // inf*-2
    check(32'h7fc0_0001, 32'h3f80_0000, F32_QNAN);       // NaN
    check(32'h7100_0000, 32'h7100_0000, 32'h7f80_0000);  // overflow
    check(32'h0d00_0000, 32'h0d00_0000, 32'h0000_0000);  // underflow flush
    check(32'h0000_0001, 32'h3f80_0000, 32'h0000_0000);  // subnormal input
    check(32'h3f80_0003, 32'h3fc0_0000, 32'h3fc0_0004);  // exact tie, rounds down to even
    check(32'h3f80_0001, 32'h3fc0_0000, 32'h3fc0_0002);  // exact tie, rounds up to even
    for (int i = 0; i < 500; i++) begin
      // (1 + k*2^-23) * 1.5 with odd k is always an exact tie
      ra = {1'b0, 8'd127, 22'($urandom), 1'b1};
      check(ra, 32'h3fc0_0000, mul(ra, 32'h3fc0_0000));
    end
    for (int i = 0; i < 5000; i++) begin
      ra = rnd(127, 40);
      rb = rnd(127, 40);
      check(ra, rb, mul(ra, rb));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
