// fp32_add_tb -- self-checking testbench of the single-precision adder /
// subtractor. Random normal operands (near exponents, far exponents, and
// nearly equal values to exercise cancellation) are compared bit for bit
// with the correctly rounded result from f32_ref_pkg, for both addition and
// subtraction; special cases are checked against fixed results.
module fp32_add_tb;
  import fp32_pkg::*;
  import f32_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  float32_t a, b, y;
  logic sub;

  fp32_add dut (.a(a), .b(b), .sub(sub), .y(y));

  task automatic check(input float32_t ea, input float32_t eb, input logic es,
                       input float32_t exp_y);
    a = ea; b = eb; sub = es;
    #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("FAIL %h %s %h = %h, expected %h", ea, es ? "-" : "+", eb, y, exp_y);
    end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    float32_t ra, rb;
    logic s;
    check(32'h3f80_0000, 32'h3f80_0000, 1'b0, 32'h4000_0000); // 1+1
    check(32'h4040_0000, 32'h3f80_0000, 1'b1, 32'h4000_0000); // 3-1
    check(32'h3f80_0000, 32'h3f80_0000, 1'b1, 32'h0000_0000); // 1-1 = +0
    check(32'h3f80_0000, 32'h3380_0000, 1'b0, 32'h3f80_0000); // 1+2^-24 ties to even
    check(32'h3f80_0001, 32'h3380_0000, 1'b0, 32'h3f80_0002); // tie rounds up to even
    check(32'h0000_0000, 32'hc000_0000, 1'b0, 32'hc000_0000); // 0 + -2
    check(32'h4000_0000, 32'h0000_0000, 1'b1, 32'h4000_0000); // 2 - 0
    check(32'h7f80_0000, 32'h7f80_0000, 1'b1, F32_QNAN);      // inf - inf
    check(32'h7f80_0000, 32'h3f80_0000, 1'b0, 32'h7f80_0000); // inf + 1
    check(32'h7f7f_ffff, 32'h7f7f_ffff, 1'b0, 32'h7f80_0000); // overflow
    check(32'h0080_0001, 32'h0080_0000, 1'b1, 32'h0000_0000); // flush to zero
    for (int i = 0; i < 6000; i++) begin
      s = 1'($urandom);
      case (i % 3)
        0: begin ra = rnd(127, 10); rb = rnd(127, 10); end
        1: begin ra = rnd(127, 3);  rb = rnd(110, 8);  end
        default: begin
          ra = rnd(127, 5);
          rb = {ra[31] ^ 1'($urandom), ra[30:23], ra[22:0] ^ 23'($urandom_range(0, 255))};
        end
      endcase
      if (i % 2 == 1) begin float32_t tmp; tmp = ra; ra = rb; rb = tmp; end
      check(ra, rb, s, s ? f32_ref_pkg::sub(ra, rb) : f32_ref_pkg::add(ra, rb));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
