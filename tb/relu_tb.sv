// relu_tb -- checks y = max(0, x) and the derivative flag on boundary and
// random values of a 14-bit signed word.
module relu_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic signed [13:0] x, y;
  logic active;

  relu #(.T(14)) dut (.x(x), .y(y), .active(active));

  task automatic try(input logic signed [13:0] xv);
    x = xv;
    #1;
    checks++;
    if (y !== ((xv > 0) ? xv : 14'sd0) || active !== (xv > 0)) begin
      failures++;
      if (failures < 10) $display("FAIL x=%0d y=%0d active=%b", xv, y, active);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    try(14'sd0); try(14'sd1); try(-14'sd1); try(14'sd8191); try(-14'sd8192);
    for (int i = 0; i < 1000; i++) try(14'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
