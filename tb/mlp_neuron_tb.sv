// mlp_neuron_tb -- checks the neuron sum x = w0*(-1) + sum w[j]*y[j-1] in
// [s14.10] against the reference model, for random operands, for operands
// large enough to saturate, and for a hand-worked case.
module mlp_neuron_tb;
  import mlp_ref_pkg::*;
  localparam int T = 14, W = 10;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic signed [T-1:0] y [4], w [5], x;
  logic signed [T-1:0] bias;

  mlp_neuron #(.N_IN(4), .T(T), .W(W)) dut (.y(y), .bias(bias), .w(w), .x(x));

  function automatic longint ref_x();
    longint acc;
    acc = fmul(w[0], bias, T, W);
    for (int j = 0; j < 4; j++) acc += fmul(w[j+1], y[j], T, W);
    return sat(acc, T);
  endfunction

  task automatic chk(input longint exp_v);
    #1;
    checks++;
    if (longint'(x) != exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL x=%0d expected %0d", x, exp_v);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bias = -14'sd1024;
    // 0.5*1 + 0.25*2 + 1*(-1) + 0*0 - 0.5 = -0.5
    w = '{14'sd512, 14'sd512, 14'sd256, 14'sd1024, 14'sd0};
    y = '{14'sd1024, 14'sd2048, -14'sd1024, 14'sd0};
    chk(-512);
    for (int i = 0; i < 3000; i++) begin
      for (int j = 0; j < 5; j++) w[j] = 14'($signed(12'($urandom)));
      for (int j = 0; j < 4; j++) y[j] = (i % 4 == 0) ? 14'($urandom) : 14'($signed(12'($urandom)));
      chk(ref_x());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
