// prediction_module_tb -- checks one prediction module at a reduced,
// non-default configuration (NI = 2 channels, regression window M = 1 with
// time spacing TS = 0.5, linear output neuron) against the reference
// models, one clock after every accepted sample, with random idle cycles.
// The window filling after M+1 samples and the independence of the
// channels (different signals per channel) are checked along the way.
module prediction_module_tb;
  import fp32_pkg::*;
  import f32_ref_pkg::*;
  import mlp_ref_pkg::*;
  import lr_ref_pkg::*;

  localparam int NI = 2, T = 14, W = 10, M = 1;
  localparam real TS = 0.5;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, in_valid, lr_valid;
  float32_t t_in [NI], v_f32 [NI], t_pred [NI], lr_vhat [NI];
  logic signed [T-1:0] v_fx [NI], mlp_vhat [NI], mlp_err [NI], rmlp_vhat [NI], rmlp_err [NI];

  prediction_module #(.NI(NI), .M(M), .TS(TS), .OUT_RELU(1'b0)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .t_in(t_in), .v_f32(v_f32),
    .t_pred(t_pred), .lr_vhat(lr_vhat), .lr_valid(lr_valid), .v_fx(v_fx),
    .mlp_vhat(mlp_vhat), .mlp_err(mlp_err), .rmlp_vhat(rmlp_vhat), .rmlp_err(rmlp_err));

  lr_model  lrm [NI];
  mlp_model mm [NI], rm [NI];

  task automatic cmp(input longint got, input longint exp_v, input string what);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp_v);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real x;
    for (int c = 0; c < NI; c++) begin
      lrm[c] = new(M, TS);
      mm[c]  = new(T, W, 4, 4, 1'b0, 1'b0, 0.008, 0.0);
      rm[c]  = new(T, W, 4, 4, 1'b1, 1'b0, 0.008, 0.0);
      t_in[c] = '0; v_f32[c] = '0; t_pred[c] = '0; v_fx[c] = '0;
    end
    rst_n = 1'b0; in_valid = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      for (int c = 0; c < NI; c++) begin
        x = (c == 0) ? 0.9 * $sin(0.04 * n) : 0.5 + 0.25 * $cos(0.09 * n);
        t_in[c]   = r2f(TS * n);
        v_f32[c]  = r2f(x);
        t_pred[c] = r2f(TS * (n + 1));
        v_fx[c]   = T'(longint'($floor(x * 1024.0)));
      end
      in_valid = 1'b1;
      @(posedge clk);
      for (int c = 0; c < NI; c++) begin
        lrm[c].push(t_in[c], v_f32[c]);
        mm[c].step(v_fx[c]);
        rm[c].step(v_fx[c]);
      end
      @(negedge clk);
      in_valid = 1'b0;
      if ($urandom_range(0, 3) == 0) @(negedge clk);
      #1;
      cmp(lr_valid, lrm[0].valid(), "lr_valid");
      for (int c = 0; c < NI; c++) begin
        if (lrm[c].valid()) cmp(lr_vhat[c], lrm[c].predict(t_pred[c]), "lr_vhat");
        cmp(mlp_vhat[c], mm[c].yhat, "mlp_vhat");
        cmp(mlp_err[c], mm[c].err, "mlp_err");
        cmp(rmlp_vhat[c], rm[c].yhat, "rmlp_vhat");
        cmp(rmlp_err[c], rm[c].err, "rmlp_err");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
