// tactile_prediction_top_tb -- end-to-end test of the whole prediction
// hardware at its default size (NI = 3 channels per side, M = 3,
// s14.10, 4-4-1 networks), with the master and slave sides fed with
// different three-joint trajectories at different moments.
//
// Each side gets a stream of samples, one per clock when valid; every
// channel's linear-regression, MLP-BP and RMLP-BP outputs are compared bit
// for bit with the reference models one clock after each sample. The
// mechanisms of the design are counted and each must occur at least once:
// regression window filling (lr_valid rising), online weight updates
// (non-zero error), recurrent feedback of a non-zero prediction, inactive
// hidden ReLUs, idle cycles that must hold every output, and samples
// accepted by one side while the other is idle.
module tactile_prediction_top_tb;
  import fp32_pkg::*;
  import f32_ref_pkg::*;
  import mlp_ref_pkg::*;
  import lr_ref_pkg::*;

  localparam int NI = 3, T = 14, W = 10, M = 3;
  localparam int NSAMP = 1500;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n;
  logic     valid [2];
  float32_t t_in [2][NI], v_f32 [2][NI], t_pred [2][NI], lr_vhat [2][NI];
  logic     lr_valid [2];
  logic signed [T-1:0] v_fx [2][NI], mlp_vhat [2][NI], mlp_err [2][NI];
  logic signed [T-1:0] rmlp_vhat [2][NI], rmlp_err [2][NI];

  tactile_prediction_top dut (
    .clk(clk), .rst_n(rst_n),
    .mpd_valid(valid[0]), .mpd_t_in(t_in[0]), .mpd_v_f32(v_f32[0]), .mpd_t_pred(t_pred[0]),
    .mpd_lr_vhat(lr_vhat[0]), .mpd_lr_valid(lr_valid[0]), .mpd_v_fx(v_fx[0]),
    .mpd_mlp_vhat(mlp_vhat[0]), .mpd_mlp_err(mlp_err[0]),
    .mpd_rmlp_vhat(rmlp_vhat[0]), .mpd_rmlp_err(rmlp_err[0]),
    .spd_valid(valid[1]), .spd_t_in(t_in[1]), .spd_v_f32(v_f32[1]), .spd_t_pred(t_pred[1]),
    .spd_lr_vhat(lr_vhat[1]), .spd_lr_valid(lr_valid[1]), .spd_v_fx(v_fx[1]),
    .spd_mlp_vhat(mlp_vhat[1]), .spd_mlp_err(mlp_err[1]),
    .spd_rmlp_vhat(rmlp_vhat[1]), .spd_rmlp_err(rmlp_err[1])
  );

  lr_model  lrm [2][NI];
  mlp_model mm  [2][NI];
  mlp_model rm  [2][NI];
  int       nsent [2];
  real      phase [2][NI];

  // mechanism counters
  int n_window_full, n_update, n_feedback, n_relu_off, n_idle_hold, n_one_side;

  task automatic cmp(input longint got, input longint exp_v, input string what);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp_v);
    end
  endtask

  // joint-angle-like signals; channel 2 swings through zero
  function automatic real traj(int side, int c, real ph);
    case (c)
      0: return 1.0 + 0.5 * $sin(ph) + 0.1 * $sin(3.3 * ph);
      1: return 0.6 + 0.3 * $cos(0.7 * ph + side);
      default: return 0.7 * $sin(0.5 * ph + 0.3 * side);
    endcase
  endfunction

  task automatic drive(int side);
    real x;
    for (int c = 0; c < NI; c++) begin
      phase[side][c] += 0.02 + 0.005 * c + 0.01 * side;
      x = traj(side, c, phase[side][c]);
      t_in[side][c]   = r2f(real'(nsent[side]));
      v_f32[side][c]  = r2f(x);
      t_pred[side][c] = r2f(real'(nsent[side] + 1));
      v_fx[side][c]   = T'(longint'($floor(x * 1024.0)));
    end
  endtask

  task automatic model_step(int side);
    for (int c = 0; c < NI; c++) begin
      lrm[side][c].push(t_in[side][c], v_f32[side][c]);
      mm[side][c].step(v_fx[side][c]);
      rm[side][c].step(v_fx[side][c]);
      if (mm[side][c].err != 0) n_update++;
      if (rm[side][c].fb != 0) n_feedback++;
      foreach (mm[side][c].y1[i]) if (mm[side][c].y1[i] == 0) n_relu_off++;
    end
    nsent[side]++;
  endtask

  task automatic check_side(int side);
    for (int c = 0; c < NI; c++) begin
      cmp(lr_valid[side], lrm[side][c].valid(), "lr_valid");
      if (lrm[side][c].valid()) cmp(lr_vhat[side][c], lrm[side][c].predict(t_pred[side][c]), "lr_vhat");
      cmp(mlp_vhat[side][c], mm[side][c].yhat, "mlp_vhat");
      cmp(mlp_err[side][c], mm[side][c].err, "mlp_err");
      cmp(rmlp_vhat[side][c], rm[side][c].yhat, "rmlp_vhat");
      cmp(rmlp_err[side][c], rm[side][c].err, "rmlp_err");
    end
  endtask

  initial begin
    repeat (6 * NSAMP + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic go [2];
    logic was_valid;
    logic signed [T-1:0] hold;
    n_window_full = 0; n_update = 0; n_feedback = 0; n_relu_off = 0;
    n_idle_hold = 0; n_one_side = 0;
    for (int s = 0; s < 2; s++) begin
      nsent[s] = 0; valid[s] = 1'b0;
      for (int c = 0; c < NI; c++) begin
        lrm[s][c] = new(M, 1.0);
        mm[s][c]  = new(T, W, 4, 4, 1'b0, 1'b1, 0.008, 0.0);
        rm[s][c]  = new(T, W, 4, 4, 1'b1, 1'b1, 0.008, 0.0);
        phase[s][c] = 0.0;
        t_in[s][c] = '0; v_f32[s][c] = '0; t_pred[s][c] = '0; v_fx[s][c] = '0;
      end
    end
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    while (nsent[0] < NSAMP || nsent[1] < NSAMP) begin
      @(negedge clk);
      // master side sends 5 of every 6 cycles, slave side 2 of every 3, out of phase
      go[0] = (nsent[0] < NSAMP) && ($urandom_range(0, 5) != 0);
      go[1] = (nsent[1] < NSAMP) && ($urandom_range(0, 2) != 0);
      if (go[0] != go[1]) n_one_side++;
      for (int s = 0; s < 2; s++) begin
        valid[s] = go[s];
        if (go[s]) drive(s);
      end
      @(posedge clk);
      for (int s = 0; s < 2; s++) if (go[s]) begin
        was_valid = lrm[s][0].valid();
        model_step(s);
        if (!was_valid && lrm[s][0].valid()) n_window_full++;
      end
      @(negedge clk);
      for (int s = 0; s < 2; s++) valid[s] = 1'b0;
      #1;
      for (int s = 0; s < 2; s++) check_side(s);
      // an idle cycle now and then: nothing may change
      if ($urandom_range(0, 9) == 0) begin
        hold = rmlp_vhat[0][0];
        @(negedge clk);
        #1;
        cmp(rmlp_vhat[0][0], hold, "hold while idle");
        check_side(0); check_side(1);
        n_idle_hold++;
      end
    end

    $display("mechanisms: window_full=%0d weight_updates=%0d feedback=%0d relu_off=%0d idle=%0d one_side=%0d",
             n_window_full, n_update, n_feedback, n_relu_off, n_idle_hold, n_one_side);
    if (n_window_full < 2) begin failures++; $display("FAIL window filling not seen on both sides"); end
    if (n_update == 0)     begin failures++; $display("FAIL no weight update"); end
    if (n_feedback == 0)   begin failures++; $display("FAIL no recurrent feedback"); end
    if (n_relu_off == 0)   begin failures++; $display("FAIL no inactive ReLU"); end
    if (n_idle_hold == 0)  begin failures++; $display("FAIL no idle cycle"); end
    if (n_one_side == 0)   begin failures++; $display("FAIL sides never independent"); end
    checks += 6;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
