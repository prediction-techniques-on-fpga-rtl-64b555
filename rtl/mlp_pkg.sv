// mlp_pkg -- constants and elaboration-time helpers shared by the
// fixed-point MLP-BP and RMLP-BP predictors.
//
// Numbers are signed fixed point [sT.W]: T bits in all, of which W are
// fractional and one is the sign, so the integer part has T-W-1 bits.
// The default format is 14.10. The network has B inputs, H hidden neurons
// and one output (4-4-1). Every neuron has a bias input whose value is
// BIAS_IN = -1, so that weight 0 of each neuron enters the sum with a minus
// sign, x = sum_j w_j*y_j - w_0.
//
// The reset values of the weights are not given by the source description;
// init_w1 / init_w2 give a small positive, non-symmetric pattern (hidden
// weights 0.125..0.3125, zero biases, output weights 0.25) chosen here so
// that every ReLU starts active for positive input signals.
package mlp_pkg;


  // real -> fixed point with W fractional bits, rounded to nearest
  function automatic longint real_to_fxp(input real r, input int w);
    real s;
    s = r * (2.0 ** w);
    return (s >= 0.0) ? longint'($floor(s + 0.5)) : -longint'($floor(-s + 0.5));
  endfunction

  // reset value of hidden weight j (0 = bias) of hidden neuron i
  function automatic longint init_w1(input int i, input int j, input int w);
    if (j == 0) return 0;
    return real_to_fxp(0.125 + 0.0625 * real'((i + j) % 4), w);
  endfunction

  // reset value of output weight j (0 = bias)
  function automatic longint init_w2(input int j, input int w);
    if (j == 0) return 0;
    return real_to_fxp(0.25, w);
  endfunction

endpackage
