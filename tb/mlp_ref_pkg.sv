// mlp_ref_pkg -- bit-accurate software model of the fixed-point MLP-BP and
// RMLP-BP predictors, used by the testbenches as the expected behaviour.
//
// Arithmetic rules modelled: signed [sT.W] words; a product keeps
// floor(a*b / 2^W) and saturates to T bits; neuron sums, hidden errors and
// weight updates are computed exactly and saturated once; the bias input
// is -1.0. The reset weight pattern is restated here from its definition
// (hidden 0.125 + 0.0625*((i+j) mod 4), biases 0, output 0.25).
package mlp_ref_pkg;

  function automatic longint sat(input longint x, input int t);
    longint hi, lo;
    hi = (64'sd1 <<< (t - 1)) - 1;
    lo = -(64'sd1 <<< (t - 1));
    if (x > hi) return hi;
    if (x < lo) return lo;
    return x;
  endfunction

  function automatic longint fmul(input longint a, input longint b, input int t, input int w);
    longint p, q;
    p = a * b;
    q = p / (64'sd1 <<< w);
    if (p < 0 && q * (64'sd1 <<< w) != p) q = q - 1;   // floor
    return sat(q, t);
  endfunction

  // sign-extend a T-bit pattern held in a longint
  function automatic longint sx(input longint x, input int t);
    longint m;
    m = (64'sd1 <<< t) - 1;
    x = x & m;
    if (x >= (64'sd1 <<< (t - 1))) x = x - (64'sd1 <<< t);
    return x;
  endfunction

  class mlp_model;
    int t, w, b, h;
    bit recurrent, out_relu;
    longint eta, alpha, bias_in;
    longint w1 [][], w2 [], w1p [][], w2p [];
    longint taps [];
    longint fb;
    // values of the last forward pass
    longint x_in [], y1 [], yhat, err;

    function new(int t_, int w_, int b_, int h_, bit rec_, bit orelu_, real eta_r, real alpha_r);
      t = t_; w = w_; b = b_; h = h_; recurrent = rec_; out_relu = orelu_;
      eta   = longint'($floor(eta_r * (2.0 ** w) + 0.5));
      alpha = longint'($floor(alpha_r * (2.0 ** w) + 0.5));
      bias_in = -(64'sd1 <<< w);
      w1 = new[h]; w1p = new[h];
      for (int i = 0; i < h; i++) begin
        w1[i] = new[b+1]; w1p[i] = new[b+1];
        for (int j = 0; j <= b; j++) begin
          w1[i][j] = (j == 0) ? 0 : longint'($floor((0.125 + 0.0625 * ((i + j) % 4)) * (2.0 ** w) + 0.5));
          w1p[i][j] = w1[i][j];
        end
      end
      w2 = new[h+1]; w2p = new[h+1];
      for (int j = 0; j <= h; j++) begin
        w2[j] = (j == 0) ? 0 : longint'($floor(0.25 * (2.0 ** w) + 0.5));
        w2p[j] = w2[j];
      end
      taps = new[b];
      foreach (taps[k]) taps[k] = 0;
      fb = 0; err = 0;
      x_in = new[b]; y1 = new[h];
      void'(forward());
    endfunction

    function automatic longint neuron(longint ins [], longint ws [], int n);
      longint acc;
      acc = fmul(ws[0], bias_in, t, w);
      for (int j = 0; j < n; j++) acc += fmul(ws[j+1], ins[j], t, w);
      return sat(acc, t);
    endfunction

    function automatic longint forward();
      longint x2;
      for (int k = 0; k < b; k++)
        x_in[k] = recurrent ? ((k == 0) ? fb : taps[k-1]) : taps[k];
      for (int i = 0; i < h; i++) begin
        y1[i] = neuron(x_in, w1[i], b);
        if (y1[i] < 0) y1[i] = 0;
      end
      x2 = neuron(y1, w2, h);
      yhat = (out_relu && x2 < 0) ? 0 : x2;
      return yhat;
    endfunction

    function automatic longint upd(longint wv, longint wpv, longint d, longint y);
      return sat(wv + fmul(eta, fmul(d, y, t, w), t, w) + fmul(alpha, wpv, t, w), t);
    endfunction

    // one accepted sample: train on it, then shift it in
    function automatic void step(longint v);
      longint d2, d1 [], nw1 [][], nw2 [];
      void'(forward());
      err = sat(v - yhat, t);
      d2 = (out_relu && yhat <= 0) ? 0 : err;
      d1 = new[h];
      for (int i = 0; i < h; i++) d1[i] = (y1[i] > 0) ? sat(fmul(w2[i+1], d2, t, w), t) : 0;
      nw2 = new[h+1];
      for (int j = 0; j <= h; j++)
        nw2[j] = upd(w2[j], w2p[j], d2, (j == 0) ? bias_in : y1[j-1]);
      nw1 = new[h];
      for (int i = 0; i < h; i++) begin
        nw1[i] = new[b+1];
        for (int j = 0; j <= b; j++)
          nw1[i][j] = upd(w1[i][j], w1p[i][j], d1[i], (j == 0) ? bias_in : x_in[j-1]);
      end
      for (int i = 0; i < h; i++) for (int j = 0; j <= b; j++) w1p[i][j] = w1[i][j];
      for (int j = 0; j <= h; j++) w2p[j] = w2[j];
      for (int i = 0; i < h; i++) for (int j = 0; j <= b; j++) w1[i][j] = nw1[i][j];
      for (int j = 0; j <= h; j++) w2[j] = nw2[j];
      if (recurrent) fb = yhat;
      for (int k = b - 1; k > 0; k--) taps[k] = taps[k-1];
      taps[0] = v;
      void'(forward());
    endfunction
  endclass

endpackage
