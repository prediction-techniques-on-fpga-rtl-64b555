// lr_ref_pkg -- reference model of the linear-regression predictor for the
// system-level testbenches: an (M+1)-sample window and the least-squares
// line computed with f32_ref_pkg in the hardware's order of operations.
package lr_ref_pkg;
  import f32_ref_pkg::*;

  class lr_model;
    int m;
    real ts;
    logic [31:0] tw [], vw [];
    int count;

    function new(int m_, real ts_);
      m = m_; ts = ts_;
      tw = new[m+1]; vw = new[m+1];
      foreach (tw[k]) begin tw[k] = '0; vw[k] = '0; end
      count = 0;
    endfunction

    function automatic void push(logic [31:0] t, logic [31:0] v);
      for (int k = m; k > 0; k--) begin tw[k] = tw[k-1]; vw[k] = vw[k-1]; end
      tw[0] = t; vw[0] = v;
      count++;
    endfunction

    function automatic bit valid();
      return count >= m + 1;
    endfunction

    function automatic logic [31:0] predict(logic [31:0] t_pred);
      logic [31:0] x [];
      logic [31:0] tbar, vbar, b0, b1;
      real den;
      x = new[m+1];
      foreach (x[k]) x[k] = tw[k];
      tbar = mul(csum(x, m + 1), r2f(1.0 / real'(m + 1)));
      foreach (x[k]) x[k] = vw[k];
      vbar = mul(csum(x, m + 1), r2f(1.0 / real'(m + 1)));
      den = 0.0;
      for (int j = 0; j <= m; j++) begin
        x[j] = mul(sub(vw[j], vbar), r2f((real'(m) / 2.0 - real'(j)) * ts));
        den += ((real'(m) / 2.0 - real'(j)) * ts) ** 2;
      end
      b1 = mul(csum(x, m + 1), r2f(1.0 / den));
      b0 = sub(vbar, mul(b1, tbar));
      return add(b0, mul(b1, t_pred));
    endfunction
  endclass
endpackage
