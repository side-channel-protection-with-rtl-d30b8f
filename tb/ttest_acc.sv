// ttest_acc: Welch t-test accumulator for simulated leakage traces.
//
// Collects traces of up to NS samples into two groups (group 0 and group 1)
// as running sums and sums of squares per sample, and reports per sample
//   t = (mu1 - mu0) / sqrt(var1/n1 + var0/n0)
// with unbiased sample variances. A sample whose two groups both have zero
// variance yields t = 0 if the means agree and +/-1e9 otherwise. Used only by
// the testbenches; not synthesizable.
module ttest_acc #(
  parameter int NS = 512
) ();
  real s [2][NS];
  real q [2][NS];
  int  n [2];

  function automatic void clear();
    for (int g = 0; g < 2; g++) begin
      n[g] = 0;
      for (int i = 0; i < NS; i++) begin s[g][i] = 0.0; q[g][i] = 0.0; end
    end
  endfunction

  function automatic void add_sample(input int g, input int i, input real v);
    s[g][i] += v;
    q[g][i] += v * v;
  endfunction

  function automatic void end_trace(input int g);
    n[g]++;
  endfunction

  function automatic real t_at(input int i);
    real m0, m1, v0, v1, den;
    m0 = s[0][i] / n[0];
    m1 = s[1][i] / n[1];
    v0 = (q[0][i] - n[0] * m0 * m0) / (n[0] - 1);
    v1 = (q[1][i] - n[1] * m1 * m1) / (n[1] - 1);
    if (v0 < 0.0) v0 = 0.0;
    if (v1 < 0.0) v1 = 0.0;
    den = v1 / n[1] + v0 / n[0];
    if (den <= 1.0e-12) return (m1 == m0) ? 0.0 : ((m1 > m0) ? 1.0e9 : -1.0e9);
    return (m1 - m0) / $sqrt(den);
  endfunction

  function automatic real max_abs_t(input int ns_used);
    real mx, t;
    mx = 0.0;
    for (int i = 0; i < ns_used; i++) begin
      t = t_at(i);
      if (t < 0.0) t = -t;
      if (t > mx) mx = t;
    end
    return mx;
  endfunction
endmodule
