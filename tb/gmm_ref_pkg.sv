// gmm_ref_pkg: reference arithmetic for the GMM accelerator testbenches.
//
// Works the expected values out with plain 64-bit integer arithmetic, from
// the formula rather than from the RTL's pipeline: the term of one
// coefficient is (prec * (o - mu)^2) >> shift, a mixture scores
// g_m - sum of its terms (saturated to 32-bit signed), and a state scores
// the maximum over its mixtures.
package gmm_ref_pkg;

  function automatic longint ref_term(int o, int mu, int prec, int shift);
    longint diff = longint'(o) - longint'(mu);
    return (diff * diff * longint'(prec)) >>> shift;
  endfunction

  function automatic int sat32(longint v);
    if (v > 64'sd2147483647)  return 32'sh7fffffff;
    if (v < -64'sd2147483648) return 32'sh80000000;
    return int'(v);
  endfunction

  // State score from flat arrays: mean/prec indexed [m*D + d].
  function automatic int ref_state(int D, int M, int shift,
                                   const ref int o[], const ref int mu[],
                                   const ref int prec[], const ref int gc[]);
    int best = 0;
    for (int m = 0; m < M; m++) begin
      longint acc = 0;
      int s;
      for (int d = 0; d < D; d++) acc += ref_term(o[d], mu[m*D+d], prec[m*D+d], shift);
      s = sat32(longint'(gc[m]) - acc);
      if (m == 0 || s > best) best = s;
    end
    return best;
  endfunction

  // Index of the winning mixture, for coverage.
  function automatic int ref_best_mix(int D, int M, int shift,
                                      const ref int o[], const ref int mu[],
                                      const ref int prec[], const ref int gc[]);
    int best = 0, arg = 0;
    for (int m = 0; m < M; m++) begin
      longint acc = 0;
      int s;
      for (int d = 0; d < D; d++) acc += ref_term(o[d], mu[m*D+d], prec[m*D+d], shift);
      s = sat32(longint'(gc[m]) - acc);
      if (m == 0 || s > best) begin best = s; arg = m; end
    end
    return arg;
  endfunction

endpackage
