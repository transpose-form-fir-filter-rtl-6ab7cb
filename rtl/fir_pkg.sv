// fir_pkg: constants and elaboration-time helper functions shared by the
// block transpose-form FIR filters.
//
// The block filters process L input samples per clock. A block of inputs
// x_k = {x(Lk), x(Lk-1), ..., x(Lk-L+1)} together with the last L-1 samples of
// the previous block gives the 2L-1 samples x(Lk-s), s = 0..2L-2, that fill
// the L x L input matrix S_k[l][j] = x(Lk-l-j). With N taps split into
// M = ceil(N/L) short weight vectors c_m[j] = h(mL+j), the partial output
// block is r_k^m[l] = sum_j S_k[l][j] c_m[j] and the filter output is
// y_k = r_k^0 + r_{k-1}^1 + ... + r_{k-M+1}^{M-1}.
//
// For the multiplierless (MCM) fixed filter every sample x(Lk-s) is
// multiplied by the coefficients h(mL+j) with l+j = s, for every m. The
// functions below enumerate those products: sample s meets
// mcm_nj(s) values of j, so its MCM unit is M*mcm_nj(s) wide (4, 8, 12, 16,
// 12, 8, 4 for L = 4, N = 16). Products are numbered globally, sample by
// sample, starting at mcm_offset(s); inside sample s, product
// t = m*mcm_nj(s) + (j - mcm_jlo(s)) is x(Lk-s) * h(mL+j).
//
// csd_digit gives the canonical signed digit recoding of a constant, used
// to build the shift-and-add networks of the MCM units.
package fir_pkg;

  // Number of short weight vectors: ceil(n / l).
  function automatic int num_vec(int n, int l);
    return (n + l - 1) / l;
  endfunction

  // Lowest column index j of S_k that holds sample s.
  function automatic int mcm_jlo(int s, int l);
    return (s > l - 1) ? s - l + 1 : 0;
  endfunction

  // Number of columns j of S_k that hold sample s.
  function automatic int mcm_nj(int s, int l);
    int a;
    int b;
    a = s;
    b = 2 * l - 2 - s;
    return ((a < b) ? a : b) + 1;
  endfunction

  // Width (number of constant products) of the MCM unit of sample s.
  function automatic int mcm_width(int s, int l, int m);
    return m * mcm_nj(s, l);
  endfunction

  // Index of the first product of sample s in the global product vector.
  function automatic int mcm_offset(int s, int l, int m);
    int off;
    off = 0;
    for (int i = 0; i < s; i++) off += mcm_width(i, l, m);
    return off;
  endfunction

  // Coefficient index mL+j of product t of sample s.
  function automatic int mcm_coef_index(int s, int t, int l);
    int nj;
    nj = mcm_nj(s, l);
    return (t / nj) * l + mcm_jlo(s, l) + (t % nj);
  endfunction

  // Canonical signed digit b (-1, 0 or +1) of constant c.
  function automatic int csd_digit(int c, int b);
    int n;
    int d;
    n = c;
    d = 0;
    for (int p = 0; p <= b; p++) begin
      if ((n & 1) != 0) d = ((n & 3) == 1) ? 1 : -1;
      else d = 0;
      n = (n - d) >>> 1;
    end
    return d;
  endfunction

endpackage
