// adder_network: sums the MCM products of the fixed block FIR into the M
// partial-output blocks.
//
// The input is the global product vector of all 2L-1 MCM units (numbered as
// in fir_pkg: products of sample s start at mcm_offset(s)). Output
//   r[m][l] = sum_{j=0}^{L-1} x(Lk-l-j) * h(mL+j)
// picks, for each (m, l, j), the product of sample s = l+j with coefficient
// mL+j; every product is used exactly once. r[m] is the partial result that
// the pipelined adder unit delays by m blocks.
//
// Purely combinational, sums modulo 2^OW. The article names the network and
// its place between the MCM units and the adder unit; the index mapping is
// derived from the block formulation y_k = sum_m S_{k-m} c_m.
module adder_network #(
  parameter int L  = 4,
  parameter int N  = 16,
  parameter int OW = 4,
  parameter int M  = fir_pkg::num_vec(N, L),
  parameter int P  = L * M * L   // total number of products
) (
  input  logic signed [OW-1:0] prod [P],
  output logic signed [OW-1:0] r    [M][L]
);

  // Global index of the product x(Lk-(l+j)) * h(mL+j).
  function automatic int pidx(int m, int l, int j);
    int s;
    s = l + j;
    return fir_pkg::mcm_offset(s, L, M) + m * fir_pkg::mcm_nj(s, L)
           + (j - fir_pkg::mcm_jlo(s, L));
  endfunction

  always_comb begin
    for (int m = 0; m < M; m++)
      for (int l = 0; l < L; l++) begin
        r[m][l] = '0;
        for (int j = 0; j < L; j++) r[m][l] = r[m][l] + prod[pidx(m, l, j)];
      end
  end

endmodule
