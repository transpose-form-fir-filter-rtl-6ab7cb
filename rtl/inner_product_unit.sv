// inner_product_unit (IPU): one short-weight inner-product unit of the
// reconfigurable block FIR.
//
// Computes the matrix-vector product of the L x L input matrix
// S_k[l][j] = x(Lk-l-j) with one short weight vector c[j] = h(mL+j):
//   r[l] = sum_{j=0}^{L-1} x(Lk-l-j) * c[j],   l = 0..L-1,
// i.e. L partial outputs of the filter, using L*L general multipliers
// (coefficients are run-time values, so no constant multiplication applies).
// The input is the 2L-1 distinct samples smp[s] = x(Lk-s) from the register
// unit; row l of S_k is smp[l +: L].
//
// Purely combinational. Products and sums are formed in OW bits, two's
// complement, so results are exact modulo 2^OW (wrap-around on overflow),
// the same convention as the rest of the filter; the article names the unit
// and its function, the arithmetic width and overflow rule are this design's.
module inner_product_unit #(
  parameter int L  = 4,   // block size
  parameter int W  = 8,   // sample width
  parameter int CW = 8,   // coefficient width
  parameter int OW = 16   // result width
) (
  input  logic signed [W-1:0]  smp [2*L-1],
  input  logic signed [CW-1:0] c   [L],
  output logic signed [OW-1:0] r   [L]
);

  always_comb begin
    for (int l = 0; l < L; l++) begin
      r[l] = '0;
      for (int j = 0; j < L; j++)
        r[l] = r[l] + OW'(OW'(smp[l+j]) * OW'(c[j]));
    end
  end

endmodule
