// mcm_unit: multiple constant multiplication of one input sample.
//
// In the fixed-coefficient block FIR, input sample x(Lk-S) of the block meets
// the coefficients h(mL+j) for every m and for every column j of the input
// matrix that holds it. This unit forms all K = M*mcm_nj(S) of those products
// (4, 8, 12, 16, 12, 8, 4 for S = 0..6 with L = 4, N = 16) without a
// multiplier. Each constant is written as c = +/- 2^k * f with f odd (its
// "fundamental"). Every distinct fundamental is built once, as the sum of
// shifted (and, for -1 digits, subtracted) copies of the sample following
// its canonical signed digit recoding; f = 1 is the sample itself. Each
// product is then its fundamental shifted left by k and negated if c < 0, so
// constants such as 3, 6, -12 and 96 share one adder, and a zero constant
// costs nothing. Product t is x * h(fir_pkg::mcm_coef_index(S, t, L)).
//
// Purely combinational. Results are OW bits, two's complement, exact modulo
// 2^OW. The article gives the unit's role and its width; the fundamental
// sharing and the CSD shift-add realisation are this design's choice. Deeper
// common-subexpression sharing between different fundamentals is not done.
// With the default coefficients (1, 2, 3, 4, 0, ...) most products are zero
// or plain shifts of the input, so most output bits are constants or input
// wires; that is the expected result of constant multiplication, not a fault.
module mcm_unit #(
  parameter int L  = 4,                       // block size
  parameter int N  = 16,                      // filter length
  parameter int W  = 4,                       // sample width
  parameter int OW = 4,                       // product width
  parameter int CB = 8,                       // digits examined per fundamental
  parameter int S  = 3,                       // sample position in the block, 0..2L-2
  parameter int M  = fir_pkg::num_vec(N, L),
  parameter int K  = fir_pkg::mcm_width(S, L, M),
  parameter int H [N] = '{1, 2, 3, 4, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0}
) (
  input  logic signed [W-1:0]  x,
  output logic signed [OW-1:0] p [K]
);

  // Constant of product t (zero for padding taps beyond N).
  function automatic int coef(int t);
    int i;
    i = fir_pkg::mcm_coef_index(S, t, L);
    return (i < N) ? H[i] : 0;
  endfunction

  // Odd fundamental f of |c| (0 for c = 0).
  function automatic int fund(int c);
    int a;
    a = (c < 0) ? -c : c;
    if (a == 0) return 0;
    while ((a & 1) == 0) a = a >>> 1;
    return a;
  endfunction

  // Power of two k with |c| = 2^k * f.
  function automatic int pow2(int c);
    int a;
    int k;
    a = (c < 0) ? -c : c;
    k = 0;
    if (a == 0) return 0;
    while ((a & 1) == 0) begin
      a = a >>> 1;
      k++;
    end
    return k;
  endfunction

  // First product in the set whose constant has the same fundamental.
  function automatic int first_same(int t);
    for (int u = 0; u < t; u++)
      if (fund(coef(u)) == fund(coef(t))) return u;
    return t;
  endfunction

  logic signed [OW-1:0] xe;
  assign xe = OW'(x);

  for (genvar t = 0; t < K; t++) begin : g_prod
    localparam int C  = coef(t);
    localparam int FV = fund(C);
    localparam int SH = pow2(C);
    localparam int F  = first_same(t);

    // The first product of each fundamental builds it.
    if (F == t) begin : g_fund
      logic signed [OW-1:0] res;
      if (FV <= 1) begin : g_trivial
        assign res = (FV == 1) ? xe : '0;
      end else begin : g_shift_add
        logic signed [OW-1:0] term [CB];
        for (genvar b = 0; b < CB; b++) begin : g_digit
          localparam int D = fir_pkg::csd_digit(FV, b);
          if (D == 1) begin : g_pos
            assign term[b] = xe <<< b;
          end else if (D == -1) begin : g_neg
            assign term[b] = -(xe <<< b);
          end else begin : g_zero
            assign term[b] = '0;
          end
        end
        always_comb begin
          res = '0;
          for (int b = 0; b < CB; b++) res = res + term[b];
        end
      end
    end

    if (C < 0) begin : g_minus
      assign p[t] = -(g_prod[F].g_fund.res <<< SH);
    end else begin : g_plus
      assign p[t] = g_prod[F].g_fund.res <<< SH;
    end
  end

endmodule
