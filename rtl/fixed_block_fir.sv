// fixed_block_fir: block transpose-form FIR filter with fixed coefficients,
// built from multiple constant multiplication (MCM) units.
//
// Like the reconfigurable filter it takes a block of L samples per clock and
// forms y_k = sum_m S_{k-m} c_m, but because the coefficients H are known at
// elaboration there is no coefficient store and there are no multipliers.
// Instead each of the 2L-1 distinct samples x(Lk-s) of the input matrix S_k
// drives one MCM unit that builds, with shifts and adds, all products of
// that sample with the coefficients it meets (4, 8, 12, 16, 12, 8, 4 of them
// for L = 4, N = 16). An adder network sums the products into the M partial
// blocks r_k^m and the pipelined adder unit delays and adds those blocks in
// transpose form:
//   y(Lk-l) = sum_{i=0}^{N-1} h(i) x(Lk-l-i),  l = 0..L-1.
//
// Interface: x_blk[l] = x(Lk-l) (x_blk[0] newest) with in_valid; y_blk[l] =
// y(Lk-l) with out_valid. Timing: an input block accepted at clock edge e
// appears on y_blk after edge e+1 (latency 2 edges), one block per clock; a
// cycle without in_valid stalls the whole filter.
// Arithmetic is two's complement and wraps modulo 2^OW. Defaults follow the
// article's example: L = 4, N = 16, 4-bit input and output, coefficients
// 1, 2, 3, 4 followed by zeros. Handshake, reset and the wrap-around
// convention are this design's choice.
module fixed_block_fir #(
  parameter int L  = 4,
  parameter int N  = 16,
  parameter int W  = 4,
  parameter int CW = 4,    // coefficient width (sets the CSD digit count)
  parameter int OW = 4,
  parameter int M  = fir_pkg::num_vec(N, L),
  parameter int H [N] = '{1, 2, 3, 4, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0}
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [W-1:0]  x_blk [L],
  output logic                 out_valid,
  output logic signed [OW-1:0] y_blk [L]
);

  localparam int P = L * M * L;   // products of all MCM units together

  logic signed [W-1:0]  smp  [2*L-1];
  logic signed [OW-1:0] prod [P];
  logic signed [OW-1:0] r    [M][L];
  logic                 blk_valid;

  register_unit #(.L(L), .W(W)) u_ru (
    .clk, .rst_n, .en(in_valid), .x_blk, .smp
  );

  for (genvar s = 0; s < 2 * L - 1; s++) begin : g_mcm
    localparam int K   = fir_pkg::mcm_width(s, L, M);
    localparam int OFF = fir_pkg::mcm_offset(s, L, M);
    logic signed [OW-1:0] p [K];
    mcm_unit #(.L(L), .N(N), .W(W), .OW(OW), .CB(CW + 1), .S(s), .M(M), .K(K),
               .H(H)) u_mcm (
      .x(smp[s]), .p
    );
    for (genvar t = 0; t < K; t++) begin : g_out
      assign prod[OFF+t] = p[t];
    end
  end

  adder_network #(.L(L), .N(N), .OW(OW), .M(M), .P(P)) u_an (
    .prod, .r
  );

  pipelined_adder_unit #(.M(M), .L(L), .OW(OW)) u_pau (
    .clk, .rst_n, .en(blk_valid), .r, .y(y_blk)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      blk_valid <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      blk_valid <= in_valid;
      out_valid <= blk_valid;
    end
  end

endmodule
