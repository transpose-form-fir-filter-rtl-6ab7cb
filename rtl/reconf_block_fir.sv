// reconf_block_fir: block transpose-form FIR filter with reconfigurable
// (channel-selectable) coefficients.
//
// The filter takes a block of L new samples per clock and returns L outputs
// per clock. The N taps are cut into M = ceil(N/L) short weight vectors
// c_m = {h(mL), .., h(mL+L-1)}. The register unit (RU) turns the input
// stream into the L x L matrix S_k[l][j] = x(Lk-l-j); the coefficient storage
// unit (CSU) supplies the M weight vectors of the selected channel; IPU
// number i (1..M) multiplies S_k by c_{M-i} and the pipelined adder unit
// (PAU) combines the M partial blocks through block delays, so that
//   y(Lk-l) = sum_{i=0}^{N-1} h(i) x(Lk-l-i),  l = 0..L-1.
// This is the transpose-form idea applied to blocks: the input matrix is
// broadcast to all IPUs and the delays sit in the accumulation path.
//
// Interface: x_blk[l] = x(Lk-l) (x_blk[0] newest) with in_valid; ch picks
// the channel filter and is sampled with each input block. y_blk[l] =
// y(Lk-l) with out_valid.
// Timing: an input block accepted at clock edge e appears on y_blk after
// edge e+1 (latency 2 edges), one block per clock. A cycle without in_valid
// is a stall: no state moves and no output block is produced for it. After a
// channel switch the next M-1 output blocks mix the old and new coefficient
// sets, as in any transpose-form filter whose coefficients change; from the
// M-th block on the output is purely the new filter.
// Arithmetic is two's complement and wraps modulo 2^OW. Sizes default to the
// article's example (L = 4, six 8-bit coefficients, 8-bit input, 16-bit
// output); the number of channels, handshake and reset are this design's.
module reconf_block_fir #(
  parameter int L   = 4,
  parameter int N   = 6,
  parameter int W   = 8,
  parameter int CW  = 8,
  parameter int OW  = 16,
  parameter int NCH = 4,
  parameter int CHW = (NCH > 1) ? $clog2(NCH) : 1,
  parameter int M   = fir_pkg::num_vec(N, L),
  parameter logic signed [CW-1:0] COEF [NCH][N] = '{
    '{8'sd0, 8'sd1, 8'sd2, 8'sd3, 8'sd4, 8'sd5},
    '{8'sd5, 8'sd4, 8'sd3, 8'sd2, 8'sd1, 8'sd0},
    '{8'sd1, 8'sd0, 8'sd0, 8'sd0, 8'sd0, 8'sd0},
    '{-8'sd3, 8'sd7, -8'sd12, 8'sd25, 8'sd100, -8'sd128}
  }
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [W-1:0]  x_blk [L],
  input  logic [CHW-1:0]       ch,
  output logic                 out_valid,
  output logic signed [OW-1:0] y_blk [L]
);

  logic signed [W-1:0]  smp [2*L-1];
  logic signed [CW-1:0] c   [M][L];
  logic signed [OW-1:0] r   [M][L];
  logic                 blk_valid;   // RU and CSU hold a block not yet summed

  register_unit #(.L(L), .W(W)) u_ru (
    .clk, .rst_n, .en(in_valid), .x_blk, .smp
  );

  coef_storage_unit #(.L(L), .N(N), .CW(CW), .NCH(NCH), .CHW(CHW), .M(M),
                      .COEF(COEF)) u_csu (
    .clk, .rst_n, .en(in_valid), .ch, .c
  );

  // IPU-i receives weight vector c_{M-i}; its result r_k^{M-i} enters the
  // adder chain i-1 block delays after the first one.
  for (genvar i = 1; i <= M; i++) begin : g_ipu
    inner_product_unit #(.L(L), .W(W), .CW(CW), .OW(OW)) u_ipu (
      .smp, .c(c[M-i]), .r(r[M-i])
    );
  end

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
