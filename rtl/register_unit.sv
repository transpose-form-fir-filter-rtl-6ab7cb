// register_unit (RU): input register of the block FIR filters.
//
// Each accepted clock edge (en = 1) stores a new input block
// x_blk[l] = x(Lk-l), l = 0..L-1 (x_blk[0] is the newest sample), and moves
// the L-1 newest samples of the previous block into a second register bank.
// The output smp[s] = x(Lk-s), s = 0..2L-2, holds every distinct entry of
// the L x L input matrix S_k[l][j] = x(Lk-l-j), so the consumers read row l of
// S_k as smp[l +: L]. Only L-1 samples of the previous block are kept,
// because no row of S_k reaches further back.
//
// Timing: smp reflects block k from the clock edge that accepts x_k until the
// next accepted edge; en = 0 holds everything (stall). Active-low synchronous
// reset clears all samples to zero, so the filter starts from a zero history.
// The storage organisation follows the register unit of the article; the
// enable and the reset are this design's choice.
module register_unit #(
  parameter int L = 4,  // block size
  parameter int W = 8   // sample width
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] x_blk [L],
  output logic signed [W-1:0] smp   [2*L-1]
);

  logic signed [W-1:0] cur  [L];
  logic signed [W-1:0] prev [L-1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < L; i++) cur[i] <= '0;
      for (int i = 0; i < L - 1; i++) prev[i] <= '0;
    end else if (en) begin
      for (int i = 0; i < L - 1; i++) prev[i] <= cur[i];
      for (int i = 0; i < L; i++) cur[i] <= x_blk[i];
    end
  end

  always_comb begin
    for (int s = 0; s < L; s++) smp[s] = cur[s];
    for (int s = L; s < 2 * L - 1; s++) smp[s] = prev[s-L];
  end

endmodule
