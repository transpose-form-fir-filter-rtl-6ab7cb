// coef_storage_unit (CSU): coefficient store of the reconfigurable block FIR.
//
// Holds the N coefficients of each of NCH channel filters as a constant table
// (parameter COEF, one ROM look-up table per tap, NCH words deep). When en is
// high, the channel number ch is looked up and the N coefficients of that
// channel are registered, arranged as M = ceil(N/L) short weight vectors
// c[m][j] = h_ch(mL+j); taps beyond N (padding up to M*L) read as zero.
//
// Timing: one clock cycle from ch to c, registered together with the input
// block it belongs to (the parent drives en with the input-valid strobe), so
// a channel switch takes effect from the very block it arrives with.
// Active-low synchronous reset clears the outputs to zero. An assertion
// flags a request for a channel number at or beyond NCH (which reads zeros).
// Padding taps (N not a multiple of L) are constant zero outputs.
// The article fixes the ROM organisation (N LUTs, one cycle per look-up);
// the number of channels and the default table contents are this design's
// choice: channel 0 is the article's example set {0,1,2,3,4,5}.
module coef_storage_unit #(
  parameter int L   = 4,  // block size
  parameter int N   = 6,  // filter length
  parameter int CW  = 8,  // coefficient width
  parameter int NCH = 4,  // number of channel filters
  parameter int M   = fir_pkg::num_vec(N, L),
  parameter int CHW = (NCH > 1) ? $clog2(NCH) : 1,  // channel number width
  parameter logic signed [CW-1:0] COEF [NCH][N] = '{
    '{8'sd0, 8'sd1, 8'sd2, 8'sd3, 8'sd4, 8'sd5},
    '{8'sd5, 8'sd4, 8'sd3, 8'sd2, 8'sd1, 8'sd0},
    '{8'sd1, 8'sd0, 8'sd0, 8'sd0, 8'sd0, 8'sd0},
    '{-8'sd3, 8'sd7, -8'sd12, 8'sd25, 8'sd100, -8'sd128}
  }
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       en,
  input  logic [CHW-1:0]             ch,
  output logic signed [CW-1:0]       c [M][L]
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int m = 0; m < M; m++)
        for (int j = 0; j < L; j++) c[m][j] <= '0;
    end else if (en) begin
      for (int m = 0; m < M; m++)
        for (int j = 0; j < L; j++)
          if (m * L + j < N && int'(ch) < NCH) c[m][j] <= COEF[ch][m*L+j];
          else c[m][j] <= '0;
    end
  end

endmodule
