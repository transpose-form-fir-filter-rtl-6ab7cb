// pipelined_adder_unit (PAU): block-level transpose-form accumulation.
//
// Receives the M partial-output blocks r[m] = r_k^m (each L words) of block k
// and forms the output block
//   y_k = r_k^0 + r_{k-1}^1 + ... + r_{k-M+1}^{M-1}
// with a chain of M-1 block registers, exactly as the delay line of a
// transpose-form FIR but one block (L samples) wide:
//   acc[M-2] <= r[M-1];  acc[m-1] <= r[m] + acc[m];  y <= r[0] + acc[0].
// Every adder sits between two registers, so the path is one addition deep.
//
// Timing: on each clock edge with en = 1 the chain advances one block and
// y takes the output block of the partial results present at that edge
// (one register stage). en = 0 holds the chain (stall). Active-low
// synchronous reset clears the chain and y. Sums wrap modulo 2^OW.
// The accumulation structure follows the article; enable, reset and the
// width are this design's choice.
module pipelined_adder_unit #(
  parameter int M  = 2,   // number of partial-output blocks
  parameter int L  = 4,   // block size
  parameter int OW = 16   // word width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [OW-1:0] r [M][L],
  output logic signed [OW-1:0] y [L]
);

  if (M > 1) begin : g_chain
    logic signed [OW-1:0] acc [M-1][L];

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int m = 0; m < M - 1; m++)
          for (int l = 0; l < L; l++) acc[m][l] <= '0;
        for (int l = 0; l < L; l++) y[l] <= '0;
      end else if (en) begin
        for (int l = 0; l < L; l++) begin
          acc[M-2][l] <= r[M-1][l];
          for (int m = 1; m < M - 1; m++) acc[m-1][l] <= r[m][l] + acc[m][l];
          y[l] <= r[0][l] + acc[0][l];
        end
      end
    end
  end else begin : g_single
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int l = 0; l < L; l++) y[l] <= '0;
      end else if (en) begin
        for (int l = 0; l < L; l++) y[l] <= r[0][l];
      end
    end
  end

endmodule
