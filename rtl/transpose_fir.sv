// transpose_fir: single-rate transpose-form FIR filter (one sample per clock).
//
// The input sample x(n) is broadcast to N multipliers, one per coefficient
// h(i) (coefficient inputs, so they may be changed at run time). The
// products are accumulated along a chain of N-1 registers that runs from
// h(N-1) towards h(0):
//   z[N-1] <= h(N-1) x(n);   z[i] <= h(i) x(n) + z[i+1];   y(n) = h(0) x(n) + z[1]
// which gives y(n) = sum_i h(i) x(n-i). Each adder sits right before a
// register, so the data path is one multiplier and one adder deep.
//
// Interface: x with in_valid; y is the output of the last adder and belongs
// to the current x (combinational from x, as in the data-flow graph). A
// cycle without in_valid holds the delay chain. Active-low synchronous reset
// clears the chain. Arithmetic is two's complement and wraps modulo 2^OW.
// Structure and default sizes (N = 6, 8-bit input and coefficients, 16-bit
// output) follow the article; the enable, reset and wrap-around are this
// design's choice.
module transpose_fir #(
  parameter int N  = 6,
  parameter int W  = 8,
  parameter int CW = 8,
  parameter int OW = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [W-1:0]  x,
  input  logic signed [CW-1:0] h [N],
  output logic signed [OW-1:0] y
);

  logic signed [OW-1:0] m [N];       // products h(i) x(n)
  logic signed [OW-1:0] z [1:N-1];   // transpose delay chain

  always_comb begin
    for (int i = 0; i < N; i++) m[i] = OW'(OW'(x) * OW'(h[i]));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 1; i < N; i++) z[i] <= '0;
    end else if (in_valid) begin
      z[N-1] <= m[N-1];
      for (int i = 1; i < N - 1; i++) z[i] <= m[i] + z[i+1];
    end
  end

  assign y = m[0] + z[1];

endmodule
