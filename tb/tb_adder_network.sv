// tb_adder_network: self-checking test of the MCM adder network.
// Random products are driven on the global product vector of an L = 4,
// N = 16 filter. The reference rebuilds the product numbering from scratch
// (sample by sample, m outer, j inner) and checks
// r[m][l] = sum_j prod(sample l+j, tap mL+j) modulo 2^OW.
module tb_adder_network;
  localparam int L = 4;
  localparam int N = 16;
  localparam int OW = 16;
  localparam int M = 4;
  localparam int P = 64;

  logic signed [OW-1:0] prod [P];
  logic signed [OW-1:0] r [M][L];
  int checks = 0;
  int failures = 0;
  int idx [2*L-1][N];   // global product number of (sample, tap)

  adder_network #(.L(L), .N(N), .OW(OW)) dut (.prod, .r);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k;
    k = 0;
    for (int s = 0; s < 2 * L - 1; s++)
      for (int m = 0; m < M; m++)
        for (int j = 0; j < L; j++)
          if (s - j >= 0 && s - j < L) begin
            idx[s][m*L+j] = k;
            k++;
          end
    if (k != P) failures++;
    for (int it = 0; it < 300; it++) begin
      foreach (prod[i]) prod[i] = OW'($urandom);
      #1;
      for (int m = 0; m < M; m++)
        for (int l = 0; l < L; l++) begin
          int e;
          e = 0;
          for (int j = 0; j < L; j++) e += int'(prod[idx[l+j][m*L+j]]);
          checks++;
          if (r[m][l] !== OW'(e)) begin
            failures++;
            $display("FAIL r[%0d][%0d]=%0d expected %0d", m, l, r[m][l], OW'(e));
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
