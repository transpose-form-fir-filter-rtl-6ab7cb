// tb_fixed_block_fir: self-checking test of the MCM-based fixed block FIR.
// Two instances share the input stream handshake:
//  - dut_doc at the default sizes (L = 4, N = 16, 4-bit data, coefficients
//    1, 2, 3, 4, 0, ...): with a constant input of 1 it must settle at
//    10 (binary 1010), the article's example; with random 4-bit input it
//    is checked modulo 2^4.
//  - dut_wide with 8-bit data, 16-bit output and a 16-tap set of mixed
//    positive, negative, zero and repeated constants, checked against the
//    direct convolution y(n) = sum_i h(i) x(n-i) modulo 2^16.
// Random stalls are inserted; each output block must leave exactly two
// clock edges after its input block. Wrap-around of the 4-bit output
// (a sum that does not fit) is counted and must occur.
module tb_fixed_block_fir;
  localparam int L = 4;
  localparam int N = 16;
  localparam int HD [N] = '{1, 2, 3, 4, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0};
  localparam int HW [N] = '{7, -5, 13, 0, 127, -128, 7, 85, -1, 1, 2, 96, -77, 13, 60, -3};

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid;
  logic signed [3:0]  xd [L];
  logic signed [7:0]  xw [L];
  logic               vd, vw;
  logic signed [3:0]  yd [L];
  logic signed [15:0] yw [L];

  int checks = 0;
  int failures = 0;
  int cycle = 0;
  int xsd [$];
  int xsw [$];
  int acc_cyc [$];
  int nout = 0;
  int stalls = 0;
  int wraps = 0;
  bit seen10 = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  fixed_block_fir dut_doc (.clk, .rst_n, .in_valid, .x_blk(xd), .out_valid(vd), .y_blk(yd));
  fixed_block_fir #(.L(L), .N(N), .W(8), .CW(8), .OW(16), .H(HW)) dut_wide (
    .clk, .rst_n, .in_valid, .x_blk(xw), .out_valid(vw), .y_blk(yw)
  );

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int conv(int n, bit wide);
    int e;
    e = 0;
    for (int i = 0; i < N; i++)
      if (n - i >= 0) e += wide ? HW[i] * xsw[n-i] : HD[i] * xsd[n-i];
    return e;
  endfunction

  always @(negedge clk) begin
    if (rst_n && (vd || vw)) begin
      checks++;
      if (!(vd && vw) || nout >= acc_cyc.size()) begin
        failures++;
        $display("FAIL unexpected output valid");
      end else begin
        if (cycle - acc_cyc[nout] != 2) begin
          failures++;
          $display("FAIL latency %0d", cycle - acc_cyc[nout]);
        end
        for (int l = 0; l < L; l++) begin
          int ed;
          int ew;
          ed = conv(L * nout + L - 1 - l, 1'b0);
          ew = conv(L * nout + L - 1 - l, 1'b1);
          if (ed > 7 || ed < -8) wraps++;
          checks += 2;
          if (yd[l] !== 4'(ed)) begin
            failures++;
            $display("FAIL doc block %0d y[%0d]=%0d expected %0d", nout, l, yd[l], 4'(ed));
          end
          if (yw[l] !== 16'(ew)) begin
            failures++;
            $display("FAIL wide block %0d y[%0d]=%0d expected %0d", nout, l, yw[l], 16'(ew));
          end
        end
        if (nout == 3 && yd[0] == 4'b1010) seen10 = 1;
        nout++;
      end
    end
  end

  task automatic send(input bit v, input bit ones);
    in_valid = v;
    for (int l = 0; l < L; l++) begin
      xd[l] = ones ? 4'sd1 : 4'($urandom);
      xw[l] = 8'($urandom);
    end
    @(posedge clk);
    if (v) begin
      acc_cyc.push_back(cycle);
      for (int l = L - 1; l >= 0; l--) begin
        xsd.push_back(int'(xd[l]));
        xsw.push_back(int'(xw[l]));
      end
    end else stalls++;
    #1;
  endtask

  initial begin
    rst_n = 1'b0;
    in_valid = 1'b0;
    foreach (xd[i]) xd[i] = '0;
    foreach (xw[i]) xw[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int b = 0; b < 5; b++) send(1'b1, 1'b1);   // article's example
    for (int b = 0; b < 400; b++) send($urandom_range(0, 4) != 0, 1'b0);
    in_valid = 1'b0;
    repeat (4) @(posedge clk);
    #1;
    if (nout != acc_cyc.size()) begin failures++; $display("FAIL %0d of %0d blocks", nout, acc_cyc.size()); end
    if (!seen10) begin failures++; $display("FAIL example output 1010 not seen"); end
    if (stalls == 0 || wraps == 0) failures++;
    $display("stalls=%0d wraps=%0d blocks=%0d", stalls, wraps, nout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
