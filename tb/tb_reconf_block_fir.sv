// tb_reconf_block_fir: self-checking test of the reconfigurable block FIR at
// its default sizes (L = 4, N = 6, 8-bit data and coefficients, 16-bit output,
// four channels).
// Phase 1 reproduces the article's example: channel 0 (coefficients
// 0..5) with a constant input of 1 must settle at 15.
// Phase 2 streams random blocks with random stalls and random channel
// switches. The reference is the direct convolution
//   y(n) = sum_i h_{ch(k - i/L)}(i) x(n-i)
// where k is the block of sample n: tap i reaches the output through the
// partial block of i/L blocks earlier, so it uses the coefficients selected
// then (this is what makes channel switches exact to predict).
// Every output block must leave exactly two clock edges after its input.
module tb_reconf_block_fir;
  localparam int L = 4;
  localparam int N = 6;
  localparam int W = 8;
  localparam int OW = 16;
  localparam int REF [4][N] = '{
    '{0, 1, 2, 3, 4, 5},
    '{5, 4, 3, 2, 1, 0},
    '{1, 0, 0, 0, 0, 0},
    '{-3, 7, -12, 25, 100, -128}
  };

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid;
  logic signed [W-1:0] x_blk [L];
  logic [1:0] ch;
  logic out_valid;
  logic signed [OW-1:0] y_blk [L];

  int checks = 0;
  int failures = 0;
  int cycle = 0;
  int xs [$];       // all accepted samples, oldest first (sample n at xs[n])
  int chs [$];      // channel of each accepted block
  int acc_cyc [$];  // cycle in which each block was accepted
  int nout = 0;     // output blocks checked
  int stalls = 0;
  int switches = 0;
  bit settled15 = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  reconf_block_fir dut (.clk, .rst_n, .in_valid, .x_blk, .ch, .out_valid, .y_blk);

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_y(int n);
    int k;
    int e;
    k = n / L;
    e = 0;
    for (int i = 0; i < N; i++)
      if (n - i >= 0 && k - i / L >= 0) e += REF[chs[k-i/L]][i] * xs[n-i];
    return e;
  endfunction

  // Output checker: compares each output block with the reference.
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      if (nout >= acc_cyc.size()) begin
        failures++;
        $display("FAIL unexpected output block");
      end else begin
        checks++;
        if (cycle - acc_cyc[nout] != 2) begin
          failures++;
          $display("FAIL latency %0d", cycle - acc_cyc[nout]);
        end
        for (int l = 0; l < L; l++) begin
          int e;
          e = ref_y(L * nout + L - 1 - l);
          checks++;
          if (y_blk[l] !== OW'(e)) begin
            failures++;
            $display("FAIL block %0d y[%0d]=%0d expected %0d", nout, l, y_blk[l], OW'(e));
          end
        end
        if (chs[nout] == 0 && nout > 2 && y_blk[0] == 16'sd15) settled15 = 1;
        nout++;
      end
    end
  end

  task automatic send(input int xv [L], input int c, input bit v);
    in_valid = v;
    ch = 2'(c);
    for (int l = 0; l < L; l++) x_blk[l] = W'(xv[l]);
    @(posedge clk);
    if (v) begin
      acc_cyc.push_back(cycle);
      for (int l = L - 1; l >= 0; l--) xs.push_back(int'(x_blk[l]));
      chs.push_back(c);
    end else stalls++;
    #1;
  endtask

  initial begin
    int xv [L];
    int c;
    int prev_c;
    rst_n = 1'b0;
    in_valid = 1'b0;
    ch = '0;
    foreach (x_blk[i]) x_blk[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // article's example: x = 1, coefficients 0..5
    foreach (xv[i]) xv[i] = 1;
    for (int b = 0; b < 6; b++) send(xv, 0, 1'b1);
    prev_c = 0;
    // random stream
    for (int b = 0; b < 400; b++) begin
      foreach (xv[i]) xv[i] = int'($urandom_range(0, 255));
      c = ($urandom_range(0, 7) == 0) ? int'($urandom_range(0, 3)) : prev_c;
      if (c != prev_c) switches++;
      prev_c = c;
      send(xv, c, $urandom_range(0, 4) != 0);
    end
    in_valid = 1'b0;
    repeat (4) @(posedge clk);
    #1;
    if (nout != acc_cyc.size()) begin failures++; $display("FAIL %0d blocks out of %0d", nout, acc_cyc.size()); end
    if (!settled15) begin failures++; $display("FAIL example output 15 not seen"); end
    if (stalls == 0 || switches == 0) failures++;
    $display("stalls=%0d channel_switches=%0d blocks=%0d", stalls, switches, nout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
