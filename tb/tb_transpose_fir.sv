// tb_transpose_fir: self-checking test of the single-rate transpose FIR
// (N = 6, 8-bit data and coefficients, 16-bit output).
// Phase 1: the article's example, coefficients h(i) = i and a constant
// input of 1; the output must step 0, 1, 3, 6, 10, 15 and stay at 15.
// Phase 2: random coefficients, random input and random stalls; each cycle
// the output must equal sum_i h(i) x(n-i) over the current sample and the
// accepted history, modulo 2^16. Coefficients are changed between phases.
module tb_transpose_fir;
  localparam int N = 6;

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid;
  logic signed [7:0]  x;
  logic signed [7:0]  h [N];
  logic signed [15:0] y;

  int checks = 0;
  int failures = 0;
  int hist [$];   // accepted samples, newest first
  int stalls = 0;

  always #5 clk = ~clk;

  transpose_fir dut (.clk, .rst_n, .in_valid, .x, .h, .y);

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_y();
    int e;
    e = int'(h[0]) * int'(x);
    for (int i = 1; i < N; i++)
      if (i - 1 < hist.size()) e += int'(h[i]) * hist[i-1];
    return e;
  endfunction

  task automatic step(input bit v);
    in_valid = v;
    #1;
    checks++;
    if (y !== 16'(ref_y())) begin
      failures++;
      $display("FAIL y=%0d expected %0d", y, 16'(ref_y()));
    end
    @(posedge clk);
    if (v) hist.push_front(int'(x)); else stalls++;
    #1;
  endtask

  initial begin
    static int expect_doc [8] = '{0, 1, 3, 6, 10, 15, 15, 15};
    rst_n = 1'b0;
    in_valid = 1'b0;
    x = '0;
    foreach (h[i]) h[i] = 8'(i);
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    x = 8'sd1;
    for (int n = 0; n < 8; n++) begin
      #1;
      checks++;
      if (y !== 16'(expect_doc[n])) begin
        failures++;
        $display("FAIL example n=%0d y=%0d expected %0d", n, y, expect_doc[n]);
      end
      step(1'b1);
    end
    foreach (h[i]) h[i] = 8'($urandom);
    hist.delete();
    rst_n = 1'b0;
    @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      x = 8'($urandom);
      step($urandom_range(0, 3) != 0);
    end
    if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
