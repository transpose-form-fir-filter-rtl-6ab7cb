// tb_block_sizes: the block filters at block sizes and lengths other than the
// defaults, all checked against the direct convolution.
//  - L = 2, N = 6: the two-output blocks {y(n), y(n-1)} used to derive the
//    block formulation (non-overlapping input blocks), for both the
//    reconfigurable and the fixed (MCM) filter.
//  - L = 4, N = 16: reconfigurable filter with four weight vectors (M = 4).
//  - L = 8, N = 16: fixed filter with eight samples per clock (M = 2,
//    15 MCM units).
//  - L = 4, N = 15: fixed filter with a length that is not a multiple of L.
// Each harness inserts random stalls; the reconfigurable ones also switch
// channels. Every stall and switch mechanism must occur.
module tb_block_sizes;
  logic clk = 1'b0;
  logic rst_n;
  logic done [5];
  int   checks [5];
  int   fails [5];
  int   stalls [5];
  int   switches [5];

  localparam logic signed [7:0] RC0 [2][6] = '{'{1, 2, 3, 4, 5, 6}, '{-7, 0, 9, -128, 127, 3}};
  localparam int FH1 [6] = '{3, -7, 12, 96, -1, 5};
  localparam logic signed [7:0] RC2 [2][16] = '{
    '{1, -2, 3, -4, 5, -6, 7, -8, 9, -10, 11, -12, 13, -14, 15, -16},
    '{127, -128, 0, 0, 64, 1, -1, 33, 2, 2, 2, 2, -90, 17, 0, 4}};
  localparam int FH3 [16] = '{7, -5, 13, 0, 127, -128, 7, 85, -1, 1, 2, 96, -77, 5, 60, -3};
  localparam int FH4 [15] = '{-1, 2, 3, 4, 5, 6, 7, 8, 9, 10, 11, 12, 13, 14, 100};

  always #5 clk = ~clk;

  block_fir_harness #(.RECONF(1'b1), .L(2), .N(6), .RC(RC0)) h0 (
    .clk, .rst_n, .done(done[0]), .checks(checks[0]), .failures(fails[0]),
    .stalls(stalls[0]), .switches(switches[0]));
  block_fir_harness #(.RECONF(1'b0), .L(2), .N(6), .FH(FH1)) h1 (
    .clk, .rst_n, .done(done[1]), .checks(checks[1]), .failures(fails[1]),
    .stalls(stalls[1]), .switches(switches[1]));
  block_fir_harness #(.RECONF(1'b1), .L(4), .N(16),
    .RC(RC2)) h2 (
    .clk, .rst_n, .done(done[2]), .checks(checks[2]), .failures(fails[2]),
    .stalls(stalls[2]), .switches(switches[2]));
  block_fir_harness #(.RECONF(1'b0), .L(8), .N(16),
    .FH(FH3)) h3 (
    .clk, .rst_n, .done(done[3]), .checks(checks[3]), .failures(fails[3]),
    .stalls(stalls[3]), .switches(switches[3]));
  block_fir_harness #(.RECONF(1'b0), .L(4), .N(15),
    .FH(FH4)) h4 (
    .clk, .rst_n, .done(done[4]), .checks(checks[4]), .failures(fails[4]),
    .stalls(stalls[4]), .switches(switches[4]));

  int total_checks;
  int total_fails;

  task automatic report();
    total_checks = 0;
    total_fails = 0;
    for (int i = 0; i < 5; i++) begin
      total_checks += checks[i];
      total_fails += fails[i];
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    report();
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", total_checks, total_fails + 1);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (done[0] && done[1] && done[2] && done[3] && done[4]);
    @(posedge clk);
    report();
    for (int i = 0; i < 5; i++) begin
      $display("harness %0d: checks=%0d failures=%0d stalls=%0d switches=%0d",
               i, checks[i], fails[i], stalls[i], switches[i]);
      if (stalls[i] == 0) total_fails++;
    end
    if (switches[0] == 0 || switches[2] == 0) total_fails++;
    $display("TB_RESULT checks=%0d failures=%0d", total_checks, total_fails);
    $finish;
  end
endmodule
