// tb_fir_top: end-to-end test of fir_top at its default parameters.
// All three filters run at the same time from one clock, each with its own
// random stream and its own random stalls:
//  - reconfigurable block filter: the article's example first (channel 0,
//    coefficients 0..5, input 1, settles at 15), then random data with random
//    channel switches; reference y(n) = sum_i h_{ch(k - i/L)}(i) x(n-i).
//  - fixed block filter: the article's example first (input 1, settles at
//    1010 = 10), then random data; reference is the convolution modulo 2^4.
//  - single-rate transpose filter: example (h(i) = i, input 1, settles at
//    15), then random coefficients reloaded every 100 samples after the
//    delay chain has been flushed with zero samples.
// Block outputs must leave two clock edges after their inputs. Each
// mechanism (stall of every filter, channel switch, coefficient reload,
// output wrap-around) is counted and must happen at least once.
module tb_fir_top;
  localparam int L = 4;
  localparam int RN = 6;
  localparam int FN = 16;
  localparam int TN = 6;
  localparam int RC_REF [4][RN] = '{
    '{0, 1, 2, 3, 4, 5},
    '{5, 4, 3, 2, 1, 0},
    '{1, 0, 0, 0, 0, 0},
    '{-3, 7, -12, 25, 100, -128}
  };
  localparam int FX_REF [FN] = '{1, 2, 3, 4, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0};
  localparam int NBLK = 600;

  logic clk = 1'b0;
  logic rst_n;
  logic               rc_in_valid, rc_out_valid;
  logic signed [7:0]  rc_x_blk [L];
  logic [1:0]         rc_ch;
  logic signed [15:0] rc_y_blk [L];
  logic               fx_in_valid, fx_out_valid;
  logic signed [3:0]  fx_x_blk [L];
  logic signed [3:0]  fx_y_blk [L];
  logic               tf_in_valid;
  logic signed [7:0]  tf_x;
  logic signed [7:0]  tf_h [TN];
  logic signed [15:0] tf_y;

  int checks = 0;
  int failures = 0;
  int cycle = 0;
  // reference state
  int rc_xs [$], rc_chs [$], rc_acc [$];
  int fx_xs [$], fx_acc [$];
  int tf_hist [$];
  int rc_nout = 0, fx_nout = 0;
  // mechanism counters
  int rc_stalls = 0, rc_switches = 0, fx_stalls = 0, fx_wraps = 0;
  int tf_stalls = 0, tf_reloads = 0;
  bit rc_seen15 = 0, fx_seen10 = 0, tf_seen15 = 0;
  bit done_rc = 0, done_fx = 0, done_tf = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  fir_top dut (.*);

  initial begin : watchdog
    repeat (20 * NBLK) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rc_ref(int n);
    int k, e;
    k = n / L;
    e = 0;
    for (int i = 0; i < RN; i++)
      if (n - i >= 0) e += RC_REF[rc_chs[k-i/L]][i] * rc_xs[n-i];
    return e;
  endfunction

  function automatic int fx_ref(int n);
    int e;
    e = 0;
    for (int i = 0; i < FN; i++)
      if (n - i >= 0) e += FX_REF[i] * fx_xs[n-i];
    return e;
  endfunction

  // block output checkers
  always @(negedge clk) begin
    if (rst_n && rc_out_valid) begin
      checks++;
      if (rc_nout >= rc_acc.size() || cycle - rc_acc[rc_nout] != 2) begin
        failures++;
        $display("FAIL rc output timing");
      end else begin
        for (int l = 0; l < L; l++) begin
          int e;
          e = rc_ref(L * rc_nout + L - 1 - l);
          checks++;
          if (rc_y_blk[l] !== 16'(e)) begin
            failures++;
            $display("FAIL rc block %0d y[%0d]=%0d expected %0d", rc_nout, l, rc_y_blk[l], 16'(e));
          end
        end
        if (rc_nout == 4 && rc_y_blk[0] == 16'sd15) rc_seen15 = 1;
      end
      rc_nout++;
    end
    if (rst_n && fx_out_valid) begin
      checks++;
      if (fx_nout >= fx_acc.size() || cycle - fx_acc[fx_nout] != 2) begin
        failures++;
        $display("FAIL fx output timing");
      end else begin
        for (int l = 0; l < L; l++) begin
          int e;
          e = fx_ref(L * fx_nout + L - 1 - l);
          if (e > 7 || e < -8) fx_wraps++;
          checks++;
          if (fx_y_blk[l] !== 4'(e)) begin
            failures++;
            $display("FAIL fx block %0d y[%0d]=%0d expected %0d", fx_nout, l, fx_y_blk[l], 4'(e));
          end
        end
        if (fx_nout == 4 && fx_y_blk[0] == 4'b1010) fx_seen10 = 1;
      end
      fx_nout++;
    end
  end

  // reconfigurable block filter stimulus
  initial begin
    int c, prev_c;
    @(posedge rst_n);
    #1;
    prev_c = 0;
    for (int b = 0; b < NBLK; b++) begin
      bit v;
      v = (b < 6) || ($urandom_range(0, 4) != 0);
      c = (b >= 6 && $urandom_range(0, 7) == 0) ? int'($urandom_range(0, 3)) : prev_c;
      rc_in_valid = v;
      rc_ch = 2'(c);
      foreach (rc_x_blk[l]) rc_x_blk[l] = (b < 6) ? 8'sd1 : 8'($urandom);
      @(posedge clk);
      if (v) begin
        if (c != prev_c) rc_switches++;
        prev_c = c;
        rc_acc.push_back(cycle);
        for (int l = L - 1; l >= 0; l--) rc_xs.push_back(int'(rc_x_blk[l]));
        rc_chs.push_back(c);
      end else rc_stalls++;
      #1;
    end
    rc_in_valid = 1'b0;
    done_rc = 1;
  end

  // fixed block filter stimulus
  initial begin
    @(posedge rst_n);
    #1;
    for (int b = 0; b < NBLK; b++) begin
      bit v;
      v = (b < 5) || ($urandom_range(0, 4) != 0);
      fx_in_valid = v;
      foreach (fx_x_blk[l]) fx_x_blk[l] = (b < 5) ? 4'sd1 : 4'($urandom);
      @(posedge clk);
      if (v) begin
        fx_acc.push_back(cycle);
        for (int l = L - 1; l >= 0; l--) fx_xs.push_back(int'(fx_x_blk[l]));
      end else fx_stalls++;
      #1;
    end
    fx_in_valid = 1'b0;
    done_fx = 1;
  end

  // single-rate transpose filter stimulus and checker
  initial begin
    @(posedge rst_n);
    #1;
    foreach (tf_h[i]) tf_h[i] = 8'(i);
    for (int n = 0; n < 4 * NBLK; n++) begin
      int e;
      bit v;
      v = (n < 10) || ($urandom_range(0, 3) != 0);
      if (n >= 10 && n % 100 == 0) begin
        // flush the delay chain with zero samples, then load new coefficients
        tf_in_valid = 1'b1;
        tf_x = '0;
        repeat (TN - 1) begin
          @(posedge clk);
          tf_hist.push_front(0);
        end
        #1;
        foreach (tf_h[i]) tf_h[i] = 8'($urandom);
        tf_reloads++;
      end
      tf_in_valid = v;
      tf_x = (n < 10) ? 8'sd1 : 8'($urandom);
      #1;
      e = int'(tf_h[0]) * int'(tf_x);
      for (int i = 1; i < TN; i++) if (i - 1 < tf_hist.size()) e += int'(tf_h[i]) * tf_hist[i-1];
      checks++;
      if (tf_y !== 16'(e)) begin
        failures++;
        $display("FAIL tf n=%0d y=%0d expected %0d", n, tf_y, 16'(e));
      end
      if (n == 9 && tf_y == 16'sd15) tf_seen15 = 1;
      @(posedge clk);
      if (v) tf_hist.push_front(int'(tf_x)); else tf_stalls++;
      #1;
    end
    tf_in_valid = 1'b0;
    done_tf = 1;
  end

  initial begin
    rst_n = 1'b0;
    rc_in_valid = 1'b0; fx_in_valid = 1'b0; tf_in_valid = 1'b0;
    rc_ch = '0; tf_x = '0;
    foreach (rc_x_blk[i]) rc_x_blk[i] = '0;
    foreach (fx_x_blk[i]) fx_x_blk[i] = '0;
    foreach (tf_h[i]) tf_h[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (done_rc && done_fx && done_tf);
    repeat (4) @(posedge clk);
    #1;
    if (rc_nout != rc_acc.size() || fx_nout != fx_acc.size()) begin
      failures++;
      $display("FAIL missing output blocks");
    end
    if (!rc_seen15) begin failures++; $display("FAIL reconfigurable example (15) not seen"); end
    if (!fx_seen10) begin failures++; $display("FAIL fixed example (1010) not seen"); end
    if (!tf_seen15) begin failures++; $display("FAIL transpose example (15) not seen"); end
    if (rc_stalls == 0) begin failures++; $display("FAIL no rc stall"); end
    if (rc_switches == 0) begin failures++; $display("FAIL no channel switch"); end
    if (fx_stalls == 0) begin failures++; $display("FAIL no fx stall"); end
    if (fx_wraps == 0) begin failures++; $display("FAIL no fx wrap-around"); end
    if (tf_stalls == 0) begin failures++; $display("FAIL no tf stall"); end
    if (tf_reloads == 0) begin failures++; $display("FAIL no coefficient reload"); end
    $display("rc: blocks=%0d stalls=%0d channel_switches=%0d", rc_nout, rc_stalls, rc_switches);
    $display("fx: blocks=%0d stalls=%0d wraps=%0d", fx_nout, fx_stalls, fx_wraps);
    $display("tf: samples=%0d stalls=%0d reloads=%0d", 4 * NBLK, tf_stalls, tf_reloads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
