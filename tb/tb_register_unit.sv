// tb_register_unit: self-checking test of the register unit.
// Random input blocks are offered with a random enable; a reference history
// of accepted samples (newest first) predicts every output smp[s] = x(Lk-s)
// after each clock edge, including held values during stalls and the zero
// history after reset.
module tb_register_unit;
  localparam int L = 4;
  localparam int W = 8;

  logic clk = 1'b0;
  logic rst_n;
  logic en;
  logic signed [W-1:0] x_blk [L];
  logic signed [W-1:0] smp [2*L-1];
  int checks = 0;
  int failures = 0;
  int hist [$];   // accepted samples, newest first
  int stalls = 0;

  always #5 clk = ~clk;

  register_unit #(.L(L), .W(W)) dut (.clk, .rst_n, .en, .x_blk, .smp);

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_outputs();
    for (int s = 0; s < 2 * L - 1; s++) begin
      int e;
      e = (s < hist.size()) ? hist[s] : 0;
      checks++;
      if (smp[s] !== W'(e)) begin
        failures++;
        $display("FAIL smp[%0d]=%0d expected %0d", s, smp[s], W'(e));
      end
    end
  endtask

  initial begin
    rst_n = 1'b0;
    en = 1'b0;
    foreach (x_blk[i]) x_blk[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check_outputs();
    for (int cyc = 0; cyc < 400; cyc++) begin
      en = ($urandom_range(0, 3) != 0);
      foreach (x_blk[i]) x_blk[i] = W'($urandom);
      @(posedge clk);
      #1;
      if (en) begin
        // x_blk[L-1] is the oldest sample of the block, x_blk[0] the newest
        for (int i = L - 1; i >= 0; i--) hist.push_front(int'(x_blk[i]));
      end else stalls++;
      check_outputs();
    end
    if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
