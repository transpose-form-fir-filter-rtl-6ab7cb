// tb_pipelined_adder_unit: self-checking test of the pipelined adder unit.
// Two instances (M = 2, the default, and M = 3) are fed random partial
// blocks with a random enable. A reference keeps the partial blocks of the
// consumed steps and predicts y_k = sum_m r_{k-m}^m after every enabled
// edge; stalled edges must leave y unchanged.
module tb_pipelined_adder_unit;
  localparam int L = 4;
  localparam int OW = 16;

  logic clk = 1'b0;
  logic rst_n;
  logic en;
  logic signed [OW-1:0] r2 [2][L];
  logic signed [OW-1:0] r3 [3][L];
  logic signed [OW-1:0] y2 [L];
  logic signed [OW-1:0] y3 [L];
  int checks = 0;
  int failures = 0;
  int e2 [L];
  int e3 [L];
  int stalls = 0;

  always #5 clk = ~clk;

  pipelined_adder_unit dut2 (.clk, .rst_n, .en, .r(r2), .y(y2));
  pipelined_adder_unit #(.M(3), .L(L), .OW(OW)) dut3 (.clk, .rst_n, .en, .r(r3), .y(y3));

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  initial begin
    int hist2 [$][8];
    int hist3 [$][12];
    int cur2 [8];
    int cur3 [12];
    rst_n = 1'b0;
    en = 1'b0;
    foreach (r2[m, l]) r2[m][l] = '0;
    foreach (r3[m, l]) r3[m][l] = '0;
    foreach (e2[l]) e2[l] = 0;
    foreach (e3[l]) e3[l] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int cyc = 0; cyc < 300; cyc++) begin
      en = ($urandom_range(0, 3) != 0);
      foreach (r2[m, l]) begin r2[m][l] = OW'($urandom); cur2[m*L+l] = int'(r2[m][l]); end
      foreach (r3[m, l]) begin r3[m][l] = OW'($urandom); cur3[m*L+l] = int'(r3[m][l]); end
      @(posedge clk);
      #1;
      if (en) begin
        hist2.push_front(cur2);
        hist3.push_front(cur3);
        for (int l = 0; l < L; l++) begin
          e2[l] = 0;
          for (int m = 0; m < 2; m++) if (m < hist2.size()) e2[l] += hist2[m][m*L+l];
          e3[l] = 0;
          for (int m = 0; m < 3; m++) if (m < hist3.size()) e3[l] += hist3[m][m*L+l];
        end
      end else stalls++;
      for (int l = 0; l < L; l++) begin
        checks += 2;
        if (y2[l] !== OW'(e2[l])) begin
          failures++;
          $display("FAIL M=2 y[%0d]=%0d expected %0d", l, y2[l], OW'(e2[l]));
        end
        if (y3[l] !== OW'(e3[l])) begin
          failures++;
          $display("FAIL M=3 y[%0d]=%0d expected %0d", l, y3[l], OW'(e3[l]));
        end
      end
    end
    if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
