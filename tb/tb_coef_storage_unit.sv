// tb_coef_storage_unit: self-checking test of the coefficient storage unit.
// Random channel numbers are presented with a random enable; after every
// edge the M x L weight vectors must equal the reference table of the last
// enabled channel (taps past N read zero), one clock after the request.
module tb_coef_storage_unit;
  localparam int L = 4;
  localparam int N = 6;
  localparam int CW = 8;
  localparam int NCH = 4;
  localparam int M = 2;
  localparam int REF [NCH][N] = '{
    '{0, 1, 2, 3, 4, 5},
    '{5, 4, 3, 2, 1, 0},
    '{1, 0, 0, 0, 0, 0},
    '{-3, 7, -12, 25, 100, -128}
  };

  logic clk = 1'b0;
  logic rst_n;
  logic en;
  logic [1:0] ch;
  logic signed [CW-1:0] c [M][L];
  int checks = 0;
  int failures = 0;
  int cur_ch = -1;   // -1: reset state, all zero

  always #5 clk = ~clk;

  coef_storage_unit dut (.clk, .rst_n, .en, .ch, .c);

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_outputs();
    for (int m = 0; m < M; m++)
      for (int j = 0; j < L; j++) begin
        int e;
        e = (cur_ch < 0 || m * L + j >= N) ? 0 : REF[cur_ch][m*L+j];
        checks++;
        if (c[m][j] !== CW'(e)) begin
          failures++;
          $display("FAIL ch=%0d c[%0d][%0d]=%0d expected %0d", cur_ch, m, j, c[m][j], e);
        end
      end
  endtask

  initial begin
    rst_n = 1'b0;
    en = 1'b0;
    ch = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check_outputs();
    for (int cyc = 0; cyc < 200; cyc++) begin
      en = ($urandom_range(0, 2) != 0);
      ch = 2'($urandom);
      @(posedge clk);
      #1;
      if (en) cur_ch = int'(ch);
      check_outputs();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
