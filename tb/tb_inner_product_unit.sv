// tb_inner_product_unit: self-checking test of the inner-product unit.
// Random samples and weights (including the extreme values) are applied and
// each of the L outputs is compared with sum_j x(Lk-l-j) c[j] computed in
// integer arithmetic and reduced modulo 2^OW.
module tb_inner_product_unit;
  localparam int L = 4;
  localparam int W = 8;
  localparam int CW = 8;
  localparam int OW = 16;

  logic signed [W-1:0]  smp [2*L-1];
  logic signed [CW-1:0] c [L];
  logic signed [OW-1:0] r [L];
  int checks = 0;
  int failures = 0;

  inner_product_unit #(.L(L), .W(W), .CW(CW), .OW(OW)) dut (.smp, .c, .r);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 500; it++) begin
      for (int s = 0; s < 2 * L - 1; s++)
        smp[s] = (it < 2) ? W'(it == 0 ? -128 : 127) : W'($urandom);
      for (int j = 0; j < L; j++)
        c[j] = (it < 2) ? CW'(-128) : CW'($urandom);
      #1;
      for (int l = 0; l < L; l++) begin
        int e;
        e = 0;
        for (int j = 0; j < L; j++) e += int'(smp[l+j]) * int'(c[j]);
        checks++;
        if (r[l] !== OW'(e)) begin
          failures++;
          $display("FAIL r[%0d]=%0d expected %0d", l, r[l], OW'(e));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
