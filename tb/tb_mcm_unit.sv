// tb_mcm_unit: self-checking test of the MCM unit.
// One instance per sample position S = 0..6 of an L = 4, N = 16 block, with
// a coefficient set that has positive, negative, zero and repeated values,
// values with long runs of ones (so both +1 and -1 CSD digits occur) and
// values that share an odd fundamental (5 and -5; -3 and 96; 15 inside 60).
// For random and extreme inputs every product must equal x * h(i), where
// the tap i of each product is enumerated here independently (m outer, j
// inner over the columns that hold the sample).
module tb_mcm_unit;
  localparam int L = 4;
  localparam int N = 16;
  localparam int W = 8;
  localparam int OW = 16;
  localparam int CB = 9;
  localparam int M = 4;
  localparam int H [N] = '{7, -5, 13, 0, 127, -128, 7, 85, -1, 1, 2, 96, -77, 5, 60, -3};

  logic signed [W-1:0] x;
  int checks = 0;
  int failures = 0;

  // Expected product t of sample s.
  function automatic int exp_prod(int s, int t, int xv);
    int k;
    k = 0;
    for (int m = 0; m < M; m++)
      for (int j = 0; j < L; j++)
        if (s - j >= 0 && s - j < L) begin
          if (k == t) return xv * H[m*L+j];
          k++;
        end
    return 0;
  endfunction

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar s = 0; s < 2 * L - 1; s++) begin : g_s
    localparam int NJ = (s < 2 * L - 2 - s ? s : 2 * L - 2 - s) + 1;
    localparam int K = M * NJ;
    logic signed [OW-1:0] p [K];
    mcm_unit #(.L(L), .N(N), .W(W), .OW(OW), .CB(CB), .S(s), .H(H)) dut (.x, .p);
  end

  task automatic check_all();
    int xv;
    xv = int'(x);
    for (int t = 0; t < 4; t++) begin checks++; if (g_s[0].p[t] !== OW'(exp_prod(0, t, xv))) begin failures++; $display("FAIL s=0 t=%0d", t); end end
    for (int t = 0; t < 8; t++) begin checks++; if (g_s[1].p[t] !== OW'(exp_prod(1, t, xv))) begin failures++; $display("FAIL s=1 t=%0d", t); end end
    for (int t = 0; t < 12; t++) begin checks++; if (g_s[2].p[t] !== OW'(exp_prod(2, t, xv))) begin failures++; $display("FAIL s=2 t=%0d", t); end end
    for (int t = 0; t < 16; t++) begin checks++; if (g_s[3].p[t] !== OW'(exp_prod(3, t, xv))) begin failures++; $display("FAIL s=3 t=%0d x=%0d got %0d", t, xv, g_s[3].p[t]); end end
    for (int t = 0; t < 12; t++) begin checks++; if (g_s[4].p[t] !== OW'(exp_prod(4, t, xv))) begin failures++; $display("FAIL s=4 t=%0d", t); end end
    for (int t = 0; t < 8; t++) begin checks++; if (g_s[5].p[t] !== OW'(exp_prod(5, t, xv))) begin failures++; $display("FAIL s=5 t=%0d", t); end end
    for (int t = 0; t < 4; t++) begin checks++; if (g_s[6].p[t] !== OW'(exp_prod(6, t, xv))) begin failures++; $display("FAIL s=6 t=%0d", t); end end
  endtask

  initial begin
    for (int it = 0; it < 300; it++) begin
      case (it)
        0: x = 8'sd1;
        1: x = -8'sd128;
        2: x = 8'sd127;
        3: x = -8'sd1;
        default: x = W'($urandom);
      endcase
      #1;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
