// block_fir_harness: drives and checks one block FIR of any size, for the
// testbenches that run several block sizes side by side.
//
// RECONF = 1 instantiates reconf_block_fir with two channels (RC[0], RC[1],
// 8-bit coefficients) and switches between them at random; RECONF = 0
// instantiates fixed_block_fir with the constants FH. Random 8-bit blocks are
// offered with random stalls. Each output block is compared with
//   y(n) = sum_i h_{ch(k - i/L)}(i) x(n-i)   (modulo 2^OW)
// where k is the block of sample n (the fixed filter always uses channel 0),
// and must leave two clock edges after its input. When NBLK blocks have
// been sent and all outputs checked, done rises and the counters are final.
module block_fir_harness #(
  parameter bit RECONF = 1'b1,
  parameter int L      = 2,
  parameter int N      = 6,
  parameter int OW     = 16,
  parameter int NBLK   = 300,
  parameter logic signed [7:0] RC [2][N] = '{default: '{default: 8'sd1}},
  parameter int FH [N] = '{default: 1}
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   stalls,
  output int   switches
);

  logic                 in_valid;
  logic signed [7:0]    x_blk [L];
  logic                 ch;
  logic                 out_valid;
  logic signed [OW-1:0] y_blk [L];

  int cycle = 0;
  int xs [$];
  int chs [$];
  int acc [$];
  int nout = 0;
  bit sent = 0;

  always @(posedge clk) cycle <= cycle + 1;

  if (RECONF) begin : g_rc
    reconf_block_fir #(.L(L), .N(N), .W(8), .CW(8), .OW(OW), .NCH(2), .COEF(RC)) dut (
      .clk, .rst_n, .in_valid, .x_blk, .ch, .out_valid, .y_blk
    );
  end else begin : g_fx
    fixed_block_fir #(.L(L), .N(N), .W(8), .CW(8), .OW(OW), .H(FH)) dut (
      .clk, .rst_n, .in_valid, .x_blk, .out_valid, .y_blk
    );
  end

  function automatic int coef(int c, int i);
    return RECONF ? int'(RC[c][i]) : FH[i];
  endfunction

  function automatic int ref_y(int n);
    int k, e;
    k = n / L;
    e = 0;
    for (int i = 0; i < N; i++)
      if (n - i >= 0) e += coef(chs[k-i/L], i) * xs[n-i];
    return e;
  endfunction

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (nout >= acc.size() || cycle - acc[nout] != 2) begin
        failures++;
        $display("FAIL L=%0d N=%0d output timing", L, N);
      end else begin
        for (int l = 0; l < L; l++) begin
          int e;
          e = ref_y(L * nout + L - 1 - l);
          checks++;
          if (y_blk[l] !== OW'(e)) begin
            failures++;
            $display("FAIL L=%0d N=%0d block %0d y[%0d]=%0d expected %0d",
                     L, N, nout, l, y_blk[l], OW'(e));
          end
        end
      end
      nout++;
    end
    done <= sent && nout == acc.size();
  end

  initial begin
    int c, prev_c;
    bit v;
    checks = 0;
    failures = 0;
    stalls = 0;
    switches = 0;
    done = 1'b0;
    in_valid = 1'b0;
    ch = 1'b0;
    foreach (x_blk[l]) x_blk[l] = '0;
    @(posedge rst_n);
    #1;
    prev_c = 0;
    for (int b = 0; b < NBLK; b++) begin
      v = ($urandom_range(0, 4) != 0);
      c = (RECONF && $urandom_range(0, 9) == 0) ? 1 - prev_c : prev_c;
      in_valid = v;
      ch = c[0];
      foreach (x_blk[l]) x_blk[l] = 8'($urandom);
      @(posedge clk);
      if (v) begin
        if (c != prev_c) switches++;
        prev_c = c;
        acc.push_back(cycle);
        for (int l = L - 1; l >= 0; l--) xs.push_back(int'(x_blk[l]));
        chs.push_back(c);
      end else stalls++;
      #1;
    end
    in_valid = 1'b0;
    sent = 1;
  end

endmodule
