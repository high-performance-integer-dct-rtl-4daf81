// dct1d_32_tb: the 1D core in all five modes. Each cycle a random 32-sample
// vector and frequency k are applied; two cycles later the tree level log2N
// must hold sum_n C_N[k][n] * x[s*N+n] for every sub-transform s. Also checks
// the two-cycle latency by comparing against the inputs of two cycles
// before.
module dct1d_32_tb;
  timeunit 1ns; timeprecision 1ps;
  import dct_pkg::*;
  import dct_ref_pkg::*;

  logic               clk = 0;
  logic signed [15:0] x [32];
  se_t                se;
  logic [4:0]         k;
  sum_t               lvl [5][16];
  int checks = 0, failures = 0;
  int cyc = 0;

  // inputs of earlier cycles for the latency check
  logic signed [15:0] xh [3][32];
  int                 seh [3], kh [3];

  dct1d_32 dut (.clk(clk), .x(x), .se(se), .k(k), .lvl(lvl));

  always #5 clk = ~clk;

  initial begin
    for (int j = 0; j < 32; j++) x[j] = '0;
    se = '0;
    k  = '0;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      // check the result of the inputs applied two cycles ago
      if (t >= 2) begin
        int l2n, n;
        l2n = 5 - seh[1];
        n = 1 << l2n;
        for (int s = 0; s < 32 / n; s++) begin
          longint e;
          e = 0;
          for (int i = 0; i < n; i++) e += longint'(ref_coef(l2n, kh[1], i)) * xh[1][s * n + i];
          checks++;
          if (longint'(lvl[l2n-1][s]) != e) begin
            failures++;
            if (failures < 10) $display("t=%0d N=%0d k=%0d s=%0d got=%0d exp=%0d", t, n, kh[1], s, lvl[l2n-1][s], e);
          end
        end
      end
      // new inputs: mostly 9-bit residuals, sometimes full 16-bit
      se = 3'($urandom_range(0, 4));
      k  = 5'($urandom_range(0, (32 >> se) - 1));
      for (int j = 0; j < 32; j++)
        x[j] = (t % 5 == 0) ? 16'($urandom) : 16'($signed(9'($urandom)));
      xh[1] = xh[0];
      seh[1] = seh[0];
      kh[1] = kh[0];
      xh[0] = x;
      seh[0] = int'(se);
      kh[0] = int'(k);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
