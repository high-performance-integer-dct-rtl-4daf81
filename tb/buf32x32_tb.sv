// buf32x32_tb: writes a whole N x N (x 32/N) row-pass result into the buffer
// the way the row-pass controller does (row s*N+k enabled for frequency k,
// value from the level log2N input of sub-transform s), then reads every
// column rd_k back and checks the transposed vector, in all five modes.
module buf32x32_tb;
  timeunit 1ns; timeprecision 1ps;
  import dct_pkg::*;

  logic               clk = 0;
  se_t                se, rd_se;
  logic [31:0]        en;
  logic signed [15:0] din [5][16];
  logic [4:0]         rd_k;
  logic signed [15:0] rd_vec [32];
  logic signed [15:0] z [16][32][32];   // z[s][r][k]
  int checks = 0, failures = 0;

  buf32x32 dut (.clk(clk), .se(se), .en(en), .din(din), .rd_se(rd_se), .rd_k(rd_k),
                          .rd_vec(rd_vec));

  always #5 clk = ~clk;

  initial begin
    en = '0;
    rd_k = '0;
    for (int rep = 0; rep < 10; rep++) begin
      int l2n, n;
      se = 3'(rep % 5);
      rd_se = se;
      l2n = 5 - (rep % 5);
      n = 1 << l2n;
      for (int r = 0; r < n; r++)
        for (int kk = 0; kk < n; kk++) begin
          @(negedge clk);
          for (int l = 0; l < 5; l++)
            for (int s = 0; s < 16; s++) din[l][s] = 16'($urandom);  // other levels: noise
          en = '0;
          for (int s = 0; s < 32 / n; s++) begin
            z[s][r][kk] = din[l2n-1][s];
            en[s * n + kk] = 1'b1;
          end
        end
      @(negedge clk);
      en = '0;
      for (int kk = 0; kk < n; kk++) begin
        rd_k = 5'(kk);
        #1;
        for (int j = 0; j < 32; j++) begin
          checks++;
          if (rd_vec[j] != z[j / n][j % n][kk]) begin
            failures++;
            if (failures < 10) $display("N=%0d k=%0d j=%0d got=%0d exp=%0d", n, kk, j, rd_vec[j], z[j/n][j%n][kk]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
