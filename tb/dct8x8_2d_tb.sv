// dct8x8_2d_tb: random 8x8 pixel blocks (and flat / extreme ones) streamed
// with and without pauses. Each output column is compared with the
// bit-exact reference: the 8-point DCT model applied to the rows, then to
// the columns of the 12-bit row results. The DC term of a flat block must
// be 8 times the pixel value, within the error of the 8-bit coefficient
// fraction (C4 is 91/256 instead of 90.51/256). Counts blocks that drained on their own and
// blocks that left while the next one streamed in.
module dct8x8_2d_tb;
  timeunit 1ns; timeprecision 1ps;
  import dct_ref_pkg::*;

  logic               clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid;
  logic [7:0]         in_row [8];
  logic [2:0]         out_v;
  logic signed [11:0] out_coef [8];
  int checks = 0, failures = 0, gaps = 0, flat = 0;
  int yref [48][8][8];   // [block][u][v]
  int ob = 0;

  dct8x8_2d dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
                              .in_row(in_row), .out_valid(out_valid), .out_v(out_v),
                              .out_coef(out_coef));

  always #5 clk = ~clk;

  initial begin
    int x [8][8];
    int z [8][8];
    int t [8];
    for (int c = 0; c < 8; c++) in_row[c] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < 48; b++) begin
      int kind;
      kind = b % 6;
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++)
          x[r][c] = (kind == 0) ? 200 : (kind == 1) ? (((r + c) % 2) ? 255 : 0) : $urandom_range(0, 255);
      if (kind == 0) flat++;
      for (int r = 0; r < 8; r++) begin
        for (int c = 0; c < 8; c++) t[c] = x[r][c];
        for (int k = 0; k < 8; k++) z[r][k] = ref_dct8(k, t);
      end
      for (int v = 0; v < 8; v++) begin
        for (int r = 0; r < 8; r++) t[r] = z[r][v];
        for (int u = 0; u < 8; u++) yref[b][u][v] = ref_dct8(u, t);
      end
      for (int r = 0; r < 8; r++) begin
        in_valid = 1'b1;
        for (int c = 0; c < 8; c++) in_row[c] = 8'(x[r][c]);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        @(negedge clk);
      end
      if (b % 4 == 3) begin
        gaps++;
        in_valid = 1'b0;
        repeat ($urandom_range(1, 14)) @(negedge clk);
      end
    end
    in_valid = 1'b0;
  end

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      for (int u = 0; u < 8; u++) begin
        checks++;
        if (int'(out_coef[u]) != yref[ob][u][out_v]) begin
          failures++;
          if (failures < 10) $display("blk %0d (u=%0d,v=%0d) got=%0d exp=%0d", ob, u, out_v, out_coef[u], yref[ob][u][out_v]);
        end
      end
      if (ob % 6 == 0 && out_v == 0) begin
        checks++;
        if (out_coef[0] < 12'sd1580 || out_coef[0] > 12'sd1620) failures++;
      end
      if (out_v == 3'd7) begin
        ob++;
        if (ob == 48) begin
          checks++;
          if (gaps == 0 || flat == 0) failures++;
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
    end
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog: %0d blocks out", ob);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
