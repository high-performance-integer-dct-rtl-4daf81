// image256_tb: the 8x8 DCT engine on a whole 256x256 8-bit image (1024
// blocks of 8x8), streamed in raster order of blocks with no pauses.
//
// The image is synthetic: a diagonal ramp, a periodic texture and random
// noise, so that both flat and busy blocks occur. Every coefficient of
// every block is compared with the bit-exact row/column reference of
// dct_ref_pkg. With a continuous stream the engine must never stall, and
// the last coefficient must leave 8192 + 9 cycles after the first row is
// taken (one row per cycle, then the final block's drain and the two DCT
// stages).
module image256_tb;
  timeunit 1ns; timeprecision 1ps;
  import dct_ref_pkg::*;

  localparam int SIDE = 256;
  localparam int NBLK = (SIDE / 8) * (SIDE / 8);

  logic               clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid;
  logic [7:0]         in_row [8];
  logic [2:0]         out_v;
  logic signed [11:0] out_coef [8];
  logic [7:0]         img [SIDE][SIDE];
  int checks = 0, failures = 0, stalls = 0;
  int ob = 0, cyc = 0, t_first = -1;
  int yref [8][8];

  dct8x8_2d dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
                 .in_row(in_row), .out_valid(out_valid), .out_v(out_v), .out_coef(out_coef));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // reference of block b (raster order of 8x8 blocks)
  function automatic void block_ref(int b);
    int z [8][8];
    int t [8];
    int by, bx;
    by = (b / (SIDE / 8)) * 8;
    bx = (b % (SIDE / 8)) * 8;
    for (int r = 0; r < n8; r++) begin
      for (int c = 0; c < n8; c++) t[c] = int'(img[by + r][bx + c]);
      for (int k = 0; k < n8; k++) z[r][k] = ref_dct8(k, t);
    end
    for (int v = 0; v < n8; v++) begin
      for (int r = 0; r < n8; r++) t[r] = z[r][v];
      for (int u = 0; u < n8; u++) yref[u][v] = ref_dct8(u, t);
    end
  endfunction

  initial begin
    for (int y = 0; y < SIDE; y++)
      for (int x = 0; x < SIDE; x++)
        img[y][x] = 8'((((x + y) / 2) + (((x / 8) % 3 == 0) ? ((x * y) % 13) * 9 : 0) +
                       $urandom_range(0, 15)) % 256);
    for (int c = 0; c < 8; c++) in_row[c] = '0;
    block_ref(0);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < NBLK; b++)
      for (int r = 0; r < 8; r++) begin
        in_valid = 1'b1;
        for (int c = 0; c < 8; c++) in_row[c] = img[(b / (SIDE / 8)) * 8 + r][(b % (SIDE / 8)) * 8 + c];
        @(posedge clk);
        while (!in_ready) begin stalls++; @(posedge clk); end
        if (t_first < 0) t_first = cyc;
        @(negedge clk);
      end
    in_valid = 1'b0;
  end

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      for (int u = 0; u < 8; u++) begin
        checks++;
        if (int'(out_coef[u]) != yref[u][out_v]) begin
          failures++;
          if (failures < 10) $display("blk %0d (u=%0d,v=%0d) got=%0d exp=%0d", ob, u, out_v, out_coef[u], yref[u][out_v]);
        end
      end
      if (out_v == 3'd7) begin
        ob++;
        if (ob < NBLK) block_ref(ob);
        else begin
          checks += 2;
          if (stalls != 0) failures++;
          if (cyc - t_first != 8 * NBLK + 9) begin
            failures++;
            $display("image took %0d cycles, expected %0d", cyc - t_first, 8 * NBLK + 9);
          end
          $display("blocks=%0d cycles=%0d stalls=%0d", ob, cyc - t_first, stalls);
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
    end
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog: %0d blocks out", ob);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
