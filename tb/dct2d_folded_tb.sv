// dct2d_folded_tb: end-to-end check of the folded 2D HEVC engine.
//
// Random blocks in all five sizes (one 32x32, 2x16x16, 4x8x8, 8x4x4 or
// 16x2x2 per block period) are fed row by row, with random input pauses in
// the first part and a continuous stream in the second. Every output
// coefficient is compared with the two-pass HEVC reference (dct_ref_pkg),
// each block must give exactly N*N outputs ending with out_last, and with a
// continuous input the time from a block's first row to its last output
// and the block period are checked. Counted mechanisms: each size, input
// pauses, back-pressure (in_valid while not ready), clipping-size inputs,
// and (parallel engine) blocks whose column pass had to wait for the
// column core.
module dct2d_folded_tb;
  timeunit 1ns; timeprecision 1ps;
  import dct_pkg::*;
  import dct_ref_pkg::*;

  localparam int NBLK = 22;
  localparam bit PAR  = 0;

  logic              clk = 0, rst_n = 0;
  se_t               se_in;
  logic              in_valid = 0, in_ready;
  logic signed [8:0] in_row [32];
  logic              out_valid, out_last;
  se_t               out_se;
  logic [4:0]        out_u, out_k;
  word_t             out_coef [16];

  dct2d_folded dut (.clk(clk), .rst_n(rst_n), .se_in(se_in), .in_valid(in_valid),
                    .in_ready(in_ready), .in_row(in_row), .out_valid(out_valid), .out_se(out_se),
                    .out_u(out_u), .out_k(out_k), .out_coef(out_coef), .out_last(out_last));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  int mode_seen [5];
  int pauses = 0, stalls = 0, extremes = 0, timed = 0, waits = 0;
  int hand;

  // per block: size, reference, timing
  int     blk_se [NBLK];
  longint yref [NBLK][16][32][32];
  int     first_acc [NBLK];
  int     last_out [NBLK];
  bit     cont [NBLK];
  int     out_cnt [NBLK];
  bit     waited [NBLK];
  int     ob = 0;   // block being output

  always @(posedge clk) cyc <= cyc + 1;

  // driver
  initial begin
    longint x [32][32];
    longint y [32][32];
    longint xs [16][32][32];
    se_in = '0;
    for (int j = 0; j < 32; j++) in_row[j] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < NBLK; b++) begin
      int l2n, n, kind;
      blk_se[b] = (b < 10) ? b % 5 : $urandom_range(0, 4);
      if (b == 10) blk_se[b] = 0;   // a large block followed by small ones
      l2n = 5 - blk_se[b];
      n = 1 << l2n;
      cont[b] = (b >= 12);
      kind = $urandom_range(0, 5);
      if (kind == 0) extremes++;
      mode_seen[blk_se[b]]++;
      for (int r = 0; r < n; r++)
        for (int j = 0; j < 32; j++) begin
          int v;
          v = (kind == 0) ? ((j % 2) ? 255 : -256) : $urandom_range(0, 510) - 255;
          xs[j / n][r][j % n] = v;
        end
      for (int s = 0; s < 32 / n; s++) begin
        for (int r = 0; r < n; r++) for (int i = 0; i < n; i++) x[r][i] = xs[s][r][i];
        ref_2d(l2n, 8, x, y);
        for (int u = 0; u < n; u++) for (int k = 0; k < n; k++) yref[b][s][u][k] = y[u][k];
      end
      for (int r = 0; r < n; r++) begin
        if (!cont[b] && $urandom_range(0, 3) == 0) begin
          pauses++;
          in_valid = 1'b0;
          repeat ($urandom_range(1, 6)) @(negedge clk);
        end
        in_valid = 1'b1;
        se_in = se_t'(blk_se[b]);
        for (int j = 0; j < 32; j++) in_row[j] = 9'(xs[j / n][r][j % n]);
        @(posedge clk);
        while (!in_ready) begin
          stalls++;
          @(posedge clk);
        end
        if (r == 0) first_acc[b] = cyc;
        @(negedge clk);
        se_in = se_t'($urandom_range(0, 4));   // ignored after the first row
      end
      in_valid = 1'b0;
    end
  end

  // checker
  always @(negedge clk) begin
    if (rst_n && out_valid && ob < NBLK) begin
      int l2n, n;
      l2n = 5 - blk_se[ob];
      n = 1 << l2n;
      checks++;
      if (int'(out_se) != blk_se[ob]) failures++;
      for (int s = 0; s < 32 / n; s++) begin
        checks++;
        if (longint'(out_coef[s]) != yref[ob][s][out_u][out_k]) begin
          failures++;
          if (failures < 10)
            $display("blk %0d N=%0d s=%0d (u=%0d,k=%0d) got=%0d exp=%0d", ob, n, s, out_u, out_k,
                     out_coef[s], yref[ob][s][out_u][out_k]);
        end
      end
      out_cnt[ob]++;
      if (out_last) begin
        checks++;
        if (out_cnt[ob] != n * n) begin
          failures++;
          $display("blk %0d: %0d outputs, expected %0d", ob, out_cnt[ob], n * n);
        end
        last_out[ob] = cyc;
        // latency from first row to last output with continuous input
        if (cont[ob]) begin
          checks++;
          timed++;
          // the column pass starts when the row pass is done (N*N rows
          // cycles + 2 drain cycles) and, in the parallel engine, the column
          // core has finished the previous block
          hand = first_acc[ob] + n * n + 2;
          if (PAR && ob > 0 && last_out[ob-1] - 2 > hand) begin
            hand = last_out[ob-1] - 2;
            waited[ob] = 1'b1;
            waits++;
          end
          if (last_out[ob] - hand != n * n + 3) begin
            failures++;
            $display("blk %0d latency %0d, expected %0d", ob, last_out[ob] - first_acc[ob],
                     hand + n * n + 3 - first_acc[ob]);
          end
          if (ob > 0 && cont[ob-1] && blk_se[ob] == blk_se[ob-1] && !waited[ob-1]) begin
            int per;
            per = PAR ? n * n + 3 : 2 * n * n + 3;
            checks++;
            if (first_acc[ob] - first_acc[ob-1] != per) begin
              failures++;
              $display("blk %0d period %0d, expected %0d", ob, first_acc[ob] - first_acc[ob-1], per);
            end
          end
        end
        ob++;
        if (ob == NBLK) begin
          for (int m = 0; m < 5; m++) if (mode_seen[m] == 0) failures++;
          if (pauses == 0 || stalls == 0 || extremes == 0 || timed == 0) failures++;
          if (PAR && waits == 0) failures++;
          $display("sizes %0d/%0d/%0d/%0d/%0d pauses=%0d stalls=%0d extreme_blocks=%0d timed=%0d column_waits=%0d",
                   mode_seen[0], mode_seen[1], mode_seen[2], mode_seen[3], mode_seen[4], pauses,
                   stalls, extremes, timed, waits);
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog: %0d blocks done", ob);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
