// hevc_dct_top_tb: end-to-end test of the whole design at its default
// parameters (32-point core, 8-bit video, 8x8 pixel engine).
//
// The folded and the parallel HEVC engines get the same stream of blocks:
// full 32x32 blocks and 2x16x16, 4x8x8, 8x4x4, 16x2x2 groups, with input
// pauses, and a stretch of back-to-back blocks. Every coefficient of both
// is compared with the two-pass HEVC reference. Meanwhile the 8x8 engine
// transforms a stream of pixel blocks, checked against the 8-point
// reference. Mechanisms counted (each must occur): every transform size,
// input pauses, back-pressure on each HEVC engine, the parallel engine's
// row/column overlap and its wait for a busy column core, the 8x8
// transpose draining on its own and streaming while the next block enters.
module hevc_dct_top_tb;
  timeunit 1ns; timeprecision 1ps;
  import dct_pkg::*;
  import dct_ref_pkg::*;

  localparam int NBLK = 14;
  localparam int NB8  = 24;

  logic              clk = 0, rst_n = 0;
  se_t               f_se, p_se;
  logic              f_in_valid = 0, p_in_valid = 0, f_in_ready, p_in_ready;
  logic signed [8:0] f_in_row [32];
  logic signed [8:0] p_in_row [32];
  logic              f_out_valid, p_out_valid, f_out_last, p_out_last;
  se_t               f_out_se, p_out_se;
  logic [4:0]        f_out_u, f_out_k, p_out_u, p_out_k;
  word_t             f_out_coef [16];
  word_t             p_out_coef [16];
  logic              e_in_valid = 0, e_in_ready, e_out_valid;
  logic [7:0]        e_in_row [8];
  logic [2:0]        e_out_v;
  logic signed [11:0] e_out_coef [8];

  hevc_dct_top dut (
    .clk(clk), .rst_n(rst_n),
    .f_se(f_se), .f_in_valid(f_in_valid), .f_in_ready(f_in_ready), .f_in_row(f_in_row),
    .f_out_valid(f_out_valid), .f_out_se(f_out_se), .f_out_u(f_out_u), .f_out_k(f_out_k),
    .f_out_coef(f_out_coef), .f_out_last(f_out_last),
    .p_se(p_se), .p_in_valid(p_in_valid), .p_in_ready(p_in_ready), .p_in_row(p_in_row),
    .p_out_valid(p_out_valid), .p_out_se(p_out_se), .p_out_u(p_out_u), .p_out_k(p_out_k),
    .p_out_coef(p_out_coef), .p_out_last(p_out_last),
    .e_in_valid(e_in_valid), .e_in_ready(e_in_ready), .e_in_row(e_in_row),
    .e_out_valid(e_out_valid), .e_out_v(e_out_v), .e_out_coef(e_out_coef)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int sizes [5];
  int pauses = 0, f_stalls = 0, p_stalls = 0, overlap = 0, col_waits = 0;
  int e_drains = 0, e_streams = 0;

  int     blk_se [NBLK];
  logic signed [8:0] xin [NBLK][32][32];   // [block][row][sample]
  longint yref [NBLK][16][32][32];
  int     yref8 [NB8][8][8];
  int     fob = 0, pob = 0, eob = 0;
  int     fcnt = 0, pcnt = 0;
  bit     f_done = 0, p_done = 0, e_done = 0;

  // stimulus and reference for the HEVC engines
  initial begin
    longint x [32][32];
    longint y [32][32];
    for (int b = 0; b < NBLK; b++) begin
      int l2n, n;
      blk_se[b] = (b < 5) ? (b == 0 ? 0 : 5 - b) : (b == 5 ? 0 : $urandom_range(1, 4));
      l2n = 5 - blk_se[b];
      n = 1 << l2n;
      sizes[blk_se[b]]++;
      for (int r = 0; r < n; r++)
        for (int j = 0; j < 32; j++) xin[b][r][j] = 9'($urandom_range(0, 510) - 255);
      for (int s = 0; s < 32 / n; s++) begin
        for (int r = 0; r < n; r++) for (int i = 0; i < n; i++) x[r][i] = xin[b][r][s * n + i];
        ref_2d(l2n, 8, x, y);
        for (int u = 0; u < n; u++) for (int k = 0; k < n; k++) yref[b][s][u][k] = y[u][k];
      end
    end
  end

  task automatic drive_f();
    for (int b = 0; b < NBLK; b++) begin
      int n;
      n = 32 >> blk_se[b];
      for (int r = 0; r < n; r++) begin
        if (b < 5 && $urandom_range(0, 3) == 0) begin
          pauses++;
          f_in_valid = 1'b0;
          repeat ($urandom_range(1, 5)) @(negedge clk);
        end
        f_in_valid = 1'b1;
        f_se = se_t'(blk_se[b]);
        f_in_row = xin[b][r];
        @(posedge clk);
        while (!f_in_ready) begin f_stalls++; @(posedge clk); end
        @(negedge clk);
      end
    end
    f_in_valid = 1'b0;
  endtask

  task automatic drive_p();
    for (int b = 0; b < NBLK; b++) begin
      int n;
      n = 32 >> blk_se[b];
      for (int r = 0; r < n; r++) begin
        if (b < 5 && $urandom_range(0, 3) == 0) begin
          p_in_valid = 1'b0;
          repeat ($urandom_range(1, 5)) @(negedge clk);
        end
        p_in_valid = 1'b1;
        p_se = se_t'(blk_se[b]);
        p_in_row = xin[b][r];
        @(posedge clk);
        while (!p_in_ready) begin p_stalls++; @(posedge clk); end
        @(negedge clk);
      end
    end
    p_in_valid = 1'b0;
  endtask

  task automatic drive_e();
    int x [8][8];
    int z [8][8];
    int t [8];
    for (int b = 0; b < NB8; b++) begin
      for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++) x[r][c] = $urandom_range(0, 255);
      for (int r = 0; r < 8; r++) begin
        for (int c = 0; c < 8; c++) t[c] = x[r][c];
        for (int k = 0; k < 8; k++) z[r][k] = ref_dct8(k, t);
      end
      for (int v = 0; v < 8; v++) begin
        for (int r = 0; r < 8; r++) t[r] = z[r][v];
        for (int u = 0; u < 8; u++) yref8[b][u][v] = ref_dct8(u, t);
      end
      for (int r = 0; r < 8; r++) begin
        e_in_valid = 1'b1;
        for (int c = 0; c < 8; c++) e_in_row[c] = 8'(x[r][c]);
        @(posedge clk);
        while (!e_in_ready) @(posedge clk);
        @(negedge clk);
      end
      if (b % 3 == 2) begin
        e_in_valid = 1'b0;
        repeat (10) @(negedge clk);
      end
    end
    e_in_valid = 1'b0;
  endtask

  initial begin
    f_se = '0;
    p_se = '0;
    for (int j = 0; j < 32; j++) begin f_in_row[j] = '0; p_in_row[j] = '0; end
    for (int c = 0; c < 8; c++) e_in_row[c] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      drive_f();
      drive_p();
      drive_e();
    join
  end

  // output checks
  always @(negedge clk) begin
    if (rst_n && f_out_valid && fob < NBLK) begin
      int n;
      n = 32 >> blk_se[fob];
      for (int s = 0; s < 32 / n; s++) begin
        checks++;
        if (longint'(f_out_coef[s]) != yref[fob][s][f_out_u][f_out_k]) begin
          failures++;
          if (failures < 10) $display("folded blk %0d s=%0d (%0d,%0d) got=%0d exp=%0d", fob, s,
                                      f_out_u, f_out_k, f_out_coef[s], yref[fob][s][f_out_u][f_out_k]);
        end
      end
      fcnt++;
      if (f_out_last) begin
        checks++;
        if (fcnt != n * n) failures++;
        fcnt = 0;
        fob++;
        if (fob == NBLK) f_done = 1;
      end
    end
    if (rst_n && p_out_valid && pob < NBLK) begin
      int n;
      n = 32 >> blk_se[pob];
      for (int s = 0; s < 32 / n; s++) begin
        checks++;
        if (longint'(p_out_coef[s]) != yref[pob][s][p_out_u][p_out_k]) begin
          failures++;
          if (failures < 10) $display("parallel blk %0d s=%0d (%0d,%0d) got=%0d exp=%0d", pob, s,
                                      p_out_u, p_out_k, p_out_coef[s], yref[pob][s][p_out_u][p_out_k]);
        end
      end
      pcnt++;
      if (p_out_last) begin
        checks++;
        if (pcnt != n * n) failures++;
        pcnt = 0;
        pob++;
        if (pob == NBLK) p_done = 1;
      end
    end
    if (rst_n && e_out_valid && eob < NB8) begin
      for (int u = 0; u < 8; u++) begin
        checks++;
        if (int'(e_out_coef[u]) != yref8[eob][u][e_out_v]) failures++;
      end
      if (e_in_valid && e_in_ready) e_streams++;
      if (!e_in_ready) e_drains++;
      if (e_out_v == 3'd7) begin
        eob++;
        if (eob == NB8) e_done = 1;
      end
    end
    // parallel engine: row pass and column pass busy at the same time,
    // and a finished row pass waiting for the column core
    if (rst_n && dut.u_parallel.col_busy && dut.u_parallel.rtag2.valid) overlap++;
    if (rst_n && dut.u_parallel.rstate == 1'b1 && dut.u_parallel.drain == 0 &&
        dut.u_parallel.col_busy) col_waits++;
    if (f_done && p_done && e_done) begin
      for (int m = 0; m < 5; m++) if (sizes[m] == 0) failures++;
      if (pauses == 0 || f_stalls == 0 || p_stalls == 0 || overlap == 0 || col_waits == 0 ||
          e_drains == 0 || e_streams == 0) failures++;
      $display("sizes %0d/%0d/%0d/%0d/%0d pauses=%0d stalls f=%0d p=%0d overlap=%0d col_waits=%0d e_drain=%0d e_stream=%0d",
               sizes[0], sizes[1], sizes[2], sizes[3], sizes[4], pauses, f_stalls, p_stalls,
               overlap, col_waits, e_drains, e_streams);
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog: folded %0d parallel %0d blocks, 8x8 %0d blocks", fob, pob, eob);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
