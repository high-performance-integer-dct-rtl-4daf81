// transpose8x8_tb: random blocks of 8 rows, back to back and with pauses
// (inside blocks and between them, which triggers the self-drain). Every
// output column must be the matching column of the block sent, in order, and
// every block must come out exactly once. Checks the 8-cycle delay of a
// that columns leave while the next block enters, and that accept_next
// predicts in_ready.
module transpose8x8_tb;
  timeunit 1ns; timeprecision 1ps;
  logic               clk = 0, rst_n = 0, in_valid = 0, in_ready, accept_next, out_valid;
  logic signed [11:0] in_row [8];
  logic signed [11:0] out_col [8];
  int checks = 0, failures = 0, drains = 0, streams = 0;
  logic signed [11:0] blk [64][8][8];
  int nb = 0, ob = 0, oc = 0;
  logic exp_ready;

  transpose8x8 dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
                              .accept_next(accept_next), .in_row(in_row), .out_valid(out_valid),
                              .out_col(out_col));

  always #5 clk = ~clk;

  initial begin
    for (int c = 0; c < 8; c++) in_row[c] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < 40; b++) begin
      for (int r = 0; r < 8; r++) begin
        if (b % 4 == 3 && $urandom_range(0, 2) == 0) begin
          in_valid = 1'b0;
          repeat ($urandom_range(1, 3)) @(negedge clk);
        end
        in_valid = 1'b1;
        for (int c = 0; c < 8; c++) begin
          in_row[c] = 12'($urandom);
          blk[b][r][c] = in_row[c];
        end
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        @(negedge clk);
      end
      nb++;
      if (b % 5 == 4) begin   // leave a gap: the block drains by itself
        in_valid = 1'b0;
        repeat (12) @(negedge clk);
      end
    end
    in_valid = 1'b0;
  end

  // outputs, and the readiness prediction
  always @(negedge clk) begin
    if (rst_n) begin
      checks++;
      if (in_ready !== exp_ready) failures++;
    end
    if (rst_n && out_valid) begin
      for (int r = 0; r < 8; r++) begin
        checks++;
        if (out_col[r] != blk[ob][r][oc]) begin
          failures++;
          if (failures < 10) $display("blk %0d col %0d row %0d got=%0d exp=%0d", ob, oc, r, out_col[r], blk[ob][r][oc]);
        end
      end
      // while the next block streams in, column c leaves with row c of it
      if (in_valid && in_ready) streams++;
      if (!in_ready) drains++;
      oc++;
      if (oc == 8) begin
        oc = 0;
        ob++;
        if (ob == 40) begin
          checks++;
          if (drains == 0 || streams == 0) failures++;
          $display("drain shifts=%0d streamed columns=%0d", drains, streams);
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
    end
  end
  always @(posedge clk) exp_ready <= accept_next;

  initial begin
    #100000;
    failures++;
    $display("watchdog: %0d blocks out", ob);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
