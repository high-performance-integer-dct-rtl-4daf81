// dct8_1d_tb: random 12-bit rows (and 8-bit pixel rows) through the 8-point
// DCT, each output checked one cycle later against a direct matrix product
// with K(m) = round(128 cos(m pi/16)), rounding and 12-bit clipping; also
// checked against the exact real DCT within the error bound of the
// 8-bit coefficient fractions.
module dct8_1d_tb;
  timeunit 1ns; timeprecision 1ps;
  import dct_ref_pkg::*;

  logic               clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [11:0] x [8];
  logic signed [11:0] y [8];
  int checks = 0, failures = 0;
  int xs [8];

  dct8_1d dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x),
                                   .out_valid(out_valid), .y(y));

  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < 8; i++) x[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      in_valid = 1'b1;
      for (int i = 0; i < 8; i++) begin
        x[i] = (t % 2) ? 12'($urandom_range(0, 255)) : 12'($signed(11'($urandom)));
        xs[i] = int'(x[i]);
      end
      @(negedge clk);
      in_valid = 1'b0;
      checks++;
      if (!out_valid) failures++;
      for (int k = 0; k < 8; k++) begin
        real yr, tol;
        checks += 2;
        if (int'(y[k]) != ref_dct8(k, xs)) begin
          failures++;
          if (failures < 10) $display("k=%0d got=%0d exp=%0d", k, y[k], ref_dct8(k, xs));
        end
        yr = 0.0;
        tol = 1.5;
        for (int n = 0; n < 8; n++) tol += ((xs[n] < 0) ? -xs[n] : xs[n]) * 0.5 / 256.0;
        for (int n = 0; n < 8; n++)
          yr += ((k == 0) ? $sqrt(0.125) : 0.5) * $cos(PI * real'(k * (2 * n + 1)) / 16.0) * real'(xs[n]);
        if (yr < 2047.0 && yr > -2048.0 && (real'(y[k]) - yr > tol || yr - real'(y[k]) > tol)) begin failures++; if (failures < 10) $display("real k=%0d got=%0d yr=%f", k, y[k], yr); end
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
