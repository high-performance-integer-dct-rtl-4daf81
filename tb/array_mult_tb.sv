// array_mult_tb: exhaustive over the 7-bit multiplier operand and random
// 15-bit multiplicands (plus the extremes) against a * b.
module array_mult_tb;
  timeunit 1ns; timeprecision 1ps;
  logic [14:0] a;
  logic [6:0]  b;
  logic [21:0] p;
  int checks = 0, failures = 0;

  array_mult dut (.a(a), .b(b), .p(p));

  initial begin
    for (int t = 0; t < 60; t++)
      for (int bb = 0; bb < 128; bb++) begin
        a = (t == 0) ? 15'h7fff : (t == 1) ? 15'h0 : 15'($urandom);
        b = 7'(bb);
        #1;
        checks++;
        if (longint'(p) != longint'(a) * longint'(b)) begin
          failures++;
          if (failures < 10) $display("a=%0d b=%0d p=%0d", a, b, p);
        end
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
