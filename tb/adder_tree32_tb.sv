// adder_tree32_tb: every level output of the adder tree against the sums of
// the corresponding groups of 2^L random (and extreme) products.
module adder_tree32_tb;
  timeunit 1ns; timeprecision 1ps;
  logic signed [22:0] p   [32];
  logic signed [27:0] lvl [5][16];
  int checks = 0, failures = 0;

  adder_tree32 dut (.p(p), .lvl(lvl));

  initial begin
    for (int t = 0; t < 300; t++) begin
      for (int j = 0; j < 32; j++)
        p[j] = (t == 0) ? 23'sh3fffff : (t == 1) ? -23'sd4194304 : 23'($urandom);
      #1;
      for (int l = 1; l <= 5; l++)
        for (int s = 0; s < 16; s++) begin
          longint e;
          e = 0;
          if (s < (32 >> l))
            for (int j = s << l; j < (s + 1) << l; j++) e += longint'(p[j]);
          checks++;
          if (longint'(lvl[l-1][s]) != e) begin
            failures++;
            if (failures < 10) $display("L=%0d s=%0d got=%0d exp=%0d", l, s, lvl[l-1][s], e);
          end
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
