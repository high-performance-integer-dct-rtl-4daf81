// csa_block_tb: the configurable CSA multiplier against x * c for every
// HEVC coefficient value (both signs) and random / extreme 16-bit samples.
// The cell selects are formed here from the set bits of |c|.
module csa_block_tb;
  timeunit 1ns; timeprecision 1ps;
  import dct_ref_pkg::*;
  logic signed [15:0] x;
  logic [14:0]        sels;
  logic               coef_neg;
  logic signed [22:0] p;
  int checks = 0, failures = 0;

  csa_block dut (.x(x), .sels(sels), .coef_neg(coef_neg), .p(p));

  function automatic logic [14:0] mk_sels(int mag);
    logic [14:0] s;
    int c;
    s = '0;
    c = 0;
    for (int b = 0; b < 7; b++)
      if ((mag >> b) & 1) begin
        s[3*c +: 3] = 3'(b + 1);
        c++;
      end
    return s;
  endfunction

  initial begin
    int vals [30];
    for (int i = 0; i < 29; i++) vals[i] = HEVC_VALS[i];
    vals[29] = 1;
    for (int i = 0; i < 30; i++)
      for (int sg = 0; sg < 2; sg++)
        for (int t = 0; t < 40; t++) begin
          longint exp_p;
          int c;
          c = sg ? -vals[i] : vals[i];
          x = (t == 0) ? -16'sd32768 : (t == 1) ? 16'sd32767 : (t == 2) ? 16'sd0 :
              (t == 3) ? -16'sd1 : 16'($urandom);
          sels = mk_sels(vals[i]);
          coef_neg = sg[0];
          #1;
          exp_p = longint'(x) * c;
          checks++;
          if (longint'(p) != exp_p) begin
            failures++;
            if (failures < 10) $display("x=%0d c=%0d p=%0d exp=%0d", x, c, p, exp_p);
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
