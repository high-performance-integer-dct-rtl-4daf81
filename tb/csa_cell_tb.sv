// csa_cell_tb: every select code of csa_cell against mag * 2^(sel-1) (or 0)
// for random and corner magnitudes.
module csa_cell_tb;
  timeunit 1ns; timeprecision 1ps;
  logic [15:0] mag;
  logic [2:0]  sel;
  logic [22:0] term;
  int checks = 0, failures = 0;

  csa_cell dut (.mag(mag), .sel(sel), .term(term));

  initial begin
    for (int t = 0; t < 200; t++) begin
      mag = (t < 3) ? ((t == 0) ? 16'h0 : (t == 1) ? 16'hffff : 16'h8000) : 16'($urandom);
      for (int s = 0; s < 8; s++) begin
        logic [22:0] exp_t;
        sel = 3'(s);
        #1;
        exp_t = (s == 0) ? 23'd0 : 23'(longint'(mag) * (longint'(1) << (s - 1)));
        checks++;
        if (term !== exp_t) begin
          failures++;
          if (failures < 10) $display("mag=%0d sel=%0d term=%0d exp=%0d", mag, s, term, exp_t);
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
