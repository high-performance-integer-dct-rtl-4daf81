// stage_scaler_tb: rounding shift and 16-bit clipping of every level for the
// row-pass (offset B-9 = -1) and column-pass (offset 6) scalers.
module stage_scaler_tb;
  timeunit 1ns; timeprecision 1ps;
  import dct_ref_pkg::*;
  logic signed [27:0] lvl [5][16];
  logic signed [15:0] q1 [5][16];
  logic signed [15:0] q2 [5][16];
  int checks = 0, failures = 0;

  stage_scaler #(.SHIFT_OFS(-1)) dut1 (.lvl(lvl), .q(q1));
  stage_scaler #(.SHIFT_OFS(6))  dut2 (.lvl(lvl), .q(q2));

  initial begin
    for (int t = 0; t < 400; t++) begin
      for (int l = 0; l < 5; l++)
        for (int s = 0; s < 16; s++) begin
          int sh;
          sh = $urandom_range(0, 3);
          lvl[l][s] = (sh == 0) ? 28'($urandom) : (sh == 1) ? 28'($signed(18'($urandom))) :
                      (sh == 2) ? 28'($signed(22'($urandom))) : 28'($signed(12'($urandom)));
        end
      #1;
      for (int l = 0; l < 5; l++)
        for (int s = 0; s < 16; s++) begin
          checks += 2;
          if (longint'(q1[l][s]) != clip16(ref_round(longint'(lvl[l][s]), l))) failures++;
          if (longint'(q2[l][s]) != clip16(ref_round(longint'(lvl[l][s]), l + 7))) begin
            failures++;
            if (failures < 10) $display("l=%0d v=%0d q2=%0d", l, lvl[l][s], q2[l][s]);
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
