// buf_row32_tb: random enable / data stream into one buffer row, compared
// with a queue model (newest value at q[0], hold when en = 0).
module buf_row32_tb;
  timeunit 1ns; timeprecision 1ps;
  logic               clk = 0;
  logic               en;
  logic signed [15:0] din;
  logic signed [15:0] q [32];
  logic signed [15:0] model [32];
  int checks = 0, failures = 0, holds = 0;

  buf_row32 dut (.clk(clk), .en(en), .din(din), .q(q));

  always #5 clk = ~clk;

  initial begin
    en = 1'b1;
    for (int i = 0; i < 32; i++) begin   // fill the row first
      din = 16'($urandom);
      @(posedge clk);
      for (int j = 31; j > 0; j--) model[j] = model[j-1];
      model[0] = din;
      @(negedge clk);
    end
    for (int t = 0; t < 500; t++) begin
      en  = ($urandom_range(0, 2) != 0);
      din = 16'($urandom);
      @(posedge clk);
      if (en) begin
        for (int j = 31; j > 0; j--) model[j] = model[j-1];
        model[0] = din;
      end else holds++;
      @(negedge clk);
      for (int j = 0; j < 32; j++) begin
        checks++;
        if (q[j] != model[j]) failures++;
      end
    end
    if (holds == 0) failures++;
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
