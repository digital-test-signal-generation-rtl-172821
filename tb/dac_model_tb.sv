// dac_model_tb: applies random 12-bit codes, including both extremes, and
// checks that after each clock edge vout = code / 2048 volts (full scale 1 V).
`timescale 1ns / 1ps
module dac_model_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic signed [11:0] code = 0;
  real v;

  dac_model u_dut (.clk, .code, .vout(v));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      logic signed [11:0] c;
      real e;
      c = (n == 0) ? 12'sh800 : (n == 1) ? 12'sh7FF : 12'($urandom);
      code <= c;
      @(posedge clk); #1;
      e = $itor(c) / 2048.0;
      checks++;
      if (v > e + 1e-9 || v < e - 1e-9) begin
        failures++;
        if (failures < 5) $display("FAIL code %0d v=%f expected %f", c, v, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
