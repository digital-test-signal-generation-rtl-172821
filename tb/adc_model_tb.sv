// adc_model_tb: applies random voltages (some beyond full scale) and checks
// that after each sampling edge code = round(v * 2048), clipped to
// -2048..2047.
`timescale 1ns / 1ps
module adc_model_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, clipped = 0;
  real v = 0.0;
  logic signed [11:0] code;

  adc_model u_dut (.clk, .vin(v), .code);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      real nv;
      int e;
      nv = ($itor($urandom_range(0, 100000)) / 100000.0 - 0.5) * 2.6;
      v = nv;
      @(posedge clk); #1;
      e = int'($floor(nv * 2048.0 + 0.5));
      if (e > 2047) begin e = 2047; clipped++; end
      if (e < -2048) begin e = -2048; clipped++; end
      checks++;
      if (code !== 12'(e)) begin
        failures++;
        if (failures < 5) $display("FAIL v=%f code=%0d expected %0d", nv, code, e);
      end
    end
    checks++; if (clipped == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
