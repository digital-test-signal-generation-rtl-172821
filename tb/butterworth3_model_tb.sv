// butterworth3_model_tb: measures the model's gain at DC (1.0), at the
// cutoff FC_NORM = 0.25 (1/sqrt(2), -3 dB, a Butterworth property for any
// order), at a tenth of the cutoff (about 1.0) and at the Nyquist rate
// (0: the bilinear transform puts all three zeros there), by driving steady
// sinusoids and measuring the output amplitude after the transient by
// correlating it with the input frequency.
`timescale 1ns / 1ps
module butterworth3_model_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  real vin = 0.0, vout;
  localparam real PI = 3.14159265358979323846;

  butterworth3_model u_dut (.clk, .vin, .vout);

  task automatic gain(real f, real exp_g, real tol, string what);
    real pk, ci, cq;
    ci = 0.0; cq = 0.0;
    for (int n = 0; n < 4000; n++) begin
      vin = (f == 0.0) ? 1.0 : $cos(2.0 * PI * f * $itor(n) + 0.3);
      @(posedge clk); #1;
      if (n >= 2000) begin
        ci += vout * $cos(2.0 * PI * f * $itor(n));
        cq += vout * $sin(2.0 * PI * f * $itor(n));
      end
    end
    if (f == 0.0)      pk = ci / 2000.0;
    else if (f == 0.5) pk = (ci < 0 ? -ci : ci) / 2000.0;
    else               pk = 2.0 * $sqrt(ci * ci + cq * cq) / 2000.0;
    checks++;
    if (pk < exp_g - tol || pk > exp_g + tol) begin
      failures++;
      $display("FAIL %s: gain %f expected %f", what, pk, exp_g);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    gain(0.0, 1.0, 0.001, "dc");
    gain(0.025, 1.0, 0.01, "passband");
    gain(0.25, 0.7071, 0.02, "cutoff");
    gain(0.5, 0.0, 0.001, "nyquist");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
