// delay_line_model_tb: for several step settings, toggles the input and
// measures with the simulation clock how long each edge takes to appear at
// the output: it must be sel * 2 ns.
`timescale 1ns / 1ps
module delay_line_model_tb;
  int checks = 0, failures = 0;
  logic in = 0, out;
  logic [5:0] sel = 0;

  delay_line_model u_dut (.in, .sel, .out);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t0, dt;
    for (int s = 1; s < 40; s += 3) begin
      sel = 6'(s);
      #200;
      t0 = $realtime;
      in = ~in;
      @(out);
      dt = $realtime - t0;
      checks++;
      if (dt < 2.0 * s - 0.01 || dt > 2.0 * s + 0.01) begin
        failures++;
        $display("FAIL sel=%0d delay %f ns", s, dt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
