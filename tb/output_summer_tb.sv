// output_summer_tb: random channel samples against
// S_T = sat12((ch1 + ch2 + noise) >>> 4), and the aligned replicas and marks,
// all one clock after the inputs. Large inputs exercise both saturation limits.
`timescale 1ns / 1ps
module output_summer_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, sat_hi = 0, sat_lo = 0;
  logic signed [15:0] c1 = 0, c2 = 0, nz = 0, r1, r2;
  logic f1 = 0, f2 = 0, rf1, rf2;
  logic signed [11:0] st;

  output_summer u_dut (.clk, .rst_n, .ch1(c1), .first1(f1), .ch2(c2), .first2(f2), .noise(nz),
                       .st_out(st), .ref1(r1), .rfirst1(rf1), .ref2(r2), .rfirst2(rf2));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 3000; n++) begin
      int e;
      logic signed [15:0] a, b, c;
      a = 16'($urandom); b = 16'($urandom); c = 16'($urandom);
      if (n % 2 == 0) begin a = a >>> 4; b = b >>> 4; c = c >>> 4; end
      c1 <= a; c2 <= b; nz <= c; f1 <= n[0]; f2 <= n[1];
      @(posedge clk); #1;
      e = (int'(a) + int'(b) + int'(c)) >>> 4;
      if (e > 2047) begin e = 2047; sat_hi++; end
      if (e < -2048) begin e = -2048; sat_lo++; end
      checks++;
      if (st !== 12'(e) || r1 !== a || r2 !== b || rf1 !== n[0] || rf2 !== n[1]) begin
        failures++;
        if (failures < 6) $display("FAIL n=%0d st=%0d expected %0d", n, st, e);
      end
    end
    checks++; if (sat_hi == 0 || sat_lo == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
