// attenuator_tb: random samples and attenuator settings (including settings
// above 1.0, which must clamp to 1.0) against y = (x * min(A, 0x8000)) >>> 15,
// one clock later; the symbol mark must follow with the same latency.
`timescale 1ns / 1ps
module attenuator_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic signed [15:0] x = 0, y;
  logic [15:0] a = 0;
  logic fi = 0, fo;

  attenuator u_dut (.clk, .rst_n, .x_in(x), .first_in(fi), .atten(a), .y_out(y), .first_out(fo));

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
      longint e;
      logic signed [15:0] nx;
      logic [15:0] na;
      nx = (n % 50 == 0) ? -16'sd32768 : 16'($urandom);
      na = (n % 3 == 0) ? 16'h8000 + 16'($urandom_range(0, 32767)) : 16'($urandom_range(0, 32768));
      x <= nx; a <= na; fi <= n[0];
      @(posedge clk); #1;
      e = (longint'(nx) * longint'((na > 16'h8000) ? 16'h8000 : na)) >>> 15;
      checks++;
      if (y !== 16'(e) || fo !== n[0]) begin
        failures++;
        if (failures < 6) $display("FAIL x=%0d a=%h y=%0d expected %0d", nx, na, y, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
