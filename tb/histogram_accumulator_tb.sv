// histogram_accumulator_tb: counts random samples (with runs of repeated
// values, and values beyond both ends of the bin range) at shift 0 and 4,
// then reads all 256 bins and compares them with a model; checks clear.
`timescale 1ns / 1ps
module histogram_accumulator_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic en = 0, clr = 0;
  logic signed [15:0] smp = 0;
  logic [3:0] sh = 0;
  logic [7:0] rb = 0;
  logic [31:0] rc;
  int model [256];

  histogram_accumulator u_dut (.clk, .rst_n, .en, .clear(clr), .sample(smp), .shift(sh), .rd_bin(rb), .rd_count(rc));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int pass = 0; pass < 2; pass++) begin
      foreach (model[i]) model[i] = 0;
      clr <= 1; @(posedge clk); clr <= 0;
      sh <= pass ? 4'd4 : 4'd0;
      for (int n = 0; n < 5000; n++) begin
        logic signed [15:0] v;
        int b;
        v = (n % 4 == 0) ? smp : (pass ? 16'($urandom) : 16'($signed($urandom_range(0, 299)) - 150));
        b = int'(v) >>> (pass ? 4 : 0);
        if (b > 127) b = 127;
        if (b < -128) b = -128;
        model[b + 128]++;
        smp <= v; en <= 1;
        @(posedge clk);
      end
      en <= 0;
      for (int i = 0; i < 256; i++) begin
        rb <= 8'(i);
        @(posedge clk); #1;
        checks++;
        if (rc != 32'(model[i])) begin
          failures++;
          if (failures < 6) $display("FAIL pass %0d bin %0d count %0d expected %0d", pass, i, rc, model[i]);
        end
      end
    end
    clr <= 1; @(posedge clk); clr <= 0; rb <= 8'd128; @(posedge clk); #1;
    checks++; if (rc != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
