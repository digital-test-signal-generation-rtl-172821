// pattern_ram_tb: writes random words to random addresses of a 64K x 8 RAM,
// reads them back (one-clock read latency) and compares with a model; also
// checks that a read and a write in the same clock to different addresses
// do not disturb each other (the concurrent writes go to the upper half,
// the checked words live in the lower half).
`timescale 1ns / 1ps
module pattern_ram_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        we = 0;
  logic [15:0] waddr = 0, raddr = 0;
  logic [7:0]  wdata = 0, rdata;
  logic [7:0]  model [logic [15:0]];
  logic [15:0] addrs [$];

  pattern_ram u_dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk);
    for (int i = 0; i < 3000; i++) begin
      logic [15:0] a;
      a = (i < 4) ? 16'(i * 16'h1555) : {1'b0, 15'($urandom)};
      we <= 1; waddr <= a; wdata <= 8'($urandom);
      @(posedge clk); #1;
      model[a] = wdata;
      addrs.push_back(a);
    end
    we <= 0;
    foreach (addrs[i]) begin
      raddr <= addrs[i];
      // concurrent write elsewhere must not matter
      we <= 1; waddr <= {1'b1, 15'($urandom)}; wdata <= 8'($urandom);
      @(posedge clk); #1;
      we <= 0;
      checks++;
      if (rdata != model[addrs[i]]) begin
        failures++;
        if (failures < 5) $display("FAIL: addr %h read %h expected %h", addrs[i], rdata, model[addrs[i]]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
