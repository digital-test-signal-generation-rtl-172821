// pn_generator_tb: self-checking test of the PN random-address generator.
//
// Part 1 uses a 15-bit instance (x^15 + x^14 + 1, one step per advance) and
// checks that it visits every non-zero 15-bit value exactly once in a period
// of 2^15 - 1 advances. Part 2 checks the default 63-bit, 16-step generator
// against an independent bit-serial LFSR model for 2000 advances, and that
// the address holds while `advance` is low.
`timescale 1ns / 1ps
module pn_generator_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // ---- small instance ----
  logic        adv_s;
  logic [14:0] addr_s;
  pn_generator #(.PN_W(15), .TAP_MASK(15'h6000), .SEED(15'h0001), .STEPS(1), .ADDR_W(15))
    u_small (.clk, .rst_n, .advance(adv_s), .addr(addr_s));

  // ---- default instance ----
  logic        adv_d;
  logic [15:0] addr_d;
  pn_generator u_def (.clk, .rst_n, .advance(adv_d), .addr(addr_d));

  bit seen [logic [14:0]];
  logic [62:0] model;

  function automatic logic [62:0] step1(logic [62:0] s);
    return {s[61:0], s[62] ^ s[61]};
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dup = 0, zero = 0;
    adv_s = 0; adv_d = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // part 1: full period of the 15-bit generator
    adv_s <= 1;
    for (int i = 0; i < 32767; i++) begin
      @(posedge clk); #1;
      if (seen.exists(addr_s)) dup++;
      if (addr_s == 0) zero++;
      seen[addr_s] = 1;
    end
    adv_s <= 0;
    checks++; if (dup != 0 || zero != 0) begin failures++; $display("FAIL: %0d repeats, %0d zeros in a period", dup, zero); end
    checks++; if (seen.num() != 32767) begin failures++; $display("FAIL: visited %0d values", seen.num()); end
    checks++; if (addr_s != 15'h0001) begin failures++; $display("FAIL: not back at seed after 2^15-1: %h", addr_s); end
    // part 2: default generator against the model
    model = 63'h1D87_2B41_C9A6_3E55;
    checks++; if (addr_d != model[15:0]) begin failures++; $display("FAIL: reset value %h", addr_d); end
    for (int i = 0; i < 2000; i++) begin
      bit a;
      a = ($urandom_range(0, 3) != 0);
      adv_d <= a;
      @(posedge clk); #1;
      if (a) for (int k = 0; k < 16; k++) model = step1(model);
      checks++;
      if (addr_d != model[15:0]) begin
        failures++;
        if (failures < 5) $display("FAIL: step %0d addr %h expected %h", i, addr_d, model[15:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
