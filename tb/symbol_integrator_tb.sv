// symbol_integrator_tb: feeds random S(n) with symbol marks at varying
// symbol lengths (I_S from 2 to 9) and checks that each dump equals the sum
// over exactly the previous symbol, arrives one clock after the mark, and
// that the incomplete window open at enable is discarded.
`timescale 1ns / 1ps
module symbol_integrator_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic en = 0, fi = 0, sv;
  logic signed [27:0] s = 0;
  logic signed [51:0] si;
  longint exp_q [$];

  symbol_integrator u_dut (.clk, .rst_n, .en, .s_in(s), .first_in(fi), .si_valid(sv), .si(si));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker: every dump must match the oldest expected value
  always @(posedge clk) begin
    #1;
    if (sv) begin
      checks++;
      if (exp_q.size() == 0 || si !== 52'(exp_q[0])) begin
        failures++;
        if (failures < 6) $display("FAIL si=%0d expected %0d", si, exp_q.size() ? exp_q[0] : 0);
      end
      if (exp_q.size()) void'(exp_q.pop_front());
    end
  end

  initial begin
    longint acc;
    int sym_len, pos, nsym;
    bit primed;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    en <= 1;
    // start in the middle of a symbol
    primed = 0; acc = 0; pos = 3; sym_len = 5; nsym = 0;
    for (int n = 0; n < 4000; n++) begin
      logic signed [27:0] v;
      bit f;
      v = 28'($urandom);
      f = (pos == 0);
      if (f) begin
        if (primed) exp_q.push_back(acc);
        primed = 1; acc = 0; nsym++;
        sym_len = $urandom_range(2, 9);
      end
      acc += longint'(v);
      s <= v; fi <= f;
      pos = (pos + 1 >= sym_len) ? 0 : pos + 1;
      @(posedge clk);
    end
    fi <= 0; s <= 0;
    repeat (3) @(posedge clk);
    checks++;
    if (nsym < 400) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
