// pattern_generator_tb: self-checking test of one channel's pattern generator.
//
// The data RAM is filled with f(a) = a[7:0] ^ a[15:8] and the subcarrier RAM
// with one period of a square wave (+100 / -100). Each mode is then run from
// reset and every output sample is compared with an independent model:
//   MODE_SEQ    sequential words, I_S = 4, pattern length 6, sc_inc = 2^16*4099,
//               D(n) = d(n) Sc(n), symbol marks every I_S samples;
//   MODE_SEQ    without subcarrier (D = d), and with a symbol phase offset;
//   MODE_NOISE  one PN address per clock (model LFSR);
//   MODE_RANDOM one PN address per symbol, I_S = 3;
//   MODE_EXT    external line, +127 / -127.
// The output must start exactly two clocks after `run` rises.
`timescale 1ns / 1ps
module pattern_generator_tb;
  import dsg_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic run = 0, ext = 0;
  chan_cfg_t cfg;
  logic dwe = 0, swe = 0;
  logic [15:0] wa = 0;
  logic [7:0]  wd = 0;
  logic signed [15:0] d_out;
  logic first_out;
  logic signed [7:0] raw_out;

  pattern_generator u_dut (
    .clk, .rst_n, .run, .cfg,
    .dram_we(dwe), .dram_waddr(wa), .dram_wdata(wd),
    .scram_we(swe), .scram_waddr(wa), .scram_wdata(wd),
    .ext_data(ext), .d_out, .first_out, .raw_out
  );

  function automatic logic signed [7:0] dfun(logic [15:0] a);
    return a[7:0] ^ a[15:8];
  endfunction
  function automatic logic signed [7:0] scfun(logic [15:0] a);
    return a[15] ? -8'sd100 : 8'sd100;
  endfunction
  function automatic logic [62:0] step16(logic [62:0] s);
    for (int k = 0; k < 16; k++) s = {s[61:0], s[62] ^ s[61]};
    return s;
  endfunction

  task automatic check(string what, int n, logic signed [15:0] exp_d, logic exp_f);
    checks++;
    if (d_out !== exp_d || first_out !== exp_f) begin
      failures++;
      if (failures < 8) $display("FAIL %s n=%0d: D=%0d first=%0b expected D=%0d first=%0b",
                                 what, n, d_out, first_out, exp_d, exp_f);
    end
  endtask

  task automatic restart();
    run <= 0; rst_n <= 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [62:0] pn;
    logic [31:0] ph;
    cfg = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    // load both RAMs completely
    for (int a = 0; a < 65536; a++) begin
      dwe <= 1; swe <= 1; wa <= 16'(a); wd <= dfun(16'(a)) ^ 8'h00;
      @(posedge clk);
      swe <= 0;
    end
    dwe <= 0;
    for (int a = 0; a < 65536; a++) begin
      swe <= 1; wa <= 16'(a); wd <= scfun(16'(a));
      @(posedge clk);
    end
    swe <= 0;

    // ---- MODE_SEQ with subcarrier ----
    cfg.mode = MODE_SEQ; cfg.sc_en = 1; cfg.is_m1 = 3; cfg.pat_len_m1 = 5;
    cfg.sc_inc = 32'h1003_0000;
    restart();
    run <= 1;
    @(posedge clk); #1;
    check("seq-latency", -1, 0, 0);   // one clock after run: still idle
    ph = 0;
    for (int n = 0; n < 300; n++) begin
      logic [15:0] a;
      @(posedge clk); #1;
      a = 16'((n / 4) % 6);
      check("seq", n, 16'(dfun(a) * scfun(ph[31:16])), (n % 4) == 0);
      ph += cfg.sc_inc;
    end

    // ---- MODE_SEQ, no subcarrier ----
    cfg.sc_en = 0;
    restart();
    run <= 1;
    @(posedge clk);
    for (int n = 0; n < 100; n++) begin
      @(posedge clk); #1;
      check("seq-nosc", n, 16'(dfun(16'((n / 4) % 6))), (n % 4) == 0);
    end

    // ---- MODE_SEQ with a symbol phase offset of 3 (first symbol 2 long) ----
    cfg.is_m1 = 4; cfg.sym_phase = 3;
    restart();
    run <= 1;
    @(posedge clk);
    for (int n = 0; n < 100; n++) begin
      int sym;
      @(posedge clk); #1;
      sym = (n + 3) / 5;
      check("seq-offset", n, 16'(dfun(16'(sym % 6))), ((n + 3) % 5) == 0);
    end
    cfg.sym_phase = 0; cfg.is_m1 = 3;

    // ---- MODE_NOISE ----
    cfg.mode = MODE_NOISE; cfg.sc_en = 0;
    restart();
    run <= 1;
    pn = 63'h1D87_2B41_C9A6_3E55;
    @(posedge clk);
    for (int n = 0; n < 300; n++) begin
      @(posedge clk); #1;
      check("noise", n, 16'(dfun(pn[15:0])), (n % 4) == 0);
      checks++; if (raw_out !== dfun(pn[15:0])) failures++;
      pn = step16(pn);
    end

    // ---- MODE_RANDOM (PN address per symbol) ----
    cfg.mode = MODE_RANDOM; cfg.is_m1 = 2;
    restart();
    run <= 1;
    pn = 63'h1D87_2B41_C9A6_3E55;
    @(posedge clk);
    for (int n = 0; n < 300; n++) begin
      @(posedge clk); #1;
      check("random", n, 16'(dfun(pn[15:0])), (n % 3) == 0);
      if (n % 3 == 2) pn = step16(pn);
    end

    // ---- MODE_EXT ----
    cfg.mode = MODE_EXT; cfg.is_m1 = 1;
    restart();
    run <= 1;
    for (int j = 0; j < 20; j++) begin
      ext <= j[0];
      repeat (6) @(posedge clk); #1;
      check("ext", j, j[0] ? 16'sd127 : -16'sd127, first_out);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
