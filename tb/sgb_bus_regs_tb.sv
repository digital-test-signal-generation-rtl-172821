// sgb_bus_regs_tb: exercises the bus address map. Writes every configuration
// register of every channel and monitor with random values and compares the
// decoded configuration outputs; checks the RAM and coefficient write strobes
// (one per access, right channel, right address and data); checks the
// self-clearing histogram clear, the sticky result-ready bits, irq and their
// write-one-to-clear; and reads back result words and histogram halves.
`timescale 1ns / 1ps
module sgb_bus_regs_tb;
  import dsg_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic we = 0, re = 0;
  logic [23:0] addr = 0;
  logic [15:0] wdata = 0, rdata;
  logic irq, run, hist_en, hist_clear;
  chan_cfg_t ccfg [3];
  mon_cfg_t  mcfg [2];
  logic [3:0] hist_shift;
  logic [1:0] hist_src;
  logic [5:0] dly_sel;
  logic [2:0] dram_we, scram_we, coef_we;
  logic [15:0] mem_waddr;
  logic [7:0]  mem_wdata;
  logic [5:0]  coef_addr;
  logic [15:0] coef_data;
  logic [7:0]  hist_rd_bin;
  logic [31:0] hist_count;
  logic [1:0]  res_valid = 0;
  logic [207:0] results [2];

  sgb_bus_regs u_dut (.clk, .rst_n, .bus_we(we), .bus_re(re), .bus_addr(addr), .bus_wdata(wdata),
    .bus_rdata(rdata), .irq, .run, .ccfg, .mcfg, .hist_en, .hist_clear, .hist_shift, .hist_src,
    .dly_sel, .dram_we, .scram_we, .mem_waddr, .mem_wdata, .coef_we, .coef_addr, .coef_data,
    .hist_rd_bin, .hist_count, .res_valid, .results);

  assign hist_count = {8'hA5, hist_rd_bin, 8'h5A, ~hist_rd_bin};

  task automatic wr(logic [23:0] a, logic [15:0] d);
    we = 1; addr = a; wdata = d;
    @(posedge clk);
    #1 we = 0;
  endtask

  task automatic rd(logic [23:0] a, output logic [15:0] d);
    re = 1; addr = a;
    @(posedge clk);
    #1 re = 0;
    d = rdata;
  endtask

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 8) $display("FAIL %s", what); end
  endtask

  // strobe monitor: count strobes
  int n_dram, n_scram, n_coef;
  always @(posedge clk) begin
    n_dram  += $countones(dram_we);
    n_scram += $countones(scram_we);
    n_coef  += $countones(coef_we);
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] d;
    results[0] = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    results[1] = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    n_dram = 0; n_scram = 0; n_coef = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    chk(!run && ccfg[0] == '0 && mcfg[1] == '0 && !irq, "reset state");
    for (int it = 0; it < 20; it++) begin
      for (int c = 0; c < 3; c++) begin
        logic [15:0] v [9];
        foreach (v[i]) v[i] = 16'($urandom);
        for (int r = 0; r < 9; r++) wr(24'h100000 | 24'(c << 8) | 24'(r), v[r]);
        #1;
        chk(ccfg[c].mode == pat_mode_e'(v[0][1:0]) && ccfg[c].sc_en == v[0][2], "mode");
        chk(ccfg[c].is_m1 == {v[2][7:0], v[1]}, $sformatf("I_S %h %h %h", ccfg[c].is_m1, v[2], v[1]));
        chk(ccfg[c].pat_len_m1 == v[3], "pattern length");
        chk(ccfg[c].sc_inc == {v[5], v[4]}, "subcarrier increment");
        chk(ccfg[c].atten == v[6], "attenuator");
        chk(ccfg[c].sym_phase == {v[8][7:0], v[7]}, "symbol phase");
      end
      for (int m = 0; m < 2; m++) begin
        logic [15:0] v [5];
        foreach (v[i]) v[i] = 16'($urandom);
        for (int r = 0; r < 5; r++) wr(24'h200000 | 24'(m << 8) | 24'(r), v[r]);
        #1;
        chk(mcfg[m].en == v[0][0] && mcfg[m].ref_sel == v[0][1] && mcfg[m].sq_shift == v[0][7:2], "monitor ctrl");
        chk(mcfg[m].k == {v[2][7:0], v[1]}, "K");
        chk(mcfg[m].kdly == v[3][5:0] && mcfg[m].offset == v[4][7:0], "delays");
      end
    end
    wr(24'h000000, 16'h0003); #1 chk(run && hist_en, "ctrl");
    wr(24'h000001, 16'h0025); #1 chk(hist_shift == 4'h5 && hist_src == 2'd2, "histcfg");
    wr(24'h000004, 16'h0011); #1 chk(dly_sel == 6'h11, "delay");
    // histogram clear is a one-clock pulse
    we = 1; addr = 24'h000002; @(posedge clk); #1 we = 0;
    chk(hist_clear, "hist clear pulse");
    @(posedge clk); #1 chk(!hist_clear, "hist clear ends");
    // RAM and coefficient strobes
    for (int c = 0; c < 3; c++) begin
      we = 1; addr = 24'h400000 | 24'(c << 16) | 24'h1234; wdata = 16'h00C3;
      #1 chk(dram_we == 3'(1 << c) && scram_we == 0 && mem_waddr == 16'h1234 && mem_wdata == 8'hC3, "dram strobe");
      @(posedge clk); #1;
      addr = 24'h500000 | 24'(c << 16) | 24'hBEEF;
      #1 chk(scram_we == 3'(1 << c) && dram_we == 0 && mem_waddr == 16'hBEEF, "scram strobe");
      @(posedge clk); #1;
      addr = 24'h600000 | 24'(c << 8) | 24'd62; wdata = 16'h8001;
      #1 chk(coef_we == 3'(1 << c) && coef_addr == 6'd62 && coef_data == 16'h8001, "coef strobe");
      @(posedge clk); #1;
      we = 0;
    end
    @(posedge clk);
    chk(n_dram == 3 && n_scram == 3 && n_coef == 3, "strobe counts");
    // result ready bits
    res_valid = 2'b10; @(posedge clk); #1 res_valid = 0; @(posedge clk);
    rd(24'h000003, d); chk(d == 16'h0002 && irq, "status set");
    wr(24'h000003, 16'h0002); @(posedge clk);
    rd(24'h000003, d); chk(d == 16'h0000 && !irq, "status cleared");
    // result words
    for (int m = 0; m < 2; m++)
      for (int w = 0; w < 13; w++) begin
        rd(24'h200010 | 24'(m << 8) | 24'(w), d);
        chk(d == results[m][16*w +: 16], "result word");
      end
    // histogram halves
    for (int b = 0; b < 256; b += 37) begin
      rd(24'h300000 | 24'(b << 1), d);     chk(d == {8'h5A, ~8'(b)}, "hist low");
      rd(24'h300000 | 24'(b << 1) | 1, d); chk(d == {8'hA5, 8'(b)}, "hist high");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
