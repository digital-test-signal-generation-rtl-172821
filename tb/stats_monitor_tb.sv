// stats_monitor_tb: drives random output samples x(n) and two random replica
// channels with symbol marks every 5 clocks (channel 1) and 7 clocks
// (channel 2). A model applies the replica delay k, the extra mark offset,
// forms S(n) = x(n) r(n - k), integrates between delayed marks and sums K
// symbols. Every dumped S_i and every K-symbol result is compared. Run for
// (ref 1, k = 3, offset = 2, K = 4) and (ref 2, k = 0, offset = 0, K = 3).
`timescale 1ns / 1ps
module stats_monitor_tb;
  import dsg_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, nres = 0;

  mon_cfg_t cfg;
  logic signed [11:0] x = 0;
  logic signed [15:0] r1 = 0, r2 = 0;
  logic f1 = 0, f2 = 0;
  logic sv, rv;
  logic signed [51:0] si;
  logic signed [79:0] sum;
  logic [95:0] sumsq;
  logic [31:0] nerr;

  stats_monitor u_dut (.clk, .rst_n, .cfg, .x_in(x), .ref1(r1), .rfirst1(f1), .ref2(r2), .rfirst2(f2),
                       .si_valid(sv), .si, .res_valid(rv), .sum, .sumsq, .nerr);

  longint exp_si [$];
  longint exp_sum [$];

  always @(posedge clk) begin
    #1;
    if (sv) begin
      checks++;
      if (exp_si.size() == 0 || si !== 52'(exp_si[0])) begin
        failures++;
        if (failures < 6) $display("FAIL si=%0d expected %0d", si, exp_si.size() ? exp_si[0] : 0);
      end
      if (exp_si.size()) void'(exp_si.pop_front());
    end
    if (rv) begin
      checks++; nres++;
      if (exp_sum.size() == 0 || sum !== 80'(exp_sum[0])) begin
        failures++;
        if (failures < 6) $display("FAIL sum=%0d expected %0d", sum, exp_sum.size() ? exp_sum[0] : 0);
      end
      if (exp_sum.size()) void'(exp_sum.pop_front());
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int pass = 0; pass < 2; pass++) begin
      logic signed [15:0] rh [$];
      bit mh [$];
      longint acc, ksum;
      int kcnt;
      bit primed;
      int kd, off, kk;
      kd = pass ? 0 : 3; off = pass ? 0 : 2; kk = pass ? 3 : 4;
      cfg <= '{en: 1'b0, ref_sel: 1'(pass), k: 24'(kk), kdly: 6'(kd), offset: 8'(off), sq_shift: 6'd8};
      @(posedge clk);
      // prime the delay lines with zero marks
      for (int i = 0; i < 400; i++) begin
        rh.push_back(0); mh.push_back(0);
      end
      f1 <= 0; f2 <= 0;
      repeat (330) @(posedge clk);
      cfg.en <= 1;
      primed = 0; acc = 0; ksum = 0; kcnt = 0;
      for (int n = 0; n < 2030; n++) begin
        logic signed [11:0] vx;
        logic signed [15:0] v1, v2, rsel, rdl;
        bit m1, m2, msel, mdl;
        vx = 12'($urandom); v1 = 16'($urandom); v2 = 16'($urandom);
        m1 = (n % 5) == 0 && n < 2000; m2 = (n % 7) == 0 && n < 2000;
        rsel = pass ? v2 : v1; msel = pass ? m2 : m1;
        rh.push_back(rsel); mh.push_back(msel);
        rdl = rh[rh.size() - 1 - kd];
        mdl = mh[mh.size() - 1 - kd - off];
        if (mdl) begin
          if (primed) begin
            exp_si.push_back(acc);
            ksum += acc; kcnt++;
            if (kcnt == kk) begin exp_sum.push_back(ksum); ksum = 0; kcnt = 0; end
          end
          primed = 1; acc = 0;
        end
        acc += longint'(vx) * longint'(rdl);
        x <= vx; r1 <= v1; r2 <= v2; f1 <= m1; f2 <= m2;
        @(posedge clk);
      end
      repeat (4) @(posedge clk);
      cfg.en <= 0;
      @(posedge clk);
      checks++;
      if (exp_si.size() != 0 || exp_sum.size() != 0) begin
        failures++; $display("FAIL pass %0d: %0d dumps, %0d results missing", pass, exp_si.size(), exp_sum.size());
      end
      exp_si.delete(); exp_sum.delete();
    end
    checks++; if (nres < 150) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
