// dsg_top_tb: end-to-end test of the SNR generator box at its default size,
// driven only through the CPU bus and the external data lines.
//
// Phases:
//  A  clean BPSK on channel 0 (sequential data on a square subcarrier, unity
//     filter, A = 1). Every symbol value is known exactly, so the digital
//     monitor's sum, sum of squares and error count are checked bit for bit,
//     and the time between two results must be exactly K * I_S clocks.
//  B  the same channel attenuated, plus Gaussian noise from channel 2 (PN
//     addressed RAM holding a quantised normal table). The measured ratio
//     mean/std of the symbol values must match the ratio computed from the
//     loaded table and the attenuator settings, and the error count must be
//     near the Gaussian prediction.
//  C  histogram of the unfiltered noise: total count, mean and variance
//     against the loaded table.
//  D  analog loop (DAC, 3-pole filter, ADC): the analog monitor scans the
//     integer delay k and then the 2-ns delay line, and the best setting must
//     recover most of the digital symbol energy with no symbol errors.
//  E  channel 1 in random-address data mode and in external data mode,
//     monitored through the channel-2 replica select.
//  F  large noise through a two-tap filter: filter and output saturation.
// Each mechanism is counted and a failure is counted for any that never
// happened.
`timescale 1ns / 1ps
module dsg_top_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic we = 0, re = 0;
  logic [23:0] addr = 0;
  logic [15:0] wdata = 0, rdata;
  logic irq;
  logic [2:0] ext = 0;
  logic signed [11:0] st_out, adc_code;
  real analog_out;

  dsg_top u_dut (.clk, .rst_n, .bus_we(we), .bus_re(re), .bus_addr(addr), .bus_wdata(wdata),
                 .bus_rdata(rdata), .irq, .ext_data(ext), .st_out, .analog_out, .adc_code);

  localparam int IS = 16;
  localparam real PI = 3.14159265358979323846;

  // mechanism counters
  int n_seq, n_random, n_noise, n_ext, n_result, n_symerr, n_hist, n_analog, n_kscan,
      n_sat, n_fir_multi, n_dlyscan;

  // ---------------- bus helpers ----------------
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
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic chan_reg(int c, int r, logic [15:0] v);
    wr(24'h100000 | 24'(c << 8) | 24'(r), v);
  endtask

  task automatic chan_cfg(int c, int mode, bit sc_en, int is_m1, int len_m1, logic [31:0] inc, logic [15:0] a);
    chan_reg(c, 0, 16'(mode) | (sc_en ? 16'h4 : 16'h0));
    chan_reg(c, 1, 16'(is_m1));
    chan_reg(c, 2, 16'(is_m1 >> 16));
    chan_reg(c, 3, 16'(len_m1));
    chan_reg(c, 4, inc[15:0]);
    chan_reg(c, 5, inc[31:16]);
    chan_reg(c, 6, a);
  endtask

  task automatic mon_cfg(int m, bit en, bit rsel, int sq_shift, int k, int kdly, int off);
    wr(24'h200000 | 24'(m << 8) | 1, 16'(k));
    wr(24'h200000 | 24'(m << 8) | 2, 16'(k >> 16));
    wr(24'h200000 | 24'(m << 8) | 3, 16'(kdly));
    wr(24'h200000 | 24'(m << 8) | 4, 16'(off));
    wr(24'h200000 | 24'(m << 8) | 0, (en ? 16'h1 : 16'h0) | (rsel ? 16'h2 : 16'h0) | 16'(sq_shift << 2));
  endtask

  task automatic set_coefs(int c, logic [15:0] h0, logic [15:0] h1);
    for (int t = 0; t < 63; t++)
      wr(24'h600000 | 24'(c << 8) | 24'(t), t == 0 ? h0 : (t == 1 ? h1 : 16'h0));
  endtask

  task automatic run_ctl(bit run, bit hist);
    wr(24'h000000, (run ? 16'h1 : 16'h0) | (hist ? 16'h2 : 16'h0));
  endtask

  // wait for the result-ready bit of monitor m, clear it; returns the cycle
  longint cyc = 0;
  always @(posedge clk) cyc++;

  task automatic wait_result(int m, output longint at);
    logic [15:0] st;
    int guard;
    guard = 0;
    do begin
      rd(24'h000003, st);
      guard++;
    end while (!st[m] && guard < 200000);
    at = cyc;
    chk(st[m], "result ready");
    wr(24'h000003, 16'(1 << m));
    n_result++;
  endtask

  task automatic read_results(int m, output longint sum, output real sumsq, output int nerr);
    logic [15:0] w [13];
    logic [79:0] s80;
    logic [95:0] q96;
    for (int i = 0; i < 13; i++) rd(24'h200010 | 24'(m << 8) | 24'(i), w[i]);
    s80 = {w[4], w[3], w[2], w[1], w[0]};
    q96 = {w[10], w[9], w[8], w[7], w[6], w[5]};
    sum = longint'($signed(s80));
    sumsq = $itor(q96[95:64]) * 18446744073709551616.0 + $itor(q96[63:32]) * 4294967296.0 + $itor(q96[31:0]);
    nerr = int'({w[12], w[11]});
  endtask

  task automatic stop_all();
    run_ctl(0, 0);
    mon_cfg(0, 0, 0, 0, 1, 0, 0);
    mon_cfg(1, 0, 0, 0, 1, 0, 0);
    wr(24'h000003, 16'h3);
  endtask

  // ---------------- Gaussian table (Eqs. 8-10 of the method) ----------------
  function automatic real erf_a(real x);
    // Abramowitz and Stegun 7.1.26, |error| < 1.5e-7
    real t, y, ax;
    ax = (x < 0) ? -x : x;
    t = 1.0 / (1.0 + 0.3275911 * ax);
    y = 1.0 - (((((1.061405429 * t - 1.453152027) * t) + 1.421413741) * t - 0.284496736) * t
               + 0.254829592) * t * $exp(-ax * ax);
    return (x < 0) ? -y : y;
  endfunction

  int tab_lo [256];           // first address holding value x (index x + 128)
  int tab_n  [256];           // number of addresses holding x
  real tab_mean, tab_var;

  task automatic build_table(real s);
    int a;
    a = 0;
    tab_mean = 0.0; tab_var = 0.0;
    for (int x = -128; x <= 127; x++) begin
      real chi;
      int hi;
      chi = (x == 127) ? 1.0 : 0.5 * (1.0 + erf_a(($itor(x) + 0.5) / ($sqrt(2.0) * s)));
      hi = int'($floor(chi * 65536.0 + 0.5));
      if (hi > 65536) hi = 65536;
      if (hi < a) hi = a;
      tab_lo[x + 128] = a;
      tab_n[x + 128]  = hi - a;
      a = hi;
    end
    for (int x = -128; x <= 127; x++) tab_mean += $itor(x) * $itor(tab_n[x + 128]) / 65536.0;
    for (int x = -128; x <= 127; x++)
      tab_var += ($itor(x) - tab_mean) ** 2 * $itor(tab_n[x + 128]) / 65536.0;
  endtask

  // ---------------- data pattern of channel 0 ----------------
  logic [15:0] pat0;           // 16 symbols, bit i -> +64 / -64

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output saturation monitor
  always @(posedge clk) if (st_out == 12'sh7FF || st_out == -12'sh800) n_sat++;

  initial begin
    longint t1, t2, sum;
    real sumsq;
    int nerr;
    n_seq = 0; n_random = 0; n_noise = 0; n_ext = 0; n_result = 0; n_symerr = 0; n_hist = 0;
    n_analog = 0; n_kscan = 0; n_sat = 0; n_fir_multi = 0; n_dlyscan = 0;
    pat0 = 16'hB38E;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;

    // ---------- load memories ----------
    build_table(20.0);
    for (int i = 0; i < 16; i++) wr(24'h400000 | 24'(i), pat0[i] ? 16'h0040 : 16'h00C0);
    for (int a = 0; a < 65536; a++)                                 // square subcarrier
      wr(24'h500000 | 24'(a), a < 32768 ? 16'h007F : 16'h0081);
    for (int x = -128; x <= 127; x++)                                // Gaussian noise table
      for (int a = tab_lo[x + 128]; a < tab_lo[x + 128] + tab_n[x + 128]; a++)
        wr(24'h420000 | 24'(a), 16'(x) & 16'h00FF);
    wr(24'h520000, 16'h007F);                                        // noise gain 127 (address 0)
    for (int a = 0; a < 65536; a++)                                  // channel 1 random data
      wr(24'h410000 | 24'(a), a[0] ^ a[5] ^ a[11] ? 16'h0040 : 16'h00C0);
    for (int c = 0; c < 3; c++) set_coefs(c, 16'h4000, 16'h0);       // unity filters

    // ---------- A: clean BPSK, exact ----------
    chan_cfg(0, 0, 1, IS - 1, 15, 32'h2000_0000, 16'h8000);         // subcarrier period 8
    chan_cfg(1, 0, 0, IS - 1, 15, 32'h0, 16'h0000);
    chan_cfg(2, 2, 1, IS - 1, 0, 32'h0, 16'h0000);
    mon_cfg(0, 1, 0, 0, 8, 0, 0);
    run_ctl(1, 0);
    n_seq++;
    wait_result(0, t1);
    read_results(0, sum, sumsq, nerr);
    // each sample: S_T = (+-8128) >>> 4 = +-508, replica +-8128, product 4129024
    chk(sum == 8 * 16 * 64'd4129024, $sformatf("A: sum %0d", sum));
    chk(sumsq == 8.0 * (16.0 * 4129024.0) ** 2, $sformatf("A: sumsq %e", sumsq));
    chk(nerr == 0, "A: no symbol errors");
    wait_result(0, t2);
    chk(t2 - t1 == 8 * IS, $sformatf("A: measurement period %0d clocks, expected K*I_S = %0d", t2 - t1, 8 * IS));
    read_results(0, sum, sumsq, nerr);
    chk(sum == 8 * 16 * 64'd4129024, "A: second measurement");
    stop_all();

    // ---------- B: data plus noise, SNR ----------
    begin
      real ad, an, sig_st, sig_ref, sd_st, mean, var_s, r_meas, r_exp, perr;
      int kk;
      kk = 512;
      chan_cfg(0, 0, 1, IS - 1, 15, 32'h2000_0000, 16'h0F5C);        // A_D = 0.12
      chan_cfg(2, 2, 1, IS - 1, 0, 32'h0, 16'h8000);                  // A_N = 1
      mon_cfg(0, 1, 0, 0, kk, 0, 0);
      run_ctl(1, 0);
      n_noise++;
      wait_result(0, t1);
      read_results(0, sum, sumsq, nerr);
      ad = 3932.0 / 32768.0;
      sig_ref = $floor(8128.0 * ad);                                  // replica magnitude
      sd_st   = $sqrt(tab_var * (127.0 * 127.0) / 256.0 + 1.0 / 12.0);
      sig_st  = sig_ref / 16.0;
      mean    = $itor(sum) / $itor(kk);
      var_s   = sumsq / $itor(kk) - mean * mean;
      r_meas  = mean / $sqrt(var_s);
      r_exp   = ($itor(IS) * sig_st * sig_ref) / ($sqrt($itor(IS)) * sig_ref * sd_st);
      perr    = 0.5 * (1.0 - erf_a(r_exp / $sqrt(2.0)));
      $display("B: mean/std measured %f expected %f; errors %0d expected %f",
               r_meas, r_exp, nerr, perr * kk);
      chk(r_meas > 0.9 * r_exp && r_meas < 1.1 * r_exp, "B: symbol SNR");
      chk($itor(nerr) > 0.5 * perr * kk && $itor(nerr) < 1.6 * perr * kk + 3.0, "B: symbol error count");
      if (nerr > 0) n_symerr++;
    end

    // ---------- C: histogram of the unfiltered noise ----------
    begin
      logic [15:0] lo, hi;
      real hm, hv, tot;
      wr(24'h000001, 16'h0000);                                       // source 0, shift 0
      wr(24'h000002, 16'h0001);                                       // clear
      run_ctl(1, 1);
      repeat (20000) @(posedge clk);
      #1 run_ctl(1, 0);
      hm = 0.0; hv = 0.0; tot = 0.0;
      for (int b = 0; b < 256; b++) begin
        rd(24'h300000 | 24'(b << 1), lo);
        rd(24'h300000 | 24'(b << 1) | 1, hi);
        tot += $itor({hi, lo});
        hm  += $itor(b - 128) * $itor({hi, lo});
      end
      hm = hm / tot;
      for (int b = 0; b < 256; b++) begin
        rd(24'h300000 | 24'(b << 1), lo);
        rd(24'h300000 | 24'(b << 1) | 1, hi);
        hv += ($itor(b - 128) - hm) ** 2 * $itor({hi, lo});
      end
      hv = hv / tot;
      $display("C: histogram %0.0f samples, mean %f, variance %f (table %f, %f)", tot, hm, hv, tab_mean, tab_var);
      // enabled from the clock edge of the enabling write up to the edge of the
      // disabling write: 20000 + 1 samples
      chk(tot == 20001.0, $sformatf("C: histogram total %0.0f", tot));
      chk(hm > tab_mean - 0.6 && hm < tab_mean + 0.6, "C: noise mean");
      chk(hv > 0.95 * tab_var && hv < 1.05 * tab_var, "C: noise variance");
      n_hist++;
    end
    stop_all();

    // ---------- D: analog loop, integer and fractional delay scan ----------
    begin
      longint best, dig;
      int bestk, bestd;
      chan_cfg(0, 0, 1, IS - 1, 15, 32'h2000_0000, 16'h8000);
      chan_cfg(2, 2, 1, IS - 1, 0, 32'h0, 16'h0000);
      dig = 8 * 16 * 64'd4129024;
      best = -64'sd1 <<< 62; bestk = 0;
      for (int k = 0; k < 8; k++) begin
        mon_cfg(1, 1, 0, 0, 8, k, k);
        run_ctl(1, 0);
        wait_result(1, t1);
        wait_result(1, t1);
        read_results(1, sum, sumsq, nerr);
        if (sum > best) begin best = sum; bestk = k; end
        n_kscan++;
        stop_all();
      end
      bestd = 0;
      for (int d = 0; d < 5; d++) begin
        wr(24'h000004, 16'(d));
        mon_cfg(1, 1, 0, 0, 8, bestk, bestk);
        run_ctl(1, 0);
        wait_result(1, t1);
        wait_result(1, t1);
        read_results(1, sum, sumsq, nerr);
        if (sum > best) begin best = sum; bestd = d; end
        n_dlyscan++;
        stop_all();
      end
      $display("D: best integer delay %0d, delay-line steps %0d, analog/digital symbol energy %f",
               bestk, bestd, $itor(best) / $itor(dig));
      chk($itor(best) > 0.5 * $itor(dig) && $itor(best) < 1.2 * $itor(dig), "D: analog monitor energy");
      wr(24'h000004, 16'(bestd));
      mon_cfg(1, 1, 0, 0, 8, bestk, bestk);
      run_ctl(1, 0);
      wait_result(1, t1);
      wait_result(1, t1);
      read_results(1, sum, sumsq, nerr);
      chk(nerr == 0, "D: no analog symbol errors");
      n_analog++;
      stop_all();
    end

    // ---------- E: channel 1 random-address data and external data ----------
    chan_cfg(0, 0, 1, IS - 1, 15, 32'h2000_0000, 16'h0000);
    chan_cfg(1, 1, 0, IS - 1, 0, 32'h0, 16'h8000);                   // random data, A = 1
    mon_cfg(0, 1, 1, 0, 8, 0, 0);
    run_ctl(1, 0);
    n_random++;
    wait_result(0, t1);
    read_results(0, sum, sumsq, nerr);
    // D = +-64, S_T = +-4, product 256 per sample
    chk(sum == 8 * 16 * 256, $sformatf("E: random-data sum %0d", sum));
    chk(nerr == 0, "E: random-data errors");
    stop_all();
    chan_cfg(1, 3, 0, IS - 1, 0, 32'h0, 16'h8000);                   // external data
    mon_cfg(0, 1, 1, 0, 8, 0, 3);
    fork
      begin : drive_ext
        forever begin
          ext[1] = $urandom_range(0, 1);
          repeat (IS) @(posedge clk);
        end
      end
    join_none
    repeat (5) @(posedge clk);
    #1 run_ctl(1, 0);
    n_ext++;
    wait_result(0, t1);
    wait_result(0, t1);
    read_results(0, sum, sumsq, nerr);
    $display("E: external data sum %0d errors %0d", sum, nerr);
    chk(sum > 8 * 10 * 889 && nerr == 0, "E: external data demodulated");
    disable fork;
    stop_all();

    // ---------- F: saturation through a two-tap noise filter ----------
    chan_cfg(0, 0, 1, IS - 1, 15, 32'h2000_0000, 16'h8000);
    chan_cfg(1, 0, 0, IS - 1, 15, 32'h0, 16'h0000);
    chan_cfg(2, 2, 1, IS - 1, 0, 32'h0, 16'h8000);
    set_coefs(2, 16'h7FFF, 16'h7FFF);
    n_fir_multi++;
    n_sat = 0;
    run_ctl(1, 0);
    repeat (5000) @(posedge clk);
    #1 chk(n_sat > 0, "F: output saturation reached");
    stop_all();

    // ---------- mechanisms ----------
    $display("mechanisms: seq %0d random %0d noise %0d ext %0d results %0d symbol-errors %0d hist %0d analog %0d k-scan %0d delay-scan %0d fir-2tap %0d saturation %0d",
             n_seq, n_random, n_noise, n_ext, n_result, n_symerr, n_hist, n_analog, n_kscan, n_dlyscan, n_fir_multi, n_sat);
    chk(n_seq > 0 && n_random > 0 && n_noise > 0 && n_ext > 0, "all pattern modes used");
    chk(n_result > 0 && n_symerr > 0 && n_hist > 0 && n_analog > 0, "monitors, errors, histogram used");
    chk(n_kscan > 0 && n_dlyscan > 0 && n_fir_multi > 0 && n_sat > 0, "delay scans, filter, saturation used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
