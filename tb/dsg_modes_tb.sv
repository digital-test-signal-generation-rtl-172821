// dsg_modes_tb: runs the signal types and the extreme rates of the SNR
// generator through the whole box and checks the digital statistics monitor
// bit for bit against a sample-by-sample model of the data path.
//
// Data RAMs hold +-100 patterns, the subcarrier RAMs one period of
// 127 sin (channel 0) and 127 cos (channel 1). Filters are unity, the noise
// channel is off, so every output sample, every symbol value S_i and the
// K-symbol sums are exactly predictable:
//   W1 two data channels on two subcarriers, different symbol rates (Eq. 4)
//   W2 residual carrier: carrier (constant data on sin, A = cos 60 deg) plus
//      modulation on cos (A = sin 60 deg) (Eq. 5)
//   W3 QPSK at the highest rate: I_S = 3 (6.67 MS/s at 20 MHz) on a
//      5 MHz carrier (f_sys / 4) (Eq. 6), both replicas
//   W4 offset QPSK: channel 1 offset by half a symbol
//   W5 the shortest symbol, I_S = 2, plain NRZ without subcarrier
//   W6 the slowest rate: I_S = 5,000,000 (4 S/s at 20 MHz) on a 100 Hz
//      subcarrier, K = 2
`timescale 1ns / 1ps
module dsg_modes_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic we = 0, re = 0;
  logic [23:0] addr = 0;
  logic [15:0] wdata = 0, rdata;
  logic irq;
  logic signed [11:0] st_out, adc_code;
  real analog_out;

  dsg_top u_dut (.clk, .rst_n, .bus_we(we), .bus_re(re), .bus_addr(addr), .bus_wdata(wdata),
                 .bus_rdata(rdata), .irq, .ext_data(3'b000), .st_out, .analog_out, .adc_code);

  localparam real PI = 3.14159265358979323846;

  // model copies of the memories
  logic signed [7:0] sc_tab [2][65536];
  logic signed [7:0] pat [2][64];

  typedef struct {
    bit          sc_en;
    int          is;
    int          len;
    logic [31:0] inc;
    int          a;
    int          ph;
  } ch_t;

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

  task automatic chan_cfg(int c, ch_t p);
    wr(24'h100000 | 24'(c << 8) | 0, p.sc_en ? 16'h4 : 16'h0);       // MODE_SEQ
    wr(24'h100000 | 24'(c << 8) | 1, 16'(p.is - 1));
    wr(24'h100000 | 24'(c << 8) | 2, 16'((p.is - 1) >> 16));
    wr(24'h100000 | 24'(c << 8) | 3, 16'(p.len - 1));
    wr(24'h100000 | 24'(c << 8) | 4, p.inc[15:0]);
    wr(24'h100000 | 24'(c << 8) | 5, p.inc[31:16]);
    wr(24'h100000 | 24'(c << 8) | 6, 16'(p.a));
    wr(24'h100000 | 24'(c << 8) | 7, 16'(p.ph));
    wr(24'h100000 | 24'(c << 8) | 8, 16'(p.ph >> 16));
  endtask

  task automatic mon_cfg(bit en, bit rsel, int sq_shift, int k);
    wr(24'h200001, 16'(k));
    wr(24'h200002, 16'(k >> 16));
    wr(24'h200003, 16'h0);
    wr(24'h200004, 16'h0);
    wr(24'h200000, (en ? 16'h1 : 16'h0) | (rsel ? 16'h2 : 16'h0) | 16'(sq_shift << 2));
  endtask

  longint cyc = 0;
  always @(posedge clk) cyc++;

  // model of one channel's attenuated output at sample n
  function automatic int chan_out(int c, ch_t p, longint n, output bit first);
    longint cnt, sym;
    logic [31:0] phase;
    int d, sc, dd;
    cnt   = longint'(p.ph) + n;
    sym   = cnt / p.is;
    first = (cnt % p.is) == 0;
    d     = pat[c][int'(sym % p.len)];
    phase = 32'(longint'(p.inc) * n);
    sc    = sc_tab[c][phase[31:16]];
    dd    = p.sc_en ? d * sc : d;
    return (dd * p.a) >>> 15;
  endfunction

  // model of the monitor's first K-symbol result
  task automatic model(ch_t p0, ch_t p1, bit rsel, int k, int sq_shift,
                       output longint sum, output real sumsq, output int nerr);
    longint acc, n, q;
    int done;
    bit primed, f0, f1, f;
    sum = 0; sumsq = 0.0; nerr = 0; done = 0; primed = 0; acc = 0; n = 0;
    while (done < k) begin
      int a0, a1, st, r;
      a0 = chan_out(0, p0, n, f0);
      a1 = chan_out(1, p1, n, f1);
      st = (a0 + a1) >>> 4;
      if (st > 2047) st = 2047;
      if (st < -2048) st = -2048;
      r = rsel ? a1 : a0;
      f = rsel ? f1 : f0;
      if (f) begin
        if (primed) begin
          sum += acc;
          q = acc >>> sq_shift;
          sumsq += $itor(q) * $itor(q);
          if (acc < 0) nerr++;
          done++;
        end
        primed = 1; acc = 0;
      end
      acc += longint'(st) * longint'(r);
      n++;
    end
  endtask

  task automatic run_case(string name, ch_t p0, ch_t p1, bit rsel, int k, int sq_shift);
    longint msum, hsum;
    real msq, hsq;
    int merr, herr, guard;
    logic [15:0] w [13], st;
    logic [79:0] s80;
    logic [95:0] q96;
    wr(24'h000000, 16'h0);
    // let the previous case's samples drain out of the pipeline first
    repeat (32) @(posedge clk);
    #1 mon_cfg(0, 0, 0, 1);
    repeat (32) @(posedge clk);
    #1 chan_cfg(0, p0);
    chan_cfg(1, p1);
    mon_cfg(1, rsel, sq_shift, k);
    wr(24'h000003, 16'h3);
    wr(24'h000000, 16'h1);
    guard = 0;
    // poll slowly: the slowest case takes millions of clocks
    do begin
      repeat (1000) @(posedge clk);
      #1 rd(24'h000003, st);
      guard++;
    end while (!st[0] && guard < 20000);
    chk(st[0], {name, ": result ready"});
    for (int i = 0; i < 13; i++) rd(24'h200010 | 24'(i), w[i]);
    s80 = {w[4], w[3], w[2], w[1], w[0]};
    q96 = {w[10], w[9], w[8], w[7], w[6], w[5]};
    hsum = longint'($signed(s80));
    hsq  = $itor(q96[95:64]) * 18446744073709551616.0 + $itor(q96[63:32]) * 4294967296.0 + $itor(q96[31:0]);
    herr = int'({w[12], w[11]});
    model(p0, p1, rsel, k, sq_shift, msum, msq, merr);
    $display("%s: sum %0d (model %0d), sum of squares %e (model %e), errors %0d (model %0d)",
             name, hsum, msum, hsq, msq, herr, merr);
    chk(hsum == msum, {name, ": symbol value sum"});
    chk(hsq == msq, {name, ": symbol squared sum"});
    chk(herr == merr, {name, ": symbol error count"});
  endtask

  initial begin
    repeat (40000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ch_t p0, p1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    // memories
    for (int i = 0; i < 64; i++) begin
      pat[0][i] = (i == 0 || $urandom_range(0, 1)) ? 8'sd100 : -8'sd100;
      pat[1][i] = $urandom_range(0, 1) ? 8'sd100 : -8'sd100;
      wr(24'h400000 | 24'(i), 16'(pat[0][i]) & 16'hFF);
      wr(24'h410000 | 24'(i), 16'(pat[1][i]) & 16'hFF);
    end
    for (int a = 0; a < 65536; a++) begin
      sc_tab[0][a] = 8'($rtoi($floor(127.0 * $sin(2.0 * PI * $itor(a) / 65536.0) + 0.5)));
      sc_tab[1][a] = 8'($rtoi($floor(127.0 * $cos(2.0 * PI * $itor(a) / 65536.0) + 0.5)));
      wr(24'h500000 | 24'(a), 16'(sc_tab[0][a]) & 16'hFF);
      wr(24'h510000 | 24'(a), 16'(sc_tab[1][a]) & 16'hFF);
    end
    for (int c = 0; c < 3; c++)
      for (int t = 0; t < 63; t++) wr(24'h600000 | 24'(c << 8) | 24'(t), t == 0 ? 16'h4000 : 16'h0);
    wr(24'h100206, 16'h0);                                       // noise channel off

    // W1: Eq. (4), two subcarriers, two symbol rates
    p0 = '{sc_en: 1, is: 40, len: 64, inc: 32'h0CCC_CCCD, a: 16'h6000, ph: 0};
    p1 = '{sc_en: 1, is: 100, len: 64, inc: 32'h1555_5555, a: 16'h4000, ph: 0};
    run_case("W1 dual subcarrier, replica 0", p0, p1, 0, 16, 8);
    run_case("W1 dual subcarrier, replica 1", p0, p1, 1, 16, 8);
    // W2: Eq. (5), residual carrier, modulation index 60 degrees
    p0 = '{sc_en: 1, is: 64, len: 1, inc: 32'h2000_0000, a: 16'h4000, ph: 0};
    p1 = '{sc_en: 1, is: 64, len: 64, inc: 32'h2000_0000, a: 16'h6EDA, ph: 0};
    run_case("W2 residual carrier", p0, p1, 1, 16, 8);
    // W3: Eq. (6), QPSK at I_S = 3 on a f_sys/4 carrier
    p0 = '{sc_en: 1, is: 3, len: 64, inc: 32'h4000_0000, a: 16'h8000, ph: 0};
    p1 = '{sc_en: 1, is: 3, len: 64, inc: 32'h4000_0000, a: 16'h8000, ph: 0};
    run_case("W3 QPSK I", p0, p1, 0, 64, 0);
    run_case("W3 QPSK Q", p0, p1, 1, 64, 0);
    // W4: offset QPSK, channel 1 half a symbol late
    p0.is = 4; p1.is = 4; p1.ph = 2;
    run_case("W4 OQPSK I", p0, p1, 0, 64, 0);
    run_case("W4 OQPSK Q", p0, p1, 1, 64, 0);
    // W5: I_S = 2, NRZ without subcarrier
    p0 = '{sc_en: 0, is: 2, len: 64, inc: 32'h0, a: 16'h8000, ph: 0};
    p1 = '{sc_en: 0, is: 2, len: 64, inc: 32'h0, a: 16'h8000, ph: 0};
    run_case("W5 NRZ I_S=2", p0, p1, 0, 64, 0);
    // W6: I_S = 5,000,000 with a 100 Hz subcarrier at 20 MHz
    p0 = '{sc_en: 1, is: 5000000, len: 64, inc: 32'd21475, a: 16'h8000, ph: 0};
    p1 = '{sc_en: 0, is: 5000000, len: 64, inc: 32'h0, a: 16'h0, ph: 0};
    run_case("W6 4 S/s, 100 Hz subcarrier", p0, p1, 0, 2, 24);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
