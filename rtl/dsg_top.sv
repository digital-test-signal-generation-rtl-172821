// dsg_top: digital SNR generator (DSG) signal box.
//
// Generates a test signal whose signal-to-noise ratio is set digitally and
// is therefore exactly known, and measures the SNR actually delivered.
// Three channels of identical hardware (pattern generator, 63-tap FIR filter,
// attenuator) produce two data channels (channel 0 and 1, BPSK data on a
// subcarrier, or plain data) and one noise channel (channel 2, Gaussian noise
// from a RAM table read at PN-random addresses). The summer adds them into
// the 12-bit output sequence S_T(n), which is the digital output and also
// drives the DAC, the three-pole output filter and so the analog output. An
// ADC, clocked through a 2-ns-step delay line, digitises the analog output
// again. Two statistics monitors demodulate the digital output and the ADC
// code with the exact data replica and accumulate, over K symbols, the sum,
// the sum of squares and the count of negative symbol values from which the
// CPU computes the SNR and the symbol error rate. A histogram accumulator
// checks the noise distribution. Everything is set up through the CPU bus
// (see sgb_bus_regs for the address map).
//
// The partition into channels, the filter length, the RAM sizes, the
// 12-bit output, the two monitors and the histogram follow the document;
// the bus, the widths and the scaling are this design's choices. The DAC,
// analog filter, ADC and delay line are behavioural models, so this top is a
// simulation model of the whole box; the digital part (everything except
// those four) is synthesizable on its own.
//
// Timing: one sample per clock. From a data RAM address to S_T(n): 2 clocks
// in the pattern generator, 1 in the filter, 1 in the attenuator, 1 in the
// summer. irq rises when a K-symbol measurement is ready.
`timescale 1ns / 1ps
module dsg_top
  import dsg_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  // CPU bus
  input  logic                   bus_we,
  input  logic                   bus_re,
  input  logic [23:0]            bus_addr,
  input  logic [15:0]            bus_wdata,
  output logic [15:0]            bus_rdata,
  output logic                   irq,
  // external data lines of channels 0..2
  input  logic [2:0]             ext_data,
  // outputs
  output logic signed [ST_W-1:0] st_out,      // digital output S_T(n)
  output real                    analog_out,  // filtered analog output
  output logic signed [ST_W-1:0] adc_code     // analog output, re-digitised
);

  localparam logic [62:0] SEEDS [3] = '{63'h1D87_2B41_C9A6_3E55,
                                        63'h5A3C_96E1_0F2D_7B84,
                                        63'h2E6B_D143_8A97_C05F};

  chan_cfg_t ccfg [3];
  mon_cfg_t  mcfg [2];
  logic      run, hist_en, hist_clear;
  logic [3:0] hist_shift;
  logic [1:0] hist_src;
  logic [5:0] dly_sel;
  logic [2:0] dram_we, scram_we, coef_we;
  logic [ADDR_W-1:0] mem_waddr;
  logic [SAMP_W-1:0] mem_wdata;
  logic [5:0]        coef_addr;
  logic [COEF_W-1:0] coef_data;
  logic [7:0]        hist_rd_bin;
  logic [31:0]       hist_count;
  logic [1:0]        res_valid;
  logic [SUM_W+SUMSQ_W+NERR_W-1:0] results [2];

  sgb_bus_regs u_bus (
    .clk, .rst_n, .bus_we, .bus_re, .bus_addr, .bus_wdata, .bus_rdata, .irq,
    .run, .ccfg, .mcfg, .hist_en, .hist_clear, .hist_shift, .hist_src, .dly_sel,
    .dram_we, .scram_we, .mem_waddr, .mem_wdata, .coef_we, .coef_addr, .coef_data,
    .hist_rd_bin, .hist_count, .res_valid, .results
  );

  // ---------------- three channels ----------------
  logic signed [D_W-1:0]    d_n [3], df_n [3], da_n [3];
  logic                     f_d [3], f_f [3], f_a [3];
  logic signed [SAMP_W-1:0] raw [3];

  for (genvar c = 0; c < 3; c++) begin : g_chan
    pattern_generator #(.SEED(SEEDS[c])) u_pat (
      .clk, .rst_n, .run, .cfg(ccfg[c]),
      .dram_we(dram_we[c]), .dram_waddr(mem_waddr), .dram_wdata(mem_wdata),
      .scram_we(scram_we[c]), .scram_waddr(mem_waddr), .scram_wdata(mem_wdata),
      .ext_data(ext_data[c]),
      .d_out(d_n[c]), .first_out(f_d[c]), .raw_out(raw[c])
    );

    fir_filter #(.N(FIR_N), .XW(D_W), .CW(COEF_W), .CFRAC(14)) u_fir (
      .clk, .rst_n, .x_in(d_n[c]), .first_in(f_d[c]),
      .coef_we(coef_we[c]), .coef_addr(coef_addr), .coef_data(coef_data),
      .y_out(df_n[c]), .first_out(f_f[c])
    );

    attenuator #(.W(D_W), .AW(16)) u_att (
      .clk, .rst_n, .x_in(df_n[c]), .first_in(f_f[c]), .atten(ccfg[c].atten),
      .y_out(da_n[c]), .first_out(f_a[c])
    );
  end

  // ---------------- summer ----------------
  logic signed [D_W-1:0] ref1, ref2;
  logic                  rfirst1, rfirst2;
  logic                  unused_noise_mark;

  assign unused_noise_mark = f_a[2];

  output_summer #(.W(D_W), .OUT_W(ST_W), .OUT_SHIFT(4)) u_sum (
    .clk, .rst_n,
    .ch1(da_n[0]), .first1(f_a[0]), .ch2(da_n[1]), .first2(f_a[1]), .noise(da_n[2]),
    .st_out, .ref1, .rfirst1, .ref2, .rfirst2
  );

  // ---------------- analog output and its re-digitisation ----------------
  real  v_dac;
  logic clk_adc;

  dac_model #(.BITS(ST_W)) u_dac (.clk, .code(st_out), .vout(v_dac));
  butterworth3_model #(.FC_NORM(0.25)) u_filt (.clk, .vin(v_dac), .vout(analog_out));
  delay_line_model u_dly (.in(clk), .sel(dly_sel), .out(clk_adc));
  adc_model #(.BITS(ST_W)) u_adc (.clk(clk_adc), .vin(analog_out), .code(adc_code));

  // ---------------- statistics ----------------
  logic                  si_valid [2];
  logic signed [SI_W-1:0] si [2];
  logic signed [SUM_W-1:0] m_sum [2];
  logic [SUMSQ_W-1:0]      m_sumsq [2];
  logic [NERR_W-1:0]       m_nerr [2];

  for (genvar m = 0; m < 2; m++) begin : g_mon
    stats_monitor u_mon (
      .clk, .rst_n, .cfg(mcfg[m]),
      .x_in(m == 0 ? st_out : adc_code),
      .ref1, .rfirst1, .ref2, .rfirst2,
      .si_valid(si_valid[m]), .si(si[m]),
      .res_valid(res_valid[m]), .sum(m_sum[m]), .sumsq(m_sumsq[m]), .nerr(m_nerr[m])
    );
    assign results[m] = {m_nerr[m], m_sumsq[m], m_sum[m]};
  end

  // ---------------- histogram ----------------
  logic signed [15:0] h_sample;

  always_comb begin
    unique case (hist_src)
      2'd0:    h_sample = 16'(raw[2]);      // unfiltered noise N_0(n)
      2'd1:    h_sample = df_n[2];          // filtered noise N_0f(n)
      2'd2:    h_sample = 16'(st_out);      // output S_T(n)
      default: h_sample = d_n[0];           // channel 0 D(n)
    endcase
  end

  histogram_accumulator #(.SW(16), .CNT_W(32)) u_hist (
    .clk, .rst_n, .en(hist_en), .clear(hist_clear), .sample(h_sample),
    .shift(hist_shift), .rd_bin(hist_rd_bin), .rd_count(hist_count)
  );

endmodule
