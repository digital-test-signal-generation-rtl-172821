// pattern_generator: the pattern generator of one channel.
//
// Each channel has a data RAM and a subcarrier RAM (64K x 8 each), a PN
// random-address generator, a symbol timer and a subcarrier phase accumulator.
// The data RAM word d(n) is read in one of four ways (cfg.mode):
//   MODE_SEQ    sequential addresses, one word per symbol of I_S clocks,
//               wrapping after address cfg.pat_len_m1 (the normal data mode);
//   MODE_RANDOM PN addresses, one word per symbol (very long random data);
//   MODE_NOISE  PN addresses, one word per clock: the RAM holds a quantised
//               Gaussian table, so d(n) becomes Gaussian noise;
//   MODE_EXT    d(n) = +127 / -127 from an external data line (for example
//               encoded symbols from a test support assembly) sampled at the
//               system clock through a two-flop synchroniser.
// The subcarrier RAM is read at the address given by the top 16 bits of a
// 32-bit phase accumulator advanced by cfg.sc_inc every clock; an increment of
// 2^16 is a plain sequential read and smaller increments give frequency steps
// down to f_sys/2^32. The channel output is the BPSK sequence
// D(n) = d(n) * Sc(n) (exact 16-bit product), or D(n) = d(n) when cfg.sc_en
// is low (no subcarrier, e.g. for the noise channel).
//
// The four modes, the RAM sizes, D(n) = d(n)Sc(n), I_S and the 32-bit phase
// resolution follow the document. The phase accumulator, the 8-bit signed
// sample format and the external-line mapping are this design's choices.
//
// Timing: while `run` is low every counter sits at its start value (symbol
// count cfg.sym_phase, data address 0, phase 0) and the output is 0, so
// raising `run` starts all channels in step. A non-zero cfg.sym_phase
// shortens the first symbol by that many clocks, which offsets this
// channel's symbols against the others (half a symbol for offset QPSK); the
// offset register is this design's way of providing the document's OQPSK. d_out follows the address state by two clocks
// (registered RAM read, registered product). first_out marks the first sample
// of each symbol, aligned with d_out; raw_out is d(n) aligned with d_out.
`timescale 1ns / 1ps
module pattern_generator
  import dsg_pkg::*;
#(
  parameter logic [62:0] SEED = 63'h1D87_2B41_C9A6_3E55
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 run,
  input  chan_cfg_t            cfg,
  // CPU writes to the two RAMs
  input  logic                 dram_we,
  input  logic [ADDR_W-1:0]    dram_waddr,
  input  logic [SAMP_W-1:0]    dram_wdata,
  input  logic                 scram_we,
  input  logic [ADDR_W-1:0]    scram_waddr,
  input  logic [SAMP_W-1:0]    scram_wdata,
  // external data line (asynchronous)
  input  logic                 ext_data,
  // channel output
  output logic signed [D_W-1:0]    d_out,
  output logic                     first_out,
  output logic signed [SAMP_W-1:0] raw_out
);

  // ---------------- address state ----------------
  logic [IS_W-1:0]    sym_cnt;
  logic [ADDR_W-1:0]  seq_addr;
  logic [PHASE_W-1:0] phase;
  logic [ADDR_W-1:0]  pn_addr;
  logic               sym_last, pn_adv;

  assign sym_last = run && (sym_cnt == cfg.is_m1);
  assign pn_adv   = (cfg.mode == MODE_NOISE)  ? run :
                    (cfg.mode == MODE_RANDOM) ? sym_last : 1'b0;

  logic [IS_W-1:0] sym_start;
  assign sym_start = (cfg.sym_phase > cfg.is_m1) ? '0 : cfg.sym_phase;

  always_ff @(posedge clk) begin
    if (!rst_n || !run) begin
      sym_cnt  <= sym_start;
      seq_addr <= '0;
      phase    <= '0;
    end else begin
      sym_cnt <= sym_last ? '0 : sym_cnt + 1'b1;
      if (sym_last)
        seq_addr <= (seq_addr == cfg.pat_len_m1) ? '0 : seq_addr + 1'b1;
      phase <= phase + cfg.sc_inc;
    end
  end

  pn_generator #(.SEED(SEED)) u_pn (
    .clk(clk), .rst_n(rst_n), .advance(pn_adv), .addr(pn_addr)
  );

  logic [ADDR_W-1:0] d_raddr;
  assign d_raddr = (cfg.mode == MODE_SEQ) ? seq_addr : pn_addr;

  // ---------------- RAMs (one clock) ----------------
  logic [SAMP_W-1:0] d_word, sc_word;

  pattern_ram #(.AW(ADDR_W), .DW(SAMP_W)) u_dram (
    .clk(clk), .we(dram_we), .waddr(dram_waddr), .wdata(dram_wdata),
    .raddr(d_raddr), .rdata(d_word)
  );

  pattern_ram #(.AW(ADDR_W), .DW(SAMP_W)) u_scram (
    .clk(clk), .we(scram_we), .waddr(scram_waddr), .wdata(scram_wdata),
    .raddr(phase[PHASE_W-1 -: ADDR_W]), .rdata(sc_word)
  );

  logic ext_meta, ext_sync;
  logic valid_b, first_b;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ext_meta <= 1'b0;
      ext_sync <= 1'b0;
      valid_b  <= 1'b0;
      first_b  <= 1'b0;
    end else begin
      ext_meta <= ext_data;
      ext_sync <= ext_meta;
      valid_b  <= run;
      first_b  <= run && (sym_cnt == '0);
    end
  end

  // ---------------- product D(n) = d(n) Sc(n) (one clock) ----------------
  logic signed [SAMP_W-1:0] d_n, sc_n;
  logic signed [D_W-1:0]    prod;

  always_comb begin
    d_n  = (cfg.mode == MODE_EXT) ? (ext_sync ? SAMP_W'(127) : -SAMP_W'(127))
                                  : $signed(d_word);
    sc_n = $signed(sc_word);
    prod = cfg.sc_en ? D_W'(d_n * sc_n) : D_W'(d_n);
  end

  always_ff @(posedge clk) begin
    if (!rst_n || !valid_b) begin
      d_out     <= '0;
      first_out <= 1'b0;
      raw_out   <= '0;
    end else begin
      d_out     <= prod;
      first_out <= first_b;
      raw_out   <= d_n;
    end
  end

endmodule
