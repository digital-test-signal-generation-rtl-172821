// dsg_pkg: types and constants shared by the digital SNR generator.
//
// The generator has three identical channels (two data channels and one
// noise channel). Each channel is configured by a chan_cfg_t; each of the two
// statistics monitors by a mon_cfg_t. Widths follow the document where it
// gives them (64K x 8-bit pattern RAMs, 63-tap filter, 12-bit output, I_S up
// to 2^24, 32-bit phase resolution); the others are this design's choice.
`timescale 1ns / 1ps
package dsg_pkg;

  localparam int ADDR_W   = 16;  // 64K-word pattern RAMs
  localparam int SAMP_W   = 8;   // B = 8 bits per RAM word
  localparam int PHASE_W  = 32;  // subcarrier resolution f_sys / 2^32
  localparam int IS_W     = 24;  // I_S - 1 held in 24 bits (2 <= I_S <= 2^24)
  localparam int D_W      = 16;  // D(n) = d(n) * Sc(n), exact product
  localparam int FIR_N    = 63;  // filter taps
  localparam int COEF_W   = 16;  // Q2.14 coefficients
  localparam int ST_W     = 12;  // output / DAC / ADC word
  localparam int K_W      = 24;  // symbols per measurement
  localparam int KDLY_W   = 6;   // integer analog delay k, 0..63 cycles
  localparam int OFF_W    = 8;   // integration window offset, 0..255 cycles
  localparam int S_W      = ST_W + D_W;         // S(n) product width (28)
  localparam int SI_W     = S_W + IS_W;         // S_i width (52)
  localparam int SUM_W    = 80;                 // symbol value accumulator
  localparam int SQ_IN_W  = 32;                 // S_i word squared
  localparam int SUMSQ_W  = 96;                 // symbol squared accumulator
  localparam int NERR_W   = 32;                 // symbol error accumulator

  // How the data RAM of a channel is addressed.
  typedef enum logic [1:0] {
    MODE_SEQ    = 2'd0,  // sequential, one word per symbol, wraps at pat_len_m1
    MODE_RANDOM = 2'd1,  // PN address, one word per symbol (long random data)
    MODE_NOISE  = 2'd2,  // PN address, one word per clock (noise generator)
    MODE_EXT    = 2'd3   // external data line sampled at the system clock
  } pat_mode_e;

  typedef struct packed {
    pat_mode_e              mode;
    logic                   sc_en;       // multiply by the subcarrier RAM
    logic [IS_W-1:0]        is_m1;       // I_S - 1 (clocks per symbol minus one)
    logic [IS_W-1:0]        sym_phase;   // symbol count at start (offset, e.g. OQPSK)
    logic [ADDR_W-1:0]      pat_len_m1;  // last data RAM address in MODE_SEQ
    logic [PHASE_W-1:0]     sc_inc;      // subcarrier phase increment per clock
    logic [15:0]            atten;       // attenuator factor, Q1.15, <= 1
  } chan_cfg_t;

  typedef struct packed {
    logic                   en;          // run the monitor
    logic                   ref_sel;     // 0: channel 0, 1: channel 1 as replica
    logic [K_W-1:0]         k;           // symbols per measurement, K
    logic [KDLY_W-1:0]      kdly;        // integer delay of the replica (clocks)
    logic [OFF_W-1:0]       offset;      // extra delay of the symbol mark
    logic [5:0]             sq_shift;    // S_i >>> sq_shift before squaring
  } mon_cfg_t;

endpackage
