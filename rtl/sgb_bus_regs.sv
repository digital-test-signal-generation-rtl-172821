// sgb_bus_regs: CPU bus interface of the SNR generator box.
//
// The CPU configures everything and reads the measurements through a simple
// synchronous bus: one write per clock (bus_we, bus_addr, bus_wdata) and one
// read per clock (bus_re, bus_addr), with bus_rdata valid the clock after
// bus_re. This stands in for the backplane bus of the original hardware,
// whose protocol the document does not describe; the address map below is
// this design's.
//
// Word address map (bus_addr[23:20] selects the region):
//   0x0_00xx  global: 0x00 CTRL    [0] run, [1] histogram enable
//                      0x01 HISTCFG [3:0] shift, [5:4] source
//                           (0 noise d(n), 1 filtered noise, 2 S_T, 3 channel 0 D(n))
//                      0x02 HISTCLR write: clear all bins
//                      0x03 STATUS  read: [0] digital result ready,
//                           [1] analog result ready; write 1s to clear
//                      0x04 DELAY   [5:0] analog delay-line steps (2 ns each)
//   0x1_0c0r  channel c (0,1 data, 2 noise), register r:
//                      0 MODE [1:0] mode, [2] sc_en; 1/2 I_S-1 low/high;
//                      3 pattern length-1; 4/5 subcarrier increment low/high;
//                      6 attenuator A (Q1.15); 7/8 symbol phase at start
//                      low/high (symbol offset between channels)
//   0x2_0m0r  monitor m (0 digital, 1 analog), register r:
//                      0 CTRL [0] en, [1] ref_sel, [7:2] sq_shift;
//                      1/2 K low/high; 3 kdly; 4 window offset
//   0x2_0m1w  monitor m result word w (read): words 0-4 sum, 5-10 sumsq,
//                      11-12 symbol errors, least significant word first
//   0x3_0bbh  histogram bin bb, h = 0 low / 1 high half (read)
//   0x4_caaaa data RAM word aaaa of channel c (write, low byte)
//   0x5_caaaa subcarrier RAM word aaaa of channel c (write, low byte)
//   0x6_00ct  FIR coefficient t (0..62) of channel c (write)
// Configuration registers are write-only and reset to zero (all idle).
// irq is high while a result-ready bit is set.
`timescale 1ns / 1ps
module sgb_bus_regs
  import dsg_pkg::*;
#(
  parameter int ADDR_W_BUS = 24,
  parameter int DATA_W     = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // CPU side
  input  logic                    bus_we,
  input  logic                    bus_re,
  input  logic [ADDR_W_BUS-1:0]   bus_addr,
  input  logic [DATA_W-1:0]       bus_wdata,
  output logic [DATA_W-1:0]       bus_rdata,
  output logic                    irq,
  // configuration
  output logic                    run,
  output chan_cfg_t               ccfg [3],
  output mon_cfg_t                mcfg [2],
  output logic                    hist_en,
  output logic                    hist_clear,
  output logic [3:0]              hist_shift,
  output logic [1:0]              hist_src,
  output logic [5:0]              dly_sel,
  // memory and coefficient writes
  output logic [2:0]              dram_we,
  output logic [2:0]              scram_we,
  output logic [ADDR_W-1:0]       mem_waddr,
  output logic [SAMP_W-1:0]       mem_wdata,
  output logic [2:0]              coef_we,
  output logic [5:0]              coef_addr,
  output logic [COEF_W-1:0]       coef_data,
  // read-back
  output logic [7:0]              hist_rd_bin,
  input  logic [31:0]             hist_count,
  input  logic [1:0]              res_valid,
  input  logic [SUM_W+SUMSQ_W+NERR_W-1:0] results [2]
);

  logic [3:0] region;
  logic [1:0] sel2;
  logic [1:0] status;

  assign region = bus_addr[23:20];
  assign sel2   = bus_addr[17:16];

  // --------- direct write strobes ---------
  assign mem_waddr = bus_addr[15:0];
  assign mem_wdata = bus_wdata[SAMP_W-1:0];
  assign coef_addr = bus_addr[5:0];
  assign coef_data = bus_wdata;
  assign hist_rd_bin = bus_addr[8:1];

  always_comb begin
    dram_we  = '0;
    scram_we = '0;
    coef_we  = '0;
    if (bus_we && region == 4'h4 && sel2 != 2'd3) dram_we[sel2]  = 1'b1;
    if (bus_we && region == 4'h5 && sel2 != 2'd3) scram_we[sel2] = 1'b1;
    if (bus_we && region == 4'h6 && bus_addr[9:8] != 2'd3) coef_we[bus_addr[9:8]] = 1'b1;
  end

  // --------- configuration registers ---------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run        <= 1'b0;
      hist_en    <= 1'b0;
      hist_clear <= 1'b0;
      hist_shift <= '0;
      hist_src   <= '0;
      dly_sel    <= '0;
      status     <= '0;
      for (int c = 0; c < 3; c++) ccfg[c] <= '0;
      for (int m = 0; m < 2; m++) mcfg[m] <= '0;
    end else begin
      hist_clear <= 1'b0;
      status     <= status | res_valid;
      if (bus_we) begin
        unique case (region)
          4'h0: case (bus_addr[7:0])
                  8'h00: begin run <= bus_wdata[0]; hist_en <= bus_wdata[1]; end
                  8'h01: begin hist_shift <= bus_wdata[3:0]; hist_src <= bus_wdata[5:4]; end
                  8'h02: hist_clear <= 1'b1;
                  8'h03: status <= (status & ~bus_wdata[1:0]) | res_valid;
                  8'h04: dly_sel <= bus_wdata[5:0];
                  default: ;
                endcase
          4'h1: if (bus_addr[9:8] != 2'd3) begin
                  case (bus_addr[3:0])
                    4'h0: begin
                      ccfg[bus_addr[9:8]].mode  <= pat_mode_e'(bus_wdata[1:0]);
                      ccfg[bus_addr[9:8]].sc_en <= bus_wdata[2];
                    end
                    4'h1: ccfg[bus_addr[9:8]].is_m1[15:0]      <= bus_wdata;
                    4'h2: ccfg[bus_addr[9:8]].is_m1[23:16]     <= bus_wdata[7:0];
                    4'h3: ccfg[bus_addr[9:8]].pat_len_m1       <= bus_wdata;
                    4'h4: ccfg[bus_addr[9:8]].sc_inc[15:0]     <= bus_wdata;
                    4'h5: ccfg[bus_addr[9:8]].sc_inc[31:16]    <= bus_wdata;
                    4'h6: ccfg[bus_addr[9:8]].atten            <= bus_wdata;
                    4'h7: ccfg[bus_addr[9:8]].sym_phase[15:0]  <= bus_wdata;
                    4'h8: ccfg[bus_addr[9:8]].sym_phase[23:16] <= bus_wdata[7:0];
                    default: ;
                  endcase
                end
          4'h2: if (!bus_addr[4]) begin
                  case (bus_addr[3:0])
                    4'h0: begin
                      mcfg[bus_addr[8]].en       <= bus_wdata[0];
                      mcfg[bus_addr[8]].ref_sel  <= bus_wdata[1];
                      mcfg[bus_addr[8]].sq_shift <= bus_wdata[7:2];
                    end
                    4'h1: mcfg[bus_addr[8]].k[15:0]  <= bus_wdata;
                    4'h2: mcfg[bus_addr[8]].k[23:16] <= bus_wdata[7:0];
                    4'h3: mcfg[bus_addr[8]].kdly     <= bus_wdata[KDLY_W-1:0];
                    4'h4: mcfg[bus_addr[8]].offset   <= bus_wdata[OFF_W-1:0];
                    default: ;
                  endcase
                end
          default: ;
        endcase
      end
    end
  end

  assign irq = |status;

  // --------- read-back ---------
  localparam int RW = SUM_W + SUMSQ_W + NERR_W;   // 208 bits, 13 words
  logic [RW-1:0]     rvec;
  logic [DATA_W-1:0] rmux;

  always_comb begin
    rvec = results[bus_addr[8]];
    rmux = '0;
    case (region)
      4'h0: if (bus_addr[7:0] == 8'h03) rmux = DATA_W'(status);
      4'h2: if (bus_addr[4] && bus_addr[3:0] < 4'd13)
              rmux = rvec[16*bus_addr[3:0] +: 16];
      4'h3: rmux = bus_addr[0] ? hist_count[31:16] : hist_count[15:0];
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n)      bus_rdata <= '0;
    else if (bus_re) bus_rdata <= rmux;
  end

endmodule
