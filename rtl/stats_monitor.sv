// stats_monitor: statistics monitor on one output (digital S_T(n), or the
// ADC code of the analog output).
//
// The output sample x(n) is multiplied by an exact replica r(n) = A_D D_f(n)
// of the data it carries, S(n) = x(n) r(n), which is the optimum
// subcarrier-and-data demodulation for a known data spectrum. S(n) is
// integrated over each symbol (symbol_integrator) and the symbol values S_i
// are accumulated over K symbols (symbol_accumulators).
// For the analog output the converters and analog filter add a delay of
// k whole clocks plus a fraction; the integer part is removed by delaying the
// replica and its symbol marks by cfg.kdly clocks (the fraction is handled by
// the 2-ns delay line on the converter clock, outside this block). The symbol
// marks are delayed by a further cfg.offset clocks so the integration window
// can be centred on the filtered symbol. cfg.ref_sel picks channel 0 or 1
// as the replica.
// The demodulation, integration, accumulators and removal of kT_sys follow
// the document; the delay ranges and the window offset are this design's.
//
// Timing: S(n) is registered (one clock), the integrator dumps one clock
// after the mark, the results are latched one clock after that.
`timescale 1ns / 1ps
module stats_monitor
  import dsg_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  mon_cfg_t                 cfg,
  input  logic signed [ST_W-1:0]   x_in,
  input  logic signed [D_W-1:0]    ref1,
  input  logic                     rfirst1,
  input  logic signed [D_W-1:0]    ref2,
  input  logic                     rfirst2,
  output logic                     si_valid,
  output logic signed [SI_W-1:0]   si,
  output logic                     res_valid,
  output logic signed [SUM_W-1:0]  sum,
  output logic [SUMSQ_W-1:0]       sumsq,
  output logic [NERR_W-1:0]        nerr
);

  localparam int RD = 2 ** KDLY_W;              // replica delay line depth
  localparam int MD = RD + 2 ** OFF_W;          // mark delay line depth

  logic signed [D_W-1:0] r_sel, r_dly;
  logic                  m_sel, m_dly;
  logic signed [D_W-1:0] r_sr [RD];
  logic [MD-1:0]         m_sr;
  logic [$clog2(MD)-1:0] mtap;

  assign r_sel  = cfg.ref_sel ? ref2 : ref1;
  assign m_sel  = cfg.ref_sel ? rfirst2 : rfirst1;
  assign mtap   = $clog2(MD)'(cfg.kdly) + $clog2(MD)'(cfg.offset);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < RD; i++) r_sr[i] <= '0;
      m_sr <= '0;
    end else begin
      r_sr[0] <= r_sel;
      for (int i = 1; i < RD; i++) r_sr[i] <= r_sr[i-1];
      m_sr <= {m_sr[MD-2:0], m_sel};
    end
  end

  assign r_dly = (cfg.kdly == '0) ? r_sel : r_sr[cfg.kdly - 1'b1];
  assign m_dly = (mtap == '0)     ? m_sel : m_sr[mtap - 1'b1];

  // S(n) = x(n) r(n)
  logic signed [S_W-1:0] s_n;
  logic                  s_first;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_n     <= '0;
      s_first <= 1'b0;
    end else begin
      s_n     <= S_W'(x_in * r_dly);
      s_first <= m_dly;
    end
  end

  symbol_integrator #(.IN_W(S_W), .OUT_W(SI_W)) u_int (
    .clk(clk), .rst_n(rst_n), .en(cfg.en), .s_in(s_n), .first_in(s_first),
    .si_valid(si_valid), .si(si)
  );

  symbol_accumulators #(
    .SI_W(SI_W), .K_W(K_W), .SQ_W(SQ_IN_W), .SUM_W(SUM_W),
    .SUMSQ_W(SUMSQ_W), .NERR_W(NERR_W)
  ) u_acc (
    .clk(clk), .rst_n(rst_n), .en(cfg.en), .k(cfg.k), .sq_shift(cfg.sq_shift),
    .si_valid(si_valid), .si(si),
    .res_valid(res_valid), .sum(sum), .sumsq(sumsq), .nerr(nerr)
  );

endmodule
