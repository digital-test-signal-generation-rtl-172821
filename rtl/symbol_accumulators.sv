// symbol_accumulators: the symbol value, symbol squared and symbol error
// accumulators of the statistics monitor, run over K symbols:
//   sum   = sum of S_i            (the CPU divides by K for the mean)
//   sumsq = sum of q_i^2,  q_i = S_i >>> sq_shift saturated to SQ_W bits
//   nerr  = number of S_i < 0     (symbol error count)
// When the K-th symbol has been added the three totals are copied to the
// result registers, res_valid pulses for one clock and the accumulators
// restart, so consecutive measurements follow each other without a gap.
// The CPU forms the mean, the mean square and the SNR estimate from them.
// The three accumulators and the K-symbol period follow the document; the
// pre-squaring shift, the widths and S_i = 0 counting as no error are this
// design's choices. K = 0 behaves as K = 1. While `en` is low the running
// totals are cleared; the result registers keep the last measurement.
`timescale 1ns / 1ps
module symbol_accumulators #(
  parameter int SI_W    = 52,
  parameter int K_W     = 24,
  parameter int SQ_W    = 32,
  parameter int SUM_W   = 80,
  parameter int SUMSQ_W = 96,
  parameter int NERR_W  = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic [K_W-1:0]           k,
  input  logic [5:0]               sq_shift,
  input  logic                     si_valid,
  input  logic signed [SI_W-1:0]   si,
  output logic                     res_valid,
  output logic signed [SUM_W-1:0]  sum,
  output logic [SUMSQ_W-1:0]       sumsq,
  output logic [NERR_W-1:0]        nerr
);

  localparam logic signed [SI_W-1:0] QMAX = SI_W'((64'sd1 <<< (SQ_W - 1)) - 1);
  localparam logic signed [SI_W-1:0] QMIN = -SI_W'(64'sd1 <<< (SQ_W - 1));

  logic signed [SUM_W-1:0] acc_sum;
  logic [SUMSQ_W-1:0]      acc_sq;
  logic [NERR_W-1:0]       acc_err;
  logic [K_W-1:0]          cnt;

  logic signed [SI_W-1:0]  si_sh;
  logic signed [SQ_W-1:0]  q;
  localparam int Q2W = 2 * SQ_W;
  logic [Q2W-1:0]          q2;
  logic signed [SUM_W-1:0] n_sum;
  logic [SUMSQ_W-1:0]      n_sq;
  logic [NERR_W-1:0]       n_err;
  logic                    last;

  always_comb begin
    si_sh = si >>> sq_shift;
    if (si_sh > QMAX)      q = QMAX[SQ_W-1:0];
    else if (si_sh < QMIN) q = QMIN[SQ_W-1:0];
    else                   q = si_sh[SQ_W-1:0];
    q2    = Q2W'(q * q);
    n_sum = acc_sum + SUM_W'(si);
    n_sq  = acc_sq + SUMSQ_W'(q2);
    n_err = acc_err + NERR_W'(si < 0);
    last  = (cnt + 1'b1 >= k);
  end

  always_ff @(posedge clk) begin
    if (!rst_n || !en) begin
      acc_sum <= '0;
      acc_sq  <= '0;
      acc_err <= '0;
      cnt     <= '0;
    end else if (si_valid) begin
      if (last) begin
        acc_sum <= '0;
        acc_sq  <= '0;
        acc_err <= '0;
        cnt     <= '0;
      end else begin
        acc_sum <= n_sum;
        acc_sq  <= n_sq;
        acc_err <= n_err;
        cnt     <= cnt + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      res_valid <= 1'b0;
      sum       <= '0;
      sumsq     <= '0;
      nerr      <= '0;
    end else begin
      res_valid <= en && si_valid && last;
      if (en && si_valid && last) begin
        sum   <= n_sum;
        sumsq <= n_sq;
        nerr  <= n_err;
      end
    end
  end

endmodule
