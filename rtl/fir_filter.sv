// fir_filter: 63-tap FIR filter of one channel,
//   y(n) = h(0) x(n) + h(1) x(n-1) + ... + h(N-1) x(n-N+1).
//
// Transposed direct form: every clock the new sample is multiplied by all N
// coefficients and each product is added into a chain of partial sums, so the
// only long path is one multiply and one add. The full-precision sum is
// shifted right by CFRAC (coefficients are signed fixed point with CFRAC
// fraction bits, so 1.0 = 2^CFRAC) and saturated to XW bits.
// The tap count and the CPU-loadable coefficients follow the document; the
// structure, word widths and Q2.14 format are this design's choice.
//
// Interface: one sample per clock on x_in; y_out is registered and equals
// the filter output for the sample presented one clock earlier. first_in is
// carried alongside with the same one-clock latency. Coefficients are written
// one at a time (coef_we, coef_addr = k, coef_data = h(k)) and take effect on
// the next clock; they reset to zero.
`timescale 1ns / 1ps
module fir_filter #(
  parameter int N     = 63,
  parameter int XW    = 16,
  parameter int CW    = 16,
  parameter int CFRAC = 14
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic signed [XW-1:0]  x_in,
  input  logic                  first_in,
  input  logic                  coef_we,
  input  logic [$clog2(N)-1:0]  coef_addr,
  input  logic signed [CW-1:0]  coef_data,
  output logic signed [XW-1:0]  y_out,
  output logic                  first_out
);

  localparam int PW = XW + CW;            // product width
  localparam int AW = PW + $clog2(N);     // accumulation width

  logic signed [CW-1:0] h [N];
  logic signed [AW-1:0] s [N];            // s[0] unused
  logic signed [AW-1:0] y_full, y_shift;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) h[k] <= '0;
    end else if (coef_we && (int'(coef_addr) < N)) begin
      h[coef_addr] <= coef_data;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) s[k] <= '0;
    end else begin
      s[0]   <= '0;
      s[N-1] <= AW'(h[N-1] * x_in);
      for (int k = 1; k < N - 1; k++)
        s[k] <= s[k+1] + AW'(h[k] * x_in);
    end
  end

  localparam logic signed [AW-1:0] YMAX = AW'((2 ** (XW - 1)) - 1);
  localparam logic signed [AW-1:0] YMIN = -AW'(2 ** (XW - 1));

  assign y_full  = AW'(h[0] * x_in) + s[1];
  assign y_shift = y_full >>> CFRAC;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y_out     <= '0;
      first_out <= 1'b0;
    end else begin
      if (y_shift > YMAX)      y_out <= YMAX[XW-1:0];
      else if (y_shift < YMIN) y_out <= YMIN[XW-1:0];
      else                     y_out <= y_shift[XW-1:0];
      first_out <= first_in;
    end
  end

endmodule
