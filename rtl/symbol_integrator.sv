// symbol_integrator: integrate-and-dump over one symbol,
//   S_i = sum of S(n) over the I_S samples of symbol i.
//
// The accumulator adds S(n) every clock. When the mark first_in shows the
// first sample of a new symbol, the sum of the previous symbol is dumped to
// `si` with a one-clock pulse on si_valid, and the accumulator restarts from
// the new sample. Because the dump follows the symbol marks that travel with
// the data, the window is exactly I_S clocks whatever I_S is. The window
// that is open when `en` rises is incomplete and is discarded (this design's
// choice). While `en` is low the integrator is cleared.
`timescale 1ns / 1ps
module symbol_integrator #(
  parameter int IN_W  = 28,
  parameter int OUT_W = 52
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic signed [IN_W-1:0]  s_in,
  input  logic                    first_in,
  output logic                    si_valid,
  output logic signed [OUT_W-1:0] si
);

  logic signed [OUT_W-1:0] acc;
  logic                    primed;

  always_ff @(posedge clk) begin
    if (!rst_n || !en) begin
      acc      <= '0;
      primed   <= 1'b0;
      si_valid <= 1'b0;
      si       <= '0;
    end else if (first_in) begin
      acc      <= OUT_W'(s_in);
      primed   <= 1'b1;
      si_valid <= primed;
      if (primed) si <= acc;
    end else begin
      acc      <= acc + OUT_W'(s_in);
      si_valid <= 1'b0;
    end
  end

endmodule
