// dac_model: behavioural model of the 12-bit digital-to-analog converter
// (not synthesizable: an analog part).
//
// An ideal zero-order-hold converter: at each rising clock edge the signed
// BITS-bit code is converted to vout = code * VFS / 2^(BITS-1) volts and held
// until the next edge. The 12-bit resolution is the document's; the ideal
// transfer and the full-scale value are this model's.
`timescale 1ns / 1ps
module dac_model #(
  parameter int  BITS = 12,
  parameter real VFS  = 1.0
) (
  input  logic                   clk,
  input  logic signed [BITS-1:0] code,
  output real                    vout
);

  initial vout = 0.0;

  always @(posedge clk)
    vout <= VFS * $itor(code) / $itor(2 ** (BITS - 1));

endmodule
