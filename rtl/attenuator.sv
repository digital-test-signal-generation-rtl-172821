// attenuator: scales one filtered channel by a factor A <= 1.
//
// y = (x * A) >>> 15 with A an unsigned Q1.15 number: 0x8000 is exactly 1.0
// and any larger setting is clamped to 1.0, which keeps A <= 1 as the
// document requires of both the data and the noise attenuator. The encoding
// and the truncation toward minus infinity are this design's choices.
//
// Interface: one sample per clock; y_out and first_out are registered (one
// clock latency). A change of `atten` applies to the next sample.
`timescale 1ns / 1ps
module attenuator #(
  parameter int W  = 16,
  parameter int AW = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [W-1:0]  x_in,
  input  logic                 first_in,
  input  logic [AW-1:0]        atten,
  output logic signed [W-1:0]  y_out,
  output logic                 first_out
);

  localparam logic [AW-1:0] ONE = AW'(1) << (AW - 1);

  logic [AW-1:0]         a_eff;
  logic signed [W+AW:0]  prod;

  assign a_eff = (atten > ONE) ? ONE : atten;
  assign prod  = x_in * $signed({1'b0, a_eff});

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y_out     <= '0;
      first_out <= 1'b0;
    end else begin
      y_out     <= W'(prod >>> (AW - 1));
      first_out <= first_in;
    end
  end

endmodule
