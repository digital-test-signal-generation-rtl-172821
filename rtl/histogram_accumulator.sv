// histogram_accumulator: counts how often each value of a sample stream
// occurs, to confirm the probability density of the filtered or unfiltered
// noise (or of data and subcarrier samples, as a self test).
//
// The sample is shifted right arithmetically by `shift`, saturated to
// -128..127 and offset by 128 to give one of 256 bins. Each bin is a
// saturating 32-bit counter held in registers; the increment is a single
// read-modify-write per clock, so back-to-back hits on one bin are exact.
// While `en` is high one sample per clock is counted; `clear` zeroes all
// bins. The CPU reads bin rd_bin on rd_count (combinational read).
// The document asks for a histogram accumulator without giving its insides:
// bin count, counter width and binning are this design's choices.
`timescale 1ns / 1ps
module histogram_accumulator #(
  parameter int SW    = 16,
  parameter int CNT_W = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 clear,
  input  logic signed [SW-1:0] sample,
  input  logic [3:0]           shift,
  input  logic [7:0]           rd_bin,
  output logic [CNT_W-1:0]     rd_count
);

  logic [CNT_W-1:0]     hist [256];
  logic signed [SW-1:0] sh;
  logic [7:0]           bin;

  always_comb begin
    sh = sample >>> shift;
    if (sh > SW'(127))       bin = 8'hFF;
    else if (sh < -SW'(128)) bin = 8'h00;
    else                     bin = sh[7:0] ^ 8'h80;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      for (int i = 0; i < 256; i++) hist[i] <= '0;
    end else if (en && (hist[bin] != '1)) begin
      hist[bin] <= hist[bin] + 1'b1;
    end
  end

  assign rd_count = hist[rd_bin];

endmodule
