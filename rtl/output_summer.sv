// output_summer: forms the 12-bit output sequence
//   S_T(n) = A_1 D_1f(n) + A_2 D_2f(n) + A_N N_0f(n)
// from the three attenuated channels, the digital form of the document's
// analog output. The 18-bit sum is shifted right by OUT_SHIFT and saturated
// to OUT_W bits (the 12-bit DAC word). The same register stage also delays
// the two attenuated data channels and their symbol marks, so ref1/ref2 are
// the exact replicas A_D D_f(n) of the data embedded in st_out, aligned sample
// for sample, as the statistics monitor needs them.
// Adding the three channels and the 12-bit output follow the document; the
// scaling is this design's choice.
//
// Timing: all outputs are registered, one clock after the inputs.
`timescale 1ns / 1ps
module output_summer #(
  parameter int W         = 16,
  parameter int OUT_W     = 12,
  parameter int OUT_SHIFT = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [W-1:0]     ch1,
  input  logic                    first1,
  input  logic signed [W-1:0]     ch2,
  input  logic                    first2,
  input  logic signed [W-1:0]     noise,
  output logic signed [OUT_W-1:0] st_out,
  output logic signed [W-1:0]     ref1,
  output logic                    rfirst1,
  output logic signed [W-1:0]     ref2,
  output logic                    rfirst2
);

  localparam int SW = W + 2;
  localparam logic signed [SW-1:0] OMAX = SW'((2 ** (OUT_W - 1)) - 1);
  localparam logic signed [SW-1:0] OMIN = -SW'(2 ** (OUT_W - 1));

  logic signed [SW-1:0] sum, scaled;

  assign sum    = SW'(ch1) + SW'(ch2) + SW'(noise);
  assign scaled = sum >>> OUT_SHIFT;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st_out  <= '0;
      ref1    <= '0;
      ref2    <= '0;
      rfirst1 <= 1'b0;
      rfirst2 <= 1'b0;
    end else begin
      if (scaled > OMAX)      st_out <= OMAX[OUT_W-1:0];
      else if (scaled < OMIN) st_out <= OMIN[OUT_W-1:0];
      else                    st_out <= scaled[OUT_W-1:0];
      ref1    <= ch1;
      ref2    <= ch2;
      rfirst1 <= first1;
      rfirst2 <= first2;
    end
  end

endmodule
