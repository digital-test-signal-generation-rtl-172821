// adc_model: behavioural model of the 12-bit analog-to-digital converter that
// digitises the analog output for the analog-output statistics monitor
// (not synthesizable: an analog part).
//
// An ideal quantiser: at each rising edge of its sampling clock it converts
// vin to the nearest signed code, code = round(vin * 2^(BITS-1) / VFS),
// clipped to the BITS-bit range. The 12-bit resolution is the document's; the
// ideal transfer and the full-scale value are this model's.
`timescale 1ns / 1ps
module adc_model #(
  parameter int  BITS = 12,
  parameter real VFS  = 1.0
) (
  input  logic                   clk,
  input  real                    vin,
  output logic signed [BITS-1:0] code
);

  localparam int CMAX = 2 ** (BITS - 1) - 1;
  localparam int CMIN = -(2 ** (BITS - 1));

  initial code = '0;

  always @(posedge clk) begin
    int c;
    c = $rtoi($floor(vin * $itor(2 ** (BITS - 1)) / VFS + 0.5));
    if (c > CMAX) c = CMAX;
    if (c < CMIN) c = CMIN;
    code <= BITS'(c);
  end

endmodule
