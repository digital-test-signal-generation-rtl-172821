// delay_line_model: behavioural model of the programmable delay line that
// compensates the fractional part of the analog path delay (not
// synthesizable: a delay element).
//
// `out` follows `in` after sel * STEP_NS nanoseconds (transport delay), so
// the converter clock can be shifted in 2-ns steps. The 2-ns step is the
// document's; the number of steps (6-bit select) is this model's.
`timescale 1ns / 1ps
module delay_line_model #(
  parameter real STEP_NS = 2.0
) (
  input  logic       in,
  input  logic [5:0] sel,
  output logic       out
);

  initial out = 1'b0;

  always @(in)
    out <= #(STEP_NS * $itor(sel)) in;

endmodule
