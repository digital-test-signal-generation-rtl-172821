// butterworth3_model: behavioural model of the three-pole Butterworth analog
// output filter that removes the converter images (not synthesizable: an
// analog part).
//
// The analog prototype 1 / ((s+1)(s^2+s+1)), scaled to the cutoff FC_NORM
// (cutoff frequency / update rate), is mapped to discrete time with the
// pre-warped bilinear transform and evaluated at every rising edge of clk as
// a first-order section followed by a second-order section. DC gain is 1.
// The three-pole Butterworth response is the document's; the discrete-time
// evaluation and the cutoff are this model's.
`timescale 1ns / 1ps
module butterworth3_model #(
  parameter real FC_NORM = 0.25
) (
  input  logic clk,
  input  real  vin,
  output real  vout
);

  localparam real PI = 3.14159265358979323846;

  real k, d2;
  real b1_0, a1_1;                    // first-order section
  real b2_0, a2_1, a2_2;              // second-order section (Q = 1)
  real x1, y1, u1, u2, w1, w2, u, w;

  initial begin
    k    = $tan(PI * FC_NORM);
    b1_0 = k / (1.0 + k);
    a1_1 = (k - 1.0) / (k + 1.0);
    d2   = 1.0 + k + k * k;
    b2_0 = k * k / d2;
    a2_1 = 2.0 * (k * k - 1.0) / d2;
    a2_2 = (1.0 - k + k * k) / d2;
    x1 = 0.0; y1 = 0.0; u1 = 0.0; u2 = 0.0; w1 = 0.0; w2 = 0.0;
    vout = 0.0;
  end

  always @(posedge clk) begin
    u  = b1_0 * (vin + x1) - a1_1 * y1;
    x1 = vin;
    y1 = u;
    w  = b2_0 * (u + 2.0 * u1 + u2) - a2_1 * w1 - a2_2 * w2;
    w2 = w1;
    w1 = w;
    vout <= w;
    u2 = u1;
    u1 = u;
  end

endmodule
