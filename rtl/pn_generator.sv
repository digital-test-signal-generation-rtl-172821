// pn_generator: random-address generator for the pattern RAMs.
//
// A Fibonacci linear-feedback shift register of PN_W bits. Each time
// `advance` is high it moves STEPS bit-steps at once (leap-forward), so two
// successive addresses are disjoint ADDR_W-bit windows of the PN sequence.
// Over a full period every non-zero ADDR_W-bit window occurs equally often,
// which gives the uniform address distribution the noise mapping relies on.
// The default polynomial x^63 + x^62 + 1 is maximal length, so the period is
// 2^63-1 advances: far beyond the document's "longer than 24 hours" at any
// system clock up to 20 MHz. The polynomial, the leap of 16 steps and the seed
// are this design's choices; the document asks only for a uniform, very
// long-period PN address source.
//
// Interface: `addr` is the low ADDR_W bits of the state, registered; it
// changes one clock after an `advance`. Synchronous active-low reset loads
// SEED (which must be non-zero).
`timescale 1ns / 1ps
module pn_generator #(
  parameter int              PN_W     = 63,
  parameter logic [PN_W-1:0] TAP_MASK = PN_W'(3) << (PN_W - 2), // x^63 + x^62 + 1
  parameter logic [PN_W-1:0] SEED     = PN_W'(64'h1D87_2B41_C9A6_3E55),
  parameter int              STEPS    = 16,
  parameter int              ADDR_W   = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              advance,
  output logic [ADDR_W-1:0] addr
);

  logic [PN_W-1:0] state, next_state;

  always_comb begin
    next_state = state;
    for (int i = 0; i < STEPS; i++)
      next_state = {next_state[PN_W-2:0], ^(next_state & TAP_MASK)};
  end

  always_ff @(posedge clk) begin
    if (!rst_n)       state <= SEED;
    else if (advance) state <= next_state;
  end

  assign addr = state[ADDR_W-1:0];

  initial begin
    assert (SEED != '0) else $error("pn_generator: SEED must be non-zero");
    assert (ADDR_W <= PN_W) else $error("pn_generator: ADDR_W exceeds PN_W");
  end

endmodule
