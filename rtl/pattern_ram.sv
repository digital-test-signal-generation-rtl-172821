// pattern_ram: one 64K x 8-bit pattern memory (data RAM or subcarrier RAM).
//
// Simple dual-port RAM: the CPU bus writes through (we, waddr, wdata); the
// pattern generator reads through raddr with a registered output, so rdata
// holds the word addressed in the previous clock. The 64K x 8 size is the
// document's; the dual-port organisation and one-cycle read are this design's
// choice. The contents are not reset: software loads a table before use.
`timescale 1ns / 1ps
module pattern_ram #(
  parameter int AW = 16,
  parameter int DW = 8
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
