// coarse_counter: the NCC-bit coarse counter of the Nutt interpolation. It counts periods of
// the system clock and wraps around, so a timestamp's coarse part is the number of whole
// clock periods modulo 2**NCC, and the full-scale range of an interval is 2**NCC periods
// (of which the interval unit uses half, signed).
//
// Interface: count increments on every rising edge of clk while en is high and is cleared by
// the asynchronous reset. The counter follows the published architecture; its width (16 bits,
// 131 us at 500 MHz) and the enable are this design's choice.
`timescale 1ps/1fs
module coarse_counter #(
  parameter int unsigned NCC = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  output logic [NCC-1:0]  count
);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  count <= '0;
    else if (en) count <= count + 1'b1;

endmodule
