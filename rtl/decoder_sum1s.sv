// decoder_sum1s: thermometer-to-binary decoder that counts the ones of the code ("sum1s").
//
// The 2**NB input bits are added by a binary tree of NB registered stages: stage i adds pairs
// of the (i)-bit partial sums of the stage before, so it holds 2**(NB-i) sums of i+1 bits. A
// bubble in the code (a zero among the ones) lowers the count by one, which is the bubble
// compression of this decoder. Input bit 0 is the first tap, which is always high for a valid
// hit; it is left out of the count, so the result is the number of ones minus one and fits in
// NB bits (0 .. 2**NB - 1). Unused top inputs must be tied to zero.
//
// Timing: fully pipelined, one code per clock, result NB clocks after the input; out_valid
// follows in_valid with the same latency. The tree of NB stages and the dropped first bit
// follow the published decoder; the valid pipeline is this design's addition.
`timescale 1ps/1fs
module decoder_sum1s #(
  parameter int unsigned NB = 9
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [2**NB-1:0]  in_code,
  output logic              out_valid,
  output logic [NB-1:0]     out_bin
);

  for (genvar s = 0; s <= NB; s++) begin : g_st
    localparam int unsigned CNT = 2 ** (NB - s);
    localparam int unsigned W   = s + 1;
    logic [CNT-1:0][W-1:0] val;
    if (s == 0) begin : g_in
      always_comb begin
        val    = in_code;
        val[0] = 1'b0;
      end
    end else begin : g_add
      always_ff @(posedge clk)
        for (int j = 0; j < int'(CNT); j++)
          val[j] <= W'(g_st[s-1].val[2*j]) + W'(g_st[s-1].val[2*j+1]);
    end
  end

  logic [NB-1:0] vpipe;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[NB-2:0], in_valid};

  assign out_valid = vpipe[NB-1];
  assign out_bin   = g_st[NB].val[0][NB-1:0];

endmodule
