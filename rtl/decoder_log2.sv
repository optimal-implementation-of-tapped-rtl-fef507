// decoder_log2: thermometer-to-binary decoder that finds the most significant one of the code
// by binary search ("Log2", also called one-hot).
//
// Stage i looks at a window of 2**(NB-i+1) bits: if any bit of the upper half is set, the
// result bit NB-i is 1 and the upper half moves on, otherwise the bit is 0 and the lower half
// moves on. The result is built from its most significant bit down, like a successive
// approximation register, and equals the index of the highest set bit. Zeros below that bit
// (bubbles) do not change it. For a bubble-free code this is the number of ones minus one,
// the same result as decoder_sum1s.
//
// Timing: fully pipelined, one code per clock, result NB clocks after the input; out_valid
// follows in_valid. The NB-stage binary search follows the published decoder; the valid
// pipeline is this design's addition. An all-zero code gives 0.
//
// The last stage's one-bit window is never read (only its result bits are); a lint tool
// reports it as unused, and it is left so that every stage has the same shape.
`timescale 1ps/1fs
module decoder_log2 #(
  parameter int unsigned NB = 9
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [2**NB-1:0]  in_code,
  output logic              out_valid,
  output logic [NB-1:0]     out_bin
);

  // g_st[s].win is the window that enters stage s+1; g_st[s].bits the result bits found so far.
  for (genvar s = 0; s <= NB; s++) begin : g_st
    localparam int unsigned WW = 2 ** (NB - s);
    logic [WW-1:0] win;
    logic [NB-1:0] bits;
    if (s == 0) begin : g_in
      assign win  = in_code;
      assign bits = '0;
    end else begin : g_srch
      localparam int unsigned PW = 2 * WW;
      logic upper_hit;
      assign upper_hit = |g_st[s-1].win[PW-1:WW];
      always_ff @(posedge clk) begin
        win  <= upper_hit ? g_st[s-1].win[PW-1:WW] : g_st[s-1].win[WW-1:0];
        bits <= g_st[s-1].bits | (NB'(upper_hit) << (NB - s));
      end
    end
  end

  logic [NB-1:0] vpipe;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[NB-2:0], in_valid};

  assign out_valid = vpipe[NB-1];
  assign out_bin   = g_st[NB].bits;

endmodule
