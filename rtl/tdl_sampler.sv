// tdl_sampler: the sampling flip-flops of the NTDL parallel delay lines of one channel, the
// hit detector and the capture of the coarse count.
//
// Every tap of every line is captured on each rising edge of the system clock, which turns
// the position of the travelling hit edge into a thermometer code. A new hit is recognised
// when the first tap of any line is high in the current sample and was low in all lines in
// the previous one; the value of the coarse counter at that same edge is kept with it, which
// is the Nutt split of the measurement into a coarse count and a fine code.
//
// Timing: code, hit_valid and hit_coarse appear one clock after the sampling edge and refer
// to the same edge. The hit input must stay high for longer than one clock period plus the
// line's span, so that the step is seen in two consecutive samples; shorter pulses are not
// detected. Per-tap sampling follows the published architecture; the first-tap hit detector
// and the absence of a second synchroniser stage are this design's choices.
`timescale 1ps/1fs
module tdl_sampler #(
  parameter int unsigned NTDL = 4,
  parameter int unsigned NT   = 480,
  parameter int unsigned NCC  = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [NTDL-1:0][NT-1:0]   taps,        // asynchronous tap outputs
  input  logic [NCC-1:0]            coarse,      // free-running coarse count
  output logic [NTDL-1:0][NT-1:0]   code,        // sampled thermometer codes
  output logic                      hit_valid,   // code holds a new hit
  output logic [NCC-1:0]            hit_coarse   // coarse count of that sample
);

  logic [NTDL-1:0] first_now;
  logic            seen_q;

  always_ff @(posedge clk) begin
    code       <= taps;
    hit_coarse <= coarse;
  end

  always_comb
    for (int i = 0; i < int'(NTDL); i++) first_now[i] = code[i][0];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) seen_q <= 1'b1;      // no hit is reported for a line already high at reset
    else        seen_q <= |first_now;

  assign hit_valid = (|first_now) && !seen_q;

endmodule
