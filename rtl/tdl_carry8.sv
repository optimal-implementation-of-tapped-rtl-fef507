// tdl_carry8: behavioural model of a tapped delay line built from CARRY8 primitives of a
// 20 nm UltraScale FPGA, as seen by the flip-flops that sample it. This is a model, not
// synthesizable logic: on the device the line is the hard carry chain of NCLB stacked logic
// blocks, each giving NC = 8 taps, and nothing here would map onto it.
//
// How it works: the hit edge entering the line reaches tap k after the sum of the delays of
// taps 0..k. Each tap delay is the mean TAU_PS spread by a fixed pseudo-random amount
// (+/- SPREAD of the mean, drawn from SEED), so that lines built with different seeds differ
// the way parallel lines on a device do; one tap (ULTRA_TAP) is an ultra-bin of ULTRA_PS, as
// the slow tap measured at the same place of a clock region. The clock of the sampling
// flip-flops is skewed: within a logic block the upper four taps are clocked TS_PS earlier than
// the lower four, and the clock reaches logic blocks later the further they are from the clock
// insertion point (TN_PS per block). A flip-flop clocked earlier sees its tap later, so each
// output below is the tap delayed by its clock skew. When a tap is faster than the skew between
// its flip-flop and the previous one, the sampled code shows a bubble, as on the device.
//
// For speed the model does not give every tap its own delayed assignment: at start-up it
// computes each tap's effective arrival time (line delay plus clock skew) and sorts the taps by
// it; on every hit edge a single process then sets (or clears) the taps in that order, waiting
// the time between consecutive arrivals. The waveform is the same as one delay per tap. A
// hit pulse must last longer than the whole line (about 2.5 ns) before it falls.
//
// Interface: hit is the asynchronous START or STOP step; taps[k] is tap k as seen at its
// sampling flip-flop. The line length (60 blocks x 8 = 480 taps), the 5 ps mean delay, the
// 3 ps / 1 ps skews, the clock insertion near tap 240 (block 30) and the ultra-bin at tap 241
// follow the published measurements; the delay spread, the seeds and the input offset are
// assumptions.
`timescale 1ps/1fs
module tdl_carry8 #(
  parameter int unsigned NCLB         = 60,     // logic blocks stacked in one clock region
  parameter int unsigned NC           = 8,      // taps per CARRY8
  parameter real         TAU_PS       = 5.0,    // mean tap delay
  parameter real         SPREAD       = 0.5,    // relative spread of the tap delays
  parameter real         TS_PS        = 3.0,    // intra-block clock skew (upper half earlier)
  parameter real         TN_PS        = 1.0,    // clock delay added per block from insertion
  parameter int unsigned CLK_INS_CLB  = 30,     // block where the clock enters the column
  parameter int unsigned ULTRA_TAP    = 241,    // position of the ultra-bin
  parameter real         ULTRA_PS     = 29.0,   // delay of the ultra-bin
  parameter real         IN_OFFSET_PS = 0.0,    // routing delay from the hit input to tap 0
  parameter int unsigned SEED         = 1
) (
  input  logic                 hit,
  output logic [NCLB*NC-1:0]   taps
);

  localparam int unsigned NT = NCLB * NC;

  // Delay of tap k alone.
  function automatic real tap_delay(input int unsigned k);
    int unsigned h;
    real         u;
    if (k == ULTRA_TAP) return ULTRA_PS;
    h = (k + 1) * 32'd2654435761 + SEED * 32'd40503 + 32'd12345;
    h = h ^ (h >> 13);
    h = h * 32'd1274126177;
    h = h ^ (h >> 16);
    u = real'(h & 32'hFFFF) / 65536.0;
    return TAU_PS * (1.0 + SPREAD * (2.0 * u - 1.0));
  endfunction

  // Time from the hit input to the output of tap k.
  function automatic real cum_delay(input int unsigned k);
    real d;
    d = IN_OFFSET_PS;
    for (int unsigned i = 0; i <= k; i++) d += tap_delay(i);
    return d;
  endfunction

  // How much earlier than the latest-clocked flip-flop the flip-flop of tap k is clocked.
  function automatic real clk_early(input int unsigned k);
    int unsigned blk;
    int          dst;
    int          maxd;
    real         e;
    blk  = k / NC;
    dst = (blk >= CLK_INS_CLB) ? int'(blk - CLK_INS_CLB) : int'(CLK_INS_CLB - blk);
    maxd = (NCLB - 1 > CLK_INS_CLB) ? int'(NCLB - 1 - CLK_INS_CLB) : int'(CLK_INS_CLB);
    e    = TN_PS * real'(maxd - dst);
    if ((k % NC) >= NC / 2) e += TS_PS;
    return e;
  endfunction

  // Arrival time of the edge at each flip-flop, and the taps in order of arrival.
  real         arrive [NT];
  int unsigned order  [NT];

  initial begin
    for (int unsigned k = 0; k < NT; k++) begin
      arrive[k] = cum_delay(k) + clk_early(k);
      order[k]  = k;
    end
    // insertion sort by arrival time
    for (int i = 1; i < int'(NT); i++) begin
      int unsigned o;
      int          j;
      o = order[i];
      j = i - 1;
      while (j >= 0 && arrive[order[j]] > arrive[o]) begin
        order[j+1] = order[j];
        j--;
      end
      order[j+1] = o;
    end
  end

  initial taps = '0;

  // Each edge of hit walks down the line; taps change in order of arrival.
  always @(hit) begin
    logic v;
    real  t0;
    v  = hit;
    t0 = $realtime;
    for (int i = 0; i < int'(NT); i++) begin
      if (arrive[order[i]] > $realtime - t0) #(arrive[order[i]] - ($realtime - t0));
      taps[order[i]] = v;
    end
  end

endmodule
