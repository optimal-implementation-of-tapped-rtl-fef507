// tdc_pkg: types and helper functions shared by the TDL time-to-digital converter.
// The decoder choice (ones counter "sum1s" or binary-search "Log2") is an enum so that a
// channel can be built in either of the two configurations the architecture supports; the
// calibration controller states are an enum as well. The default sizes of the design (480-tap
// delay lines, 9-bit decoders, 4 parallel lines per channel) come from the published
// architecture; the fixed-point widths of the timestamps are this implementation's choice.
`timescale 1ps/1fs
package tdc_pkg;

  // Thermometer-to-binary decoder architecture of a channel.
  typedef enum logic [0:0] {
    DEC_SUM1S = 1'b0,   // counts the ones: bubbles are compressed
    DEC_LOG2  = 1'b1    // finds the most significant one: bubbles are ignored
  } decoder_e;

  // State of the bin-by-bin calibrator.
  typedef enum logic [2:0] {
    CAL_CLEAR = 3'd0,   // zeroing the code-density histogram after reset
    CAL_IDLE  = 3'd1,   // not calibrated, waiting for a calibration request
    CAL_ACCUM = 3'd2,   // collecting the code-density histogram
    CAL_DRAIN = 3'd3,   // letting the last histogram update land
    CAL_BUILD = 3'd4,   // integrating the histogram into the characteristic curve
    CAL_RUN   = 3'd5    // converting codes to calibrated fine times
  } cal_state_e;

  // Number of pipeline stages of the tree adder that merges n parallel lines.
  function automatic int unsigned tree_stages(input int unsigned n);
    return (n <= 1) ? 0 : $clog2(n);
  endfunction

endpackage
