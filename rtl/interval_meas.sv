// interval_meas: pairs the timestamps of the START and STOP channels and outputs the
// measured interval T_meas = ts_stop - ts_start.
//
// Each channel's latest timestamp is held with a flag. As soon as both flags are set the
// difference is output and both flags clear, so either channel may fire first: a STOP that
// precedes its START gives a negative interval. A newer timestamp on a channel whose flag is
// still set replaces the older one. A timestamp left waiting for MAX_WAIT clocks without its
// partner is dropped: otherwise a lone timestamp (for example one channel starting to output
// a little before the other, at the end of a calibration) would shift the pairing of every
// later event by one. Timestamps wrap with the coarse counter; the difference is
// taken modulo 2**TS_W and read as a signed number, which is exact for intervals shorter than
// half the coarse range.
//
// Timing: out_valid comes one clock after the second timestamp of a pair. The subtraction is
// the published Nutt formula; the pairing rule and the expiry (MAX_WAIT = 128 clocks, 256 ns
// at 500 MHz, longer than the 100 ns measuring range) are this design's choices.
`timescale 1ps/1fs
module interval_meas #(
  parameter int unsigned TS_W     = 32,
  parameter int unsigned MAX_WAIT = 128    // clocks a lone timestamp is kept
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start_valid,
  input  logic [TS_W-1:0]         start_ts,
  input  logic                    stop_valid,
  input  logic [TS_W-1:0]         stop_ts,
  output logic                    out_valid,
  output logic signed [TS_W-1:0]  out_dt
);

  logic            have_start, have_stop;
  logic [TS_W-1:0] start_q, stop_q;
  logic            start_now, stop_now;
  logic [TS_W-1:0] start_use, stop_use;
  logic [$clog2(MAX_WAIT+1)-1:0] age;    // clocks since the held timestamp arrived
  logic            expire;

  assign expire = (age == ($clog2(MAX_WAIT+1))'(MAX_WAIT - 1));

  assign start_now = start_valid || have_start;
  assign stop_now  = stop_valid  || have_stop;
  assign start_use = start_valid ? start_ts : start_q;
  assign stop_use  = stop_valid  ? stop_ts  : stop_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_start <= 1'b0;
      have_stop  <= 1'b0;
      out_valid  <= 1'b0;
      age        <= '0;
    end else begin
      out_valid <= start_now && stop_now;
      if (start_valid || stop_valid) age <= '0;
      else if (have_start || have_stop) age <= age + 1'b1;
      if (start_now && stop_now) begin
        have_start <= 1'b0;
        have_stop  <= 1'b0;
      end else if (!start_valid && !stop_valid && expire) begin
        have_start <= 1'b0;
        have_stop  <= 1'b0;
      end else begin
        have_start <= start_now;
        have_stop  <= stop_now;
      end
    end
  end

  always_ff @(posedge clk) begin
    start_q <= start_use;
    stop_q  <= stop_use;
    out_dt  <= signed'(stop_use - start_use);
  end

endmodule
