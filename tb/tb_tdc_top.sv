// tb_tdc_top: end-to-end test of the complete two-channel converter at its default size:
// four 480-tap lines per channel, sum1s decoders, 2**16 calibration hits per channel,
// 6400-bin histogram. CLK0 runs at 500 MHz; the internal generator's clock clk1 has a period
// of 3142.7 ps, unrelated to CLK0.
//  1. Internal mode: the generator supplies uncorrelated hits and both channels calibrate.
//     No interval may be output before calibration.
//  2. Internal mode: START and STOP from the generator, 3 clk1 periods apart (9428.1 ps).
//     The mean measured interval gives the fixed skew between the two channels; the spread
//     must stay below 5 ps r.m.s.; the histogram must hold every interval in the bins
//     around 9428 ps.
//  3. External mode: pairs at known intervals from -1.9 ns to 90 ns, including STOP before
//     START, one pair straddling the wrap of the coarse counter, one interval beyond the
//     histogram range and one below it. Each interval, corrected by the skew from step 2,
//     must be within 20 ps of the true value; overflow and underflow must be counted.
// Every mechanism (calibration of each channel, both hit sources, mode switch, negative
// interval, coarse wrap, histogram overflow and underflow, a bubble in a sampled code) is
// counted and a failure is recorded for any that never happened. Watchdog included.
`timescale 1ps/1fs
module tb_tdc_top;
  import tdc_pkg::*;
  localparam int unsigned NCC = 16, F = 16, NBINS = 6400, HG_W = 16;
  localparam real TCLK = 2000.0;
  localparam real T1 = 3142.7;
  localparam int unsigned NT = 480;
  localparam int unsigned NLINES = 4;           // delay lines per channel in the build under test
  localparam real TOL_PAIR = 20.0;              // largest error of one interval, ps
  localparam real TOL_RMS_INT = 5.0;            // spread of a fixed internal interval, ps
  localparam real TOL_RMS_EXT = 8.0;            // r.m.s. error of the external intervals, ps

  logic clk = 1'b0, clk1 = 1'b0, rst_n = 1'b0;
  always #(TCLK / 2.0) clk = ~clk;
  always #(T1 / 2.0) clk1 = ~clk1;
  int checks = 0, failures = 0;

  logic start_ext = 1'b0, stop_ext = 1'b0, sel_internal = 1'b1, hg_en = 1'b0, cal_start = 1'b0;
  logic [HG_W-1:0] hg_period = 16'd4, hg_delay = 16'd1, hg_width = 16'd2;
  logic [1:0] calibrated;
  cal_state_e cs_start, cs_stop;
  logic rv_start, rv_stop;
  logic [10:0] rc_start, rc_stop;
  logic start_ts_valid, stop_ts_valid, meas_valid;
  logic [NCC+F-1:0] start_ts, stop_ts;
  logic signed [NCC+F-1:0] meas_dt;
  logic hist_en = 1'b0, hist_clear = 1'b0, hist_busy;
  logic signed [NCC+F-1:0] hist_offset = '0;
  logic [12:0] hist_rd_addr = '0;
  logic [31:0] hist_rd_data, hist_underflow, hist_overflow;

  tdc_top dut (
    .clk, .rst_n, .clk1, .start_ext, .stop_ext, .sel_internal, .hg_en,
    .hg_period, .hg_delay, .hg_width, .cal_start, .calibrated,
    .cal_state_start(cs_start), .cal_state_stop(cs_stop),
    .raw_valid_start(rv_start), .raw_code_start(rc_start),
    .raw_valid_stop(rv_stop), .raw_code_stop(rc_stop),
    .start_ts_valid, .start_ts, .stop_ts_valid, .stop_ts, .meas_valid, .meas_dt,
    .hist_en, .hist_clear, .hist_offset, .hist_rd_addr, .hist_rd_data,
    .hist_underflow, .hist_overflow, .hist_busy);

  function automatic real to_ps(input logic signed [NCC+F-1:0] v);
    return real'(v) * TCLK / real'(2 ** F);
  endfunction

  // ---- mechanism counters ----
  int n_cal_done = 0, n_int_meas = 0, n_ext_meas = 0, n_mode_switch = 0, n_negative = 0;
  int n_wrap = 0, n_bubble = 0, n_early = 0;

  logic [1:0] cal_prev = 2'b00;
  always @(posedge clk) if (rst_n) begin   // outputs are undefined until reset is released
    for (int c = 0; c < 2; c++) if (calibrated[c] && !cal_prev[c]) n_cal_done++;
    cal_prev <= calibrated;
    if (meas_valid && calibrated != 2'b11) n_early++;
  end

  // sampled codes with a zero below a one, on any line of the START channel
  always @(posedge clk) begin
    #1;
    if (dut.u_ch_start.u_smp.hit_valid)
      for (int t = 0; t < int'(NLINES); t++) begin
        logic [NT-1:0] c;
        c = dut.u_ch_start.u_smp.code[t];
        if (c != ((NT'(1) << $countones(c)) - 1)) n_bubble++;
      end
  end

  logic sel_prev = 1'b1;
  always @(posedge clk) begin
    if (sel_internal != sel_prev) n_mode_switch++;
    sel_prev <= sel_internal;
  end

  // intervals and timestamps as they come out
  real meas_q [$];
  logic [NCC+F-1:0] sts_q [$], pts_q [$];
  always @(posedge clk) begin
    #1;
    if (meas_valid) meas_q.push_back(to_ps(meas_dt));
    if (start_ts_valid) sts_q.push_back(start_ts);
    if (stop_ts_valid) pts_q.push_back(stop_ts);
  end

  longint unsigned edges_since_reset = 0;
  always @(posedge clk) if (rst_n) edges_since_reset++;

  task automatic ext_pair(input real t_start, input real d);
    real ts, tp;
    ts = t_start;
    tp = t_start + d;
    if (d >= 0) begin
      #(ts - $realtime); start_ext = 1'b1;
      #(tp - $realtime); stop_ext = 1'b1;
    end else begin
      #(tp - $realtime); stop_ext = 1'b1;
      #(ts - $realtime); start_ext = 1'b1;
    end
    #5000.0;
    start_ext = 1'b0;
    stop_ext = 1'b0;
    #5000.0;
  endtask

  real skew, sum, sum2;
  int  n;

  initial begin
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    while (hist_busy || cs_start == CAL_CLEAR) @(negedge clk);

    // ---- 1. calibration on the internal generator ----
    sel_internal = 1'b1;
    hg_en = 1'b1;
    @(negedge clk);
    cal_start = 1'b1;
    @(negedge clk);
    cal_start = 1'b0;
    while (calibrated != 2'b11) @(negedge clk);
    repeat (2) @(negedge clk);
    checks += 2;
    if (n_cal_done != 2) begin failures++; $display("calibrations %0d", n_cal_done); end
    if (n_early != 0) begin failures++; $display("%0d intervals before calibration", n_early); end
    $display("calibrated after %0d clocks", edges_since_reset);

    // ---- 2. internal START/STOP pairs ----
    hg_en = 1'b0;
    repeat (20) @(negedge clk);
    hist_clear = 1'b1;
    @(negedge clk);
    hist_clear = 1'b0;
    while (hist_busy) @(negedge clk);
    meas_q.delete();
    hg_delay = 16'd3;
    hg_period = 16'd8;
    hg_width = 16'd2;
    hist_offset = '0;
    hist_en = 1'b1;
    hg_en = 1'b1;
    while (meas_q.size() < 400) @(negedge clk);
    hg_en = 1'b0;
    repeat (30) @(negedge clk);
    hist_en = 1'b0;
    n = meas_q.size();
    n_int_meas = n;
    sum = 0.0; sum2 = 0.0;
    foreach (meas_q[i]) begin sum += meas_q[i]; sum2 += meas_q[i] * meas_q[i]; end
    skew = sum / n - 3.0 * T1;
    $display("internal: %0d intervals, mean %0.3f ps (true %0.3f), r.m.s. %0.3f ps",
             n, sum / n, 3.0 * T1, $sqrt(sum2 / n - (sum / n) * (sum / n)));
    checks += 2;
    if (skew > 50.0 || skew < -50.0) begin failures++; $display("skew %0.3f", skew); end
    if ($sqrt(sum2 / n - (sum / n) * (sum / n)) > TOL_RMS_INT) begin failures++; $display("spread too large"); end
    // histogram around 9428 ps: bins of 15.625 ps
    begin
      int unsigned tot;
      tot = 0;
      for (int b = 590; b < 618; b++) begin
        @(negedge clk);
        hist_rd_addr = 13'(b);
        @(posedge clk);
        #1;
        tot += hist_rd_data;
      end
      checks += 2;
      if (tot != n) begin failures++; $display("histogram holds %0d of %0d", tot, n); end
      if (hist_underflow != 0 || hist_overflow != 0) begin failures++; $display("internal out of range %0d %0d", hist_underflow, hist_overflow); end
    end

    // ---- 3. external pairs ----
    sel_internal = 1'b0;
    repeat (10) @(negedge clk);
    hist_offset = -(NCC+F)'(2 ** F);          // range -2 ns .. 98 ns
    hist_clear = 1'b1;
    @(negedge clk);
    hist_clear = 1'b0;
    while (hist_busy) @(negedge clk);
    hist_en = 1'b1;
    begin
      real dlist [$];
      real err, e2;
      int  k;
      dlist = {-1900.0, -1234.567, 1000.0, 2500.25, 12345.678, 97000.0, 120000.0, -2600.0};
      for (int i = 0; i < 60; i++)
        dlist.push_back(real'($urandom_range(0, 90000)) + real'($urandom_range(0, 999)) / 1000.0 - 1000.0);
      e2 = 0.0;
      k = 0;
      meas_q.delete();
      foreach (dlist[i]) begin
        real t0;
        t0 = $realtime + 3000.0 + real'($urandom_range(0, 1999999)) / 1000.0;
        ext_pair(t0, dlist[i]);
        if (dlist[i] > 0) #(dlist[i]);
        repeat (25) @(negedge clk);
        checks++;
        if (meas_q.size() != 1) begin
          failures++;
          $display("pair %0d: %0d intervals", i, meas_q.size());
        end else begin
          err = meas_q.pop_front() - skew - dlist[i];
          e2 += err * err;
          k++;
          n_ext_meas++;
          if (dlist[i] < 0) n_negative++;
          if (err > TOL_PAIR || err < -TOL_PAIR) begin
            failures++;
            $display("pair %0d: interval %0.3f ps, error %0.3f ps", i, dlist[i], err);
          end
        end
        meas_q.delete();
      end
      // a pair across the wrap of the coarse counter
      begin
        longint unsigned to_wrap;
        real t0;
        logic [NCC+F-1:0] a, b;
        to_wrap = (2 ** NCC) - (edges_since_reset % (2 ** NCC));
        t0 = $realtime + real'(to_wrap) * TCLK - 20000.0 - 777.777;
        sts_q.delete(); pts_q.delete();
        ext_pair(t0, 40000.0);
        #40000.0;
        repeat (25) @(negedge clk);
        checks += 2;
        if (sts_q.size() != 1 || pts_q.size() != 1 || meas_q.size() != 1) begin failures++; $display("wrap pair: %0d %0d %0d", sts_q.size(), pts_q.size(), meas_q.size()); end
        else begin
          a = sts_q.pop_front(); b = pts_q.pop_front();
          if (b[NCC+F-1:F] < a[NCC+F-1:F]) n_wrap++;
          err = meas_q.pop_front() - skew - 40000.0;
          if (err > TOL_PAIR || err < -TOL_PAIR) begin failures++; $display("wrap pair error %0.3f ps", err); end
        end
      end
      checks++;
      if ($sqrt(e2 / k) > TOL_RMS_EXT) begin failures++; $display("external r.m.s. too large"); end
      $display("external: %0d intervals, r.m.s. error %0.3f ps", k, $sqrt(e2 / k));
    end
    hist_en = 1'b0;
    @(negedge clk);
    checks += 2;
    if (hist_overflow != 1) begin failures++; $display("overflow %0d", hist_overflow); end
    if (hist_underflow != 1) begin failures++; $display("underflow %0d", hist_underflow); end

    // ---- mechanisms ----
    $display("mechanisms: calibrations %0d, internal intervals %0d, external intervals %0d, mode switches %0d, negative intervals %0d, coarse wraps %0d, overflows %0d, underflows %0d, bubbled codes %0d",
             n_cal_done, n_int_meas, n_ext_meas, n_mode_switch, n_negative, n_wrap, hist_overflow, hist_underflow, n_bubble);
    checks += 7;
    if (n_int_meas == 0) failures++;
    if (n_ext_meas == 0) failures++;
    if (n_mode_switch == 0) failures++;
    if (n_negative == 0) failures++;
    if (n_wrap == 0) failures++;
    if (n_bubble == 0) failures++;
    if (hist_overflow == 0 || hist_underflow == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #4_000_000_000.0;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
