// tb_tdc_channel: end-to-end test of one channel with two parallel 480-tap delay-line
// models, sum1s decoders and 2**14 calibration hits. The clock runs at 500 MHz.
// 1. Before calibration no timestamp may appear.
// 2. Calibration: hits at random times (femtosecond steps), uncorrelated with the clock.
// 3. Measurement: pairs of hits a known interval apart (9 to 60 ns, random phase). The
//    difference of their timestamps, converted to picoseconds, must match the interval within
//    20 ps, with an r.m.s. error below 8 ps; each timestamp must appear exactly
//    NB + ceil(log2 NTDL) + 3 clocks after the clock edge that sampled its hit.
// A watchdog ends the run if it stalls.
`timescale 1ps/1fs
module tb_tdc_channel;
  import tdc_pkg::*;
  localparam int unsigned NTDL = 2, NB = 9, NCC = 16, F = 16, K = 14;
  localparam real TCLK = 2000.0;
  localparam int unsigned LAT = NB + tree_stages(NTDL) + 3;

  logic clk = 1'b0, rst_n = 1'b0;
  always #1000 clk = ~clk;
  int checks = 0, failures = 0;

  logic hit = 1'b0, cal_start = 1'b0;
  logic [NCC-1:0] coarse;
  logic raw_valid, ts_valid, calibrated;
  logic [NB+tree_stages(NTDL)-1:0] raw_code;
  logic [NCC+F-1:0] ts;
  cal_state_e cal_state;

  coarse_counter #(.NCC(NCC)) u_cc (.clk, .rst_n, .en(1'b1), .count(coarse));

  tdc_channel #(.NTDL(NTDL), .DECODER(DEC_SUM1S), .NB(NB), .NCC(NCC), .FRAC_W(F),
                .CAL_LOG2_HITS(K), .SEED(3)) dut (
    .clk, .rst_n, .hit, .coarse, .cal_start, .raw_valid, .raw_code,
    .ts_valid, .ts, .cal_state, .calibrated);

  // clock edge counter and timestamp capture
  longint unsigned edge_n = 0;
  always @(posedge clk) edge_n++;

  longint unsigned ts_edge [$];
  logic [NCC+F-1:0] ts_val [$];
  int early = 0;
  always @(posedge clk) begin
    #1;
    if (ts_valid) begin
      ts_edge.push_back(edge_n);
      ts_val.push_back(ts);
      if (!calibrated) early++;
    end
  end

  int unsigned max_code = 0;
  always @(posedge clk) if (raw_valid && raw_code > max_code) max_code = raw_code;

  task automatic pulse_at(input real t_abs);
    #(t_abs - $realtime);
    hit = 1'b1;
    #4000.0;
    hit = 1'b0;
  endtask

  // next edge strictly after time t (edges at 1000 + k*2000 ps)
  function automatic longint unsigned edge_after(input real t);
    return longint'($floor((t - 1000.0) / TCLK)) + 1;
  endfunction

  real err, err2 = 0.0;
  int  npairs = 0;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2100) @(negedge clk);       // histogram clear pass
    // 1. hits before calibration
    for (int i = 0; i < 5; i++) pulse_at($realtime + 6000.0 + real'($urandom_range(0, 1999999)) / 1000.0);
    // 2. calibration
    @(negedge clk);
    cal_start = 1'b1;
    @(negedge clk);
    cal_start = 1'b0;
    while (cal_state != CAL_BUILD) begin
      pulse_at($realtime + 6000.0 + real'($urandom_range(0, 1999999)) / 1000.0);
    end
    while (!calibrated) @(negedge clk);
    checks += 2;
    if (early != 0) failures++;
    if (max_code < 300 || max_code > 2 * 480) failures++;
    $display("largest virtual-line code: %0d", max_code);
    repeat (20) @(negedge clk);
    ts_edge.delete();
    ts_val.delete();
    // 3. measurement
    for (int p = 0; p < 150; p++) begin
      real t1, t2, d;
      longint unsigned e1, e2;
      // keep each hit at least 100 ps away from a clock edge so its sampling edge is known
      t1 = $realtime + 8000.0;
      t1 = (($floor((t1 - 1000.0) / TCLK)) * TCLK) + 1000.0 + 100.0 + real'($urandom_range(0, 1799999)) / 1000.0;
      d  = 9000.0 + real'($urandom_range(0, 51000)) + real'($urandom_range(0, 999)) / 1000.0;
      t2 = t1 + d;
      if ((t2 - 1000.0) - TCLK * $floor((t2 - 1000.0) / TCLK) < 100.0) t2 += 150.0;
      if ((t2 - 1000.0) - TCLK * $floor((t2 - 1000.0) / TCLK) > 1900.0) t2 += 150.0;
      d  = t2 - t1;
      e1 = edge_after(t1);
      e2 = edge_after(t2);
      pulse_at(t1);
      pulse_at(t2);
      repeat (LAT + 3) @(negedge clk);
      checks += 3;
      if (ts_val.size() != 2) begin
        failures++;
        $display("pair %0d: %0d timestamps", p, ts_val.size());
      end else begin
        logic [NCC+F-1:0] a, b;
        longint unsigned ea, eb;
        a = ts_val.pop_front(); b = ts_val.pop_front();
        ea = ts_edge.pop_front(); eb = ts_edge.pop_front();
        err = real'(b - a) * TCLK / real'(2 ** F) - d;
        err2 += err * err;
        npairs++;
        if (err > 20.0 || err < -20.0) begin
          failures++;
          $display("pair %0d: interval %0.3f ps, error %0.3f ps", p, d, err);
        end
        if (ea != e1 + LAT) begin failures++; $display("latency %0d", ea - e1); end
        if (eb != e2 + LAT) failures++;
      end
      ts_val.delete();
      ts_edge.delete();
    end
    checks++;
    if (npairs == 0 || $sqrt(err2 / npairs) > 8.0) failures++;
    if (npairs > 0) $display("r.m.s. interval error: %0.3f ps over %0d pairs", $sqrt(err2 / npairs), npairs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400_000_000.0;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
