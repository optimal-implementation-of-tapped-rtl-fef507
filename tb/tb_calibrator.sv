// tb_calibrator: self-checking test of calibrator with 64 codes, 2**10 hits per calibration
// and 16 fraction bits. Hits are drawn from a known, uneven code distribution (one code left
// empty, one very wide, runs of back-to-back hits on the same code); the characteristic curve
// expected from that histogram, CC[n] = (h[0] + .. + h[n-1] + h[n]/2) * 2**16 / 2**10, is
// computed here and every code is then looked up and compared, one clock after its input,
// with its tag carried along. The state sequence clear, idle, accumulate, drain, build, run is
// checked, as are: no output before calibration, the build pass length, and a second
// calibration on a different distribution (the histogram must have been cleared).
`timescale 1ps/1fs
module tb_calibrator;
  import tdc_pkg::*;
  localparam int unsigned CODE_W = 6, K = 10, F = 16, TAG_W = 8;
  localparam int unsigned NBINS = 2 ** CODE_W;

  logic clk = 1'b0, rst_n = 1'b0;
  always #1000 clk = ~clk;
  int checks = 0, failures = 0;

  logic cal_start = 1'b0, in_valid = 1'b0;
  logic [CODE_W-1:0] in_code = '0;
  logic [TAG_W-1:0] in_tag = '0;
  logic out_valid;
  logic [F:0] out_fine;
  logic [TAG_W-1:0] out_tag;
  cal_state_e state;
  logic calibrated;

  calibrator #(.CODE_W(CODE_W), .CAL_LOG2_HITS(K), .FRAC_W(F), .TAG_W(TAG_W)) dut (
    .clk, .rst_n, .cal_start, .in_valid, .in_code, .in_tag,
    .out_valid, .out_fine, .out_tag, .state, .calibrated);

  int unsigned h [NBINS];
  int unsigned seen_states = 0;
  int          early_out = 0;
  always @(posedge clk) begin
    seen_states |= (1 << int'(state));
    if (out_valid && !calibrated) early_out++;
  end

  function automatic int unsigned pick(input int pass);
    int unsigned r;
    r = $urandom_range(0, 99);
    if (pass == 0) begin
      if (r < 20) return 17;                       // a wide bin
      return (r % 2 == 0) ? ((r * 7) % NBINS) | 1 : $urandom_range(0, NBINS - 1) & ~6'd4;
    end
    return (r < 50) ? $urandom_range(0, 15) : $urandom_range(16, NBINS - 1);
  endfunction

  task automatic calibrate(input int pass);
    int unsigned n;
    int          t_build;
    foreach (h[i]) h[i] = 0;
    @(negedge clk);
    cal_start = 1'b1;
    @(negedge clk);
    cal_start = 1'b0;
    n = 0;
    while (n < 2 ** K) begin
      int unsigned c;
      int          run;
      c = pick(pass);
      run = ($urandom_range(0, 9) == 0) ? 3 : 1;
      for (int r = 0; r < run && n < 2 ** K; r++) begin
        in_valid = 1'b1;
        in_code  = CODE_W'(c);
        h[c]++;
        n++;
        @(negedge clk);
      end
      in_valid = 1'b0;
      if ($urandom_range(0, 3) == 0) @(negedge clk);
    end
    in_valid = 1'b0;
    // extra hits after the count is reached must be ignored
    in_valid = 1'b1; in_code = 0; @(negedge clk); in_valid = 1'b0;
    t_build = 0;
    while (!calibrated && t_build < 1000) begin @(negedge clk); t_build++; end
    checks++;
    if (!calibrated || t_build > int'(NBINS) + 6) begin
      failures++;
      $display("build took %0d clocks", t_build);
    end
  endtask

  task automatic check_curve();
    longint unsigned cum2;
    longint unsigned cc [NBINS];
    cum2 = 0;
    for (int i = 0; i < int'(NBINS); i++) begin
      cc[i] = ((cum2 + h[i]) << F) >> (K + 1);
      cum2 += 2 * h[i];
    end
    for (int i = 0; i < int'(NBINS); i++) begin
      @(negedge clk);
      in_valid = 1'b1;
      in_code  = CODE_W'(i);
      in_tag   = TAG_W'(i * 3);
      @(posedge clk);
      #1;
      checks++;
      if (!out_valid || out_fine !== (F+1)'(cc[i]) || out_tag !== TAG_W'(i * 3)) begin
        failures++;
        if (failures < 10) $display("code %0d: fine %0d expected %0d", i, out_fine, cc[i]);
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (NBINS + 4) @(negedge clk);
    checks++;
    if (state != CAL_IDLE) failures++;
    // hits before calibration give no output
    in_valid = 1'b1; repeat (5) @(negedge clk); in_valid = 1'b0;
    calibrate(0);
    check_curve();
    calibrate(1);
    check_curve();
    checks += 2;
    if (seen_states != 6'b111111) begin failures++; $display("states seen %b", seen_states); end
    if (early_out != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(20000 * 2000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
