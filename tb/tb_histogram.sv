// tb_histogram: self-checking test of histogram with 64 bins of 16 units (BIN_SHIFT = 4)
// and a negative offset, so that intervals below, inside and above the range all occur.
// Random signed intervals, some back to back on one bin, are binned; the expected counts,
// underflow and overflow are kept here. The RAM is then read out bin by bin (one clock read
// latency) and compared, cleared, and read again to check that every bin is zero.
`timescale 1ps/1fs
module tb_histogram;
  localparam int unsigned DT_W = 16, NBINS = 64, SH = 4;
  localparam int OFFS = -200;

  logic clk = 1'b0, rst_n = 1'b0;
  always #1000 clk = ~clk;
  int checks = 0, failures = 0;

  logic en = 1'b0, clear = 1'b0, in_valid = 1'b0;
  logic signed [DT_W-1:0] offset = DT_W'(OFFS), in_dt = '0;
  logic [5:0] rd_addr = '0;
  logic [31:0] rd_data, underflow, overflow;
  logic busy;

  histogram #(.DT_W(DT_W), .NBINS(NBINS), .BIN_SHIFT(SH), .CNT_W(32)) dut (
    .clk, .rst_n, .en, .clear, .offset, .in_valid, .in_dt, .rd_addr, .rd_data,
    .underflow, .overflow, .busy);

  int unsigned exp_h [NBINS];
  int unsigned exp_u = 0, exp_o = 0;

  task automatic readout(input bit expect_zero);
    for (int b = 0; b < int'(NBINS); b++) begin
      @(negedge clk);
      rd_addr = 6'(b);
      @(posedge clk);
      #1;
      checks++;
      if (rd_data !== (expect_zero ? 32'd0 : exp_h[b])) begin
        failures++;
        if (failures < 10) $display("bin %0d: %0d expected %0d", b, rd_data, exp_h[b]);
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    while (busy) @(negedge clk);
    en = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      int v;
      int run;
      v = $urandom_range(0, 1500) - 400;
      run = ($urandom_range(0, 7) == 0) ? 3 : 1;
      for (int r = 0; r < run; r++) begin
        int b;
        in_valid = 1'b1;
        in_dt = DT_W'(v);
        b = (v - OFFS) >>> SH;
        if (v - OFFS < 0) exp_u++;
        else if (b >= int'(NBINS)) exp_o++;
        else exp_h[b]++;
        @(negedge clk);
      end
      in_valid = 1'b0;
      if ($urandom_range(0, 2) == 0) @(negedge clk);
    end
    in_valid = 1'b0;
    @(negedge clk);
    @(negedge clk);
    en = 1'b0;
    checks += 2;
    if (underflow !== exp_u) failures++;
    if (overflow !== exp_o) failures++;
    readout(0);
    @(negedge clk);
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    while (busy) @(negedge clk);
    checks += 2;
    if (underflow !== 0 || overflow !== 0) failures++;
    if (exp_u == 0 || exp_o == 0) failures++;
    readout(1);
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
