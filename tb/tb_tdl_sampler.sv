// tb_tdl_sampler: self-checking test of tdl_sampler with two short lines (16 taps) and an
// 8-bit coarse count. Tap patterns are driven between clock edges: the sampled code must equal
// the taps of the edge before, hit_valid must be high exactly when a first tap is newly high
// (one hit per rising step, also when only the second line sees it first), and hit_coarse must
// be the coarse count presented at that edge. Watchdog included.
`timescale 1ps/1fs
module tb_tdl_sampler;
  localparam int unsigned NTDL = 2, NT = 16, NCC = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1000 clk = ~clk;
  int checks = 0, failures = 0;

  logic [NTDL-1:0][NT-1:0] taps = '0;
  logic [NCC-1:0] coarse = '0;
  logic [NTDL-1:0][NT-1:0] code;
  logic hit_valid;
  logic [NCC-1:0] hit_coarse;

  tdl_sampler #(.NTDL(NTDL), .NT(NT), .NCC(NCC)) dut (.clk, .rst_n, .taps, .coarse, .code, .hit_valid, .hit_coarse);

  logic [NTDL-1:0][NT-1:0] taps_at_edge;
  logic [NCC-1:0]          coarse_at_edge;
  logic                    first_prev = 1'b0;
  int                      nhits = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 300; c++) begin
      int phase;
      @(negedge clk);
      coarse = coarse + 1'b1;
      phase = c % 6;
      // a step reaches the lines, stays a few clocks, then falls
      for (int t = 0; t < int'(NTDL); t++) begin
        int n;
        n = (phase == 0) ? 0 : (phase == 1) ? $urandom_range(0, NT) : NT;
        if (phase == 1 && t == 0 && (c % 12 == 1)) n = 0;   // only line 1 sees it first
        taps[t] = (NT'(1) << n) - 1;
        if (n == int'(NT)) taps[t] = '1;
      end
      @(posedge clk);
      taps_at_edge   = taps;
      coarse_at_edge = coarse;
      #1;
      checks += 2;
      if (code !== taps_at_edge) failures++;
      begin
        logic first_now;
        logic exp_hit;
        first_now = taps_at_edge[0][0] | taps_at_edge[1][0];
        exp_hit   = first_now && !first_prev;
        first_prev = first_now;
        if (hit_valid !== exp_hit) begin failures++; $display("c=%0d hit %0b expected %0b", c, hit_valid, exp_hit); end
        if (exp_hit) begin
          nhits++;
          checks++;
          if (hit_coarse !== coarse_at_edge) failures++;
        end
      end
    end
    checks++;
    if (nhits < 40) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1000 * 2000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
