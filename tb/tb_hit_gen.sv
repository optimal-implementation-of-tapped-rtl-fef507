// tb_hit_gen: self-checking test of hit_gen. For several settings of period, delay and width
// (including a stop window that wraps past the end of the period) the start and stop outputs
// are compared every clk1 cycle with a reference waveform computed here, and both must be low
// while the generator is disabled.
`timescale 1ps/1fs
module tb_hit_gen;
  localparam int unsigned W = 8;
  logic clk1 = 1'b0, rst_n = 1'b0, en = 1'b0;
  always #1571 clk1 = ~clk1;
  int checks = 0, failures = 0;

  logic [W-1:0] period = 8'd10, delay = 8'd3, width = 8'd4;
  logic start, stop;

  hit_gen #(.W(W)) dut (.clk1, .rst_n, .en, .period, .delay, .width, .start, .stop);

  task automatic run(input int p, input int d, input int w);
    int c;
    @(negedge clk1);
    en = 1'b0;
    period = W'(p); delay = W'(d); width = W'(w);
    @(negedge clk1);
    checks++;
    if (start || stop) failures++;
    en = 1'b1;
    c = 0;
    for (int i = 0; i < 5 * p; i++) begin
      @(posedge clk1);
      #1;
      checks += 2;
      if (start !== (c < w)) failures++;
      if (stop !== (((c - d + p) % p) < w)) failures++;
      c = (c + 1) % p;
    end
  endtask

  initial begin
    repeat (2) @(negedge clk1);
    rst_n = 1'b1;
    run(10, 3, 4);
    run(12, 9, 5);
    run(6, 0, 2);
    run(40, 7, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(2000 * 3142);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
