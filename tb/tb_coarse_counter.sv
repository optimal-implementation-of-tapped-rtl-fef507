// tb_coarse_counter: self-checking test of coarse_counter with an 8-bit counter so that it
// wraps several times. The count is compared every clock with a reference kept here; the
// enable is toggled at random and the wrap from 255 to 0 must be seen. Watchdog included.
`timescale 1ps/1fs
module tb_coarse_counter;
  localparam int unsigned NCC = 8;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [NCC-1:0] count;
  int checks = 0, failures = 0, wraps = 0;
  int unsigned ref_cnt = 0;
  always #1000 clk = ~clk;

  coarse_counter #(.NCC(NCC)) dut (.clk, .rst_n, .en, .count);

  initial begin
    repeat (2) @(negedge clk);
    checks++;
    if (count !== '0) failures++;
    rst_n = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      en = ($urandom_range(0, 9) != 0);
      @(posedge clk);
      if (en) begin
        ref_cnt = (ref_cnt + 1) % (2 ** NCC);
        if (ref_cnt == 0) wraps++;
      end
      #1;
      checks++;
      if (count !== NCC'(ref_cnt)) failures++;
    end
    checks++;
    if (wraps < 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(3000 * 2000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
