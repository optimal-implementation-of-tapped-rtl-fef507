// tb_adder_tree: self-checking test of adder_tree with four 9-bit inputs (two stages) and
// with three inputs (two stages, one padded). Random values, including all-maximum inputs,
// are applied one set per clock; each sum is compared with the sum computed here, exactly
// ceil(log2 NTDL) clocks later, and out_valid must follow in_valid. Watchdog included.
`timescale 1ps/1fs
module tb_adder_tree;
  localparam int unsigned W = 9;
  localparam int unsigned NVEC = 300;

  logic clk = 1'b0, rst_n = 1'b0;
  always #1000 clk = ~clk;
  int checks = 0, failures = 0;

  logic            v_in = 1'b0;
  logic [3:0][W-1:0] a4 = '0;
  logic [2:0][W-1:0] a3 = '0;
  logic            v4, v3;
  logic [W+1:0]    s4, s3;

  adder_tree #(.NTDL(4), .W(W)) dut4 (.clk, .rst_n, .in_valid(v_in), .in_val(a4), .out_valid(v4), .out_sum(s4));
  adder_tree #(.NTDL(3), .W(W)) dut3 (.clk, .rst_n, .in_valid(v_in), .in_val(a3), .out_valid(v3), .out_sum(s3));

  int unsigned e4_q [$], e3_q [$];
  logic        ev_q [$];

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int v = 0; v < NVEC; v++) begin
      automatic int unsigned e4 = 0;
      automatic int unsigned e3 = 0;
      @(negedge clk);
      for (int i = 0; i < 4; i++) begin
        a4[i] = (v == 5) ? '1 : W'($urandom);
        e4 += a4[i];
      end
      for (int i = 0; i < 3; i++) begin
        a3[i] = (v == 6) ? '1 : W'($urandom);
        e3 += a3[i];
      end
      v_in = ($urandom_range(0, 3) != 0);
      e4_q.push_back(e4);
      e3_q.push_back(e3);
      ev_q.push_back(v_in);
    end
    @(negedge clk);
    v_in = 1'b0;
  end

  int ncyc = 0;
  always @(posedge clk) if (rst_n) begin
    ncyc++;
    #1;
    if (ncyc > 2 && ev_q.size() > 0) begin
      int unsigned e4, e3;
      logic ev;
      e4 = e4_q.pop_front(); e3 = e3_q.pop_front(); ev = ev_q.pop_front();
      checks += 2;
      if (v4 !== ev || (ev && s4 !== (W+2)'(e4))) begin failures++; if (failures < 10) $display("4-input: %0d vs %0d", s4, e4); end
      if (v3 !== ev || (ev && s3 !== (W+2)'(e3))) begin failures++; if (failures < 10) $display("3-input: %0d vs %0d", s3, e3); end
    end
    if (ncyc == NVEC + 3) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    #((NVEC + 50) * 2000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
