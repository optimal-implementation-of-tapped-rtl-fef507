// tb_interval_meas: self-checking test of interval_meas. It sends pairs of timestamps in
// every order: START first, STOP first (negative interval), both in the same clock, a START
// replaced by a newer START, pairs straddling the wrap of the timestamp counter, and a lone
// STOP that must expire after MAX_WAIT clocks without producing an interval. Each
// output interval is compared with the difference computed here, one clock after the second
// timestamp of its pair. Watchdog included.
`timescale 1ps/1fs
module tb_interval_meas;
  localparam int unsigned TS_W = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1000 clk = ~clk;
  int checks = 0, failures = 0;

  logic sv = 1'b0, pv = 1'b0;
  logic [TS_W-1:0] sts = '0, pts = '0;
  logic ov;
  logic signed [TS_W-1:0] odt;

  interval_meas #(.TS_W(TS_W)) dut (.clk, .rst_n, .start_valid(sv), .start_ts(sts),
    .stop_valid(pv), .stop_ts(pts), .out_valid(ov), .out_dt(odt));

  int n_out = 0;
  longint exp_q [$];

  always @(posedge clk) begin
    #1;
    if (ov) begin
      longint e;
      n_out++;
      checks++;
      if (exp_q.size() == 0) failures++;
      else begin
        e = exp_q.pop_front();
        if (longint'(odt) != e) begin
          failures++;
          if (failures < 10) $display("interval %0d expected %0d", odt, e);
        end
      end
    end
  end

  task automatic send(input bit s, input bit p, input logic [TS_W-1:0] ts_s, input logic [TS_W-1:0] ts_p);
    @(negedge clk);
    sv = s; pv = p; sts = ts_s; pts = ts_p;
    @(negedge clk);
    sv = 1'b0; pv = 1'b0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 200; k++) begin
      logic [TS_W-1:0] a, b;
      int mode;
      a = $urandom;
      b = a + TS_W'($urandom_range(0, 2000000)) - TS_W'(400000);
      mode = k % 5;
      if (mode == 4) begin
        a = 32'hFFFF_F000 + TS_W'($urandom_range(0, 4095));
        b = a + 32'd8192;
      end
      // every tenth event is preceded by a lone STOP, which must expire unpaired
      if (k % 10 == 7) begin
        send(0, 1, 0, $urandom);
        repeat (130) @(negedge clk);
      end
      exp_q.push_back(longint'(signed'(b - a)));
      case (mode)
        0: begin send(1, 0, a, 0); repeat ($urandom_range(0, 3)) @(negedge clk); send(0, 1, 0, b); end
        1: begin send(0, 1, 0, b); repeat ($urandom_range(0, 3)) @(negedge clk); send(1, 0, a, 0); end
        2: send(1, 1, a, b);
        3: begin send(1, 0, a - 32'd999, 0); send(1, 0, a, 0); send(0, 1, 0, b); end
        default: begin send(1, 0, a, 0); send(0, 1, 0, b); end
      endcase
    end
    repeat (4) @(negedge clk);
    checks++;
    if (n_out != 200 || exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(5000 * 2000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
