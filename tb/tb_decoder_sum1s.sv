// tb_decoder_sum1s: self-checking test of decoder_sum1s at its full size (512 inputs, 9 stages).
// Random thermometer codes, with and without bubbles, all-zero and all-one codes are applied
// one per clock; each result is compared with the number of ones above bit 0, computed here
// directly from the code, exactly NB clocks after its input. out_valid must follow in_valid
// with the same latency. A watchdog ends the run if it stalls.
`timescale 1ps/1fs
module tb_decoder_sum1s;
  localparam int unsigned NB = 9;
  localparam int unsigned N  = 2 ** NB;
  localparam int unsigned NVEC = 400;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [N-1:0] in_code = '0;
  logic out_valid;
  logic [NB-1:0] out_bin;
  int checks = 0, failures = 0;

  always #1000 clk = ~clk;

  decoder_sum1s #(.NB(NB)) dut (.clk, .rst_n, .in_valid, .in_code, .out_valid, .out_bin);

  int unsigned exp_q [$];
  logic        vld_q [$];
  int unsigned ncyc = 0;
  int unsigned n_bubbly = 0;

  function automatic logic [N-1:0] make_code(input int unsigned v);
    logic [N-1:0] code;
    int unsigned  len;
    len  = (v == 0) ? 0 : (v == 1) ? N : $urandom_range(1, N);
    code = '0;
    for (int i = 0; i < N; i++) code[i] = (i < int'(len));
    if (v > 3 && (v % 2 == 0)) begin
      int nb = $urandom_range(1, 3);
      for (int b = 0; b < nb; b++) begin
        int p = $urandom_range(0, N - 1);
        code[p] = ~code[p];
      end
    end
    return code;
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int unsigned v = 0; v < NVEC + NB + 2; v++) begin
      @(negedge clk);
      if (v < NVEC) begin
        logic [N-1:0] code;
        int unsigned  exp;
        code = make_code(v);
        exp = 0; for (int i = 1; i < N; i++) exp += code[i];
        in_code  = code;
        in_valid = (v % 7 != 3);
        exp_q.push_back(exp);
        vld_q.push_back(in_valid);
        if (code != ((N'(1) << $countones(code)) - 1)) n_bubbly++;
      end else begin
        in_valid = 1'b0;
      end
    end
  end

  // Compare NB clocks after each input.
  always @(posedge clk) begin
    if (rst_n) begin
      ncyc++;
      if (ncyc > NB && exp_q.size() > 0 && ncyc - NB <= NVEC) begin
        int unsigned e;
        logic        ev;
        #1;
        e  = exp_q.pop_front();
        ev = vld_q.pop_front();
        checks++;
        if (out_valid !== ev || (ev && out_bin !== NB'(e))) begin
          failures++;
          if (failures < 10) $display("mismatch: valid %0b/%0b bin %0d expected %0d", out_valid, ev, out_bin, e);
        end
      end
      if (ncyc == NVEC + NB + 1) begin
        checks++;
        if (n_bubbly < 50) failures++;
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    #((NVEC + 100) * 2000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
