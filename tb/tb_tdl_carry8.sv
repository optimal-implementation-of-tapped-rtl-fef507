// tb_tdl_carry8: checks of the delay-line model.
// Line A has equal 5 ps taps, no clock skew and a 29 ps ultra-bin at tap 241: the number of
// high taps a given time after the hit edge is worked out here from those delays and compared
// with the model, the code must be a clean thermometer, and the falling edge must clear the
// line. Line B uses the default spread and skews: over many sampling instants it must show at
// least one bubble (a zero below a one), while its number of high taps grows with time.
`timescale 1ps/1fs
module tb_tdl_carry8;
  localparam int unsigned NT = 480;
  int checks = 0, failures = 0;

  logic hit = 1'b0;
  logic [NT-1:0] ta, tb_taps;

  tdl_carry8 #(.SPREAD(0.0), .TS_PS(0.0), .TN_PS(0.0)) u_a (.hit, .taps(ta));
  tdl_carry8 #(.SEED(7)) u_b (.hit, .taps(tb_taps));

  // Taps of line A that the edge has passed after dt picoseconds.
  function automatic int expected_ones(input real dt);
    real t;
    int  n;
    t = 0.0;
    n = 0;
    for (int k = 0; k < int'(NT); k++) begin
      t += (k == 241) ? 29.0 : 5.0;
      if (t <= dt) n++;
    end
    return n;
  endfunction

  function automatic bit is_thermo(input logic [NT-1:0] c);
    return c == ((NT'(1) << $countones(c)) - 1);
  endfunction

  int  bubbles = 0;
  int  prev_b = 0;
  int  nonmono = 0;
  real t0;

  initial begin
    #1000;
    checks++;
    if (ta != '0 || tb_taps != '0) failures++;
    t0 = $realtime;
    hit = 1'b1;
    for (int i = 0; i < 260; i++) begin
      real dt;
      dt = 2.5 + 10.0 * real'(i);
      #(t0 + dt - $realtime);
      checks += 2;
      if ($countones(ta) != expected_ones(dt)) begin
        failures++;
        if (failures < 10) $display("t=%0.1f ones %0d expected %0d", dt, $countones(ta), expected_ones(dt));
      end
      if (!is_thermo(ta)) failures++;
      if (!is_thermo(tb_taps)) bubbles++;
      if ($countones(tb_taps) + 8 < prev_b) nonmono++;
      prev_b = $countones(tb_taps);
    end
    checks += 3;
    if (ta != '1 || tb_taps != '1) failures++;
    if (bubbles == 0) begin failures++; $display("no bubble seen on the skewed line"); end
    if (nonmono != 0) failures++;
    hit = 1'b0;
    #4000;
    checks++;
    if (ta != '0 || tb_taps != '0) failures++;
    $display("bubbled samples on the skewed line: %0d", bubbles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
