// hit_gen: internal START/STOP generator for self-test, clocked by a second oscillator
// (clk1) that is unrelated to the converter's clock. Because the two clocks are uncorrelated,
// its hits fall uniformly within the converter's clock period, which is what the code
// density calibration needs; and because both outputs come from the same clock edge train,
// the START-to-STOP delay carries only the jitter of the chip itself.
//
// A counter runs from 0 to period-1 in clk1 cycles. start is high for the first width cycles
// of each period; stop is high for width cycles beginning delay cycles after start rises
// (delay must be below period; a stop window that passes the end of the period wraps). Both
// outputs are registered and low while en is low.
//
// Parameters and ports are this design's choice: the source architecture names this block a
// simple logic on an independent clock and says no more.
`timescale 1ps/1fs
module hit_gen #(
  parameter int unsigned W = 16
) (
  input  logic          clk1,
  input  logic          rst_n,
  input  logic          en,
  input  logic [W-1:0]  period,
  input  logic [W-1:0]  delay,
  input  logic [W-1:0]  width,
  output logic          start,
  output logic          stop
);

  logic [W-1:0] cnt;
  logic [W-1:0] since_stop;

  // Cycles since the stop window opened, modulo the period.
  always_comb begin
    if (cnt >= delay) since_stop = cnt - delay;
    else              since_stop = cnt + period - delay;
  end

  always_ff @(posedge clk1 or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      start <= 1'b0;
      stop  <= 1'b0;
    end else if (!en) begin
      cnt   <= '0;
      start <= 1'b0;
      stop  <= 1'b0;
    end else begin
      cnt   <= (cnt >= period - 1'b1) ? '0 : cnt + 1'b1;
      start <= (cnt < width);
      stop  <= (since_stop < width);
    end
  end

endmodule
