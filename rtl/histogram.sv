// histogram: real-time histogram of measured intervals, kept in block RAM, as used to
// characterise the converter (precision from the spread of a fixed delay, linearity from a
// code density test of uncorrelated START and STOP).
//
// An interval dt (signed, unit T_CLK / 2**FRAC_W) falls into bin (dt - offset) >> BIN_SHIFT.
// With FRAC_W = 16 and BIN_SHIFT = 9 a bin is T_CLK / 128, 15.625 ps at 500 MHz, and the
// default 6400 bins cover 100 ns. Intervals below the range add to underflow, those above to
// overflow. Each in-range interval does a read-modify-write of its bin; a one-entry bypass
// keeps back-to-back intervals on the same bin correct.
//
// Interface and timing: counting runs while en is high; clear zeroes every bin and both
// out-of-range counters, taking NBINS clocks while busy is high (intervals are ignored then).
// With en low the RAM can be read: rd_data holds bin rd_addr one clock after rd_addr is
// given. Bin width and range follow the published linearity test; the counter widths, the
// offset input and the out-of-range counters are this design's choices.
`timescale 1ps/1fs
module histogram #(
  parameter int unsigned DT_W      = 32,
  parameter int unsigned NBINS     = 6400,
  parameter int unsigned BIN_SHIFT = 9,
  parameter int unsigned CNT_W     = 32
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        en,
  input  logic                        clear,
  input  logic signed [DT_W-1:0]      offset,
  input  logic                        in_valid,
  input  logic signed [DT_W-1:0]      in_dt,
  input  logic [$clog2(NBINS)-1:0]    rd_addr,
  output logic [CNT_W-1:0]            rd_data,
  output logic [CNT_W-1:0]            underflow,
  output logic [CNT_W-1:0]            overflow,
  output logic                        busy
);

  localparam int unsigned AW = $clog2(NBINS);

  logic [CNT_W-1:0] mem [NBINS];

  logic [AW-1:0]    raddr, waddr;
  logic             we;
  logic [CNT_W-1:0] wdata, rdata;

  always_ff @(posedge clk) begin
    rdata <= mem[raddr];
    if (we) mem[waddr] <= wdata;
  end
  assign rd_data = rdata;

  // Bin of the incoming interval.
  logic signed [DT_W:0] rel;
  logic signed [DT_W:0] bin;
  logic                 in_range;
  assign rel      = (DT_W+1)'(in_dt) - (DT_W+1)'(offset);
  assign bin      = rel >>> BIN_SHIFT;
  assign in_range = (bin >= 0) && (bin < (DT_W+1)'(NBINS));

  logic             p_v;
  logic [AW-1:0]    p_addr;
  logic             last_we;
  logic [AW-1:0]    last_waddr;
  logic [CNT_W-1:0] last_wdata;
  logic [AW:0]      sweep;
  logic [CNT_W-1:0] cur;

  assign cur = (last_we && last_waddr == p_addr) ? last_wdata : rdata;

  always_comb begin
    raddr = en ? AW'(bin) : rd_addr;
    we    = p_v;
    waddr = p_addr;
    wdata = cur + 1'b1;
    if (busy) begin
      we    = 1'b1;
      waddr = sweep[AW-1:0];
      wdata = '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b1;       // the RAM is cleared after reset
      sweep      <= '0;
      p_v        <= 1'b0;
      p_addr     <= '0;
      last_we    <= 1'b0;
      last_waddr <= '0;
      last_wdata <= '0;
      underflow  <= '0;
      overflow   <= '0;
    end else begin
      last_we    <= we;
      last_waddr <= waddr;
      last_wdata <= wdata;
      p_addr     <= raddr;
      p_v        <= 1'b0;
      if (busy) begin
        sweep <= sweep + 1'b1;
        if (sweep == (AW+1)'(NBINS - 1)) busy <= 1'b0;
      end else if (clear) begin
        busy      <= 1'b1;
        sweep     <= '0;
        underflow <= '0;
        overflow  <= '0;
      end else if (en && in_valid) begin
        if (in_range)      p_v       <= 1'b1;
        else if (rel < 0)  underflow <= underflow + 1'b1;
        else               overflow  <= overflow + 1'b1;
      end
    end
  end

endmodule
