// calibrator: bin-by-bin calibration of one channel by a code density test, and the real-time
// conversion of virtual-line codes into calibrated fine times.
//
// The taps of an FPGA delay line are far from equal, so a code does not map linearly onto
// time. With hits that are uncorrelated with the system clock, the number of hits h[n] that
// land in code n is proportional to the width of that bin. After a calibration request the
// block counts 2**CAL_LOG2_HITS hits into a histogram (block RAM, read-modify-write with a
// one-entry bypass so that back-to-back hits on one code are counted), then walks the
// histogram once: the running sum turns the calibration table h[n]/sum(h) * T_CLK into the
// characteristic curve CC[n], which it writes into a second RAM, and it clears the histogram
// on the way for the next calibration. From then on each code is looked up in CC. Because
// the number of hits is a power of two, dividing by it is a shift.
//
// Fine times are in units of T_CLK / 2**FRAC_W and measure the time from the hit to the
// sampling clock edge; CC[n] is taken at the centre of bin n: (h[0] + .. + h[n-1] + h[n]/2).
// The published characteristic curve is the running sum up to and including bin n; the
// centre differs from it by half a bin, the same for every hit of that bin, and is used here
// because it makes each timestamp an unbiased estimate.
//
// Interface and timing: after reset the histogram is cleared (NBINS clocks, state CAL_CLEAR);
// cal_start then starts a calibration from any state except CAL_CLEAR. Hits are not output
// until the channel is calibrated (state CAL_RUN). In CAL_RUN out_valid, out_fine and
// out_tag follow in_valid, in_code and in_tag by one clock; in_tag is carried along unchanged
// (the channel uses it for the coarse count). The build pass takes NBINS + 2 clocks.
//
// The scaling product is kept at full width so that no bit is lost before the shift; only
// its low bits are stored, since CC never exceeds one clock period. A lint tool reports the
// unused upper bits. The assertion's 'disable iff' on the reset makes a lint tool see the
// reset used both asynchronously and in a synchronous expression; that is intended.
`timescale 1ps/1fs
module calibrator
  import tdc_pkg::*;
#(
  parameter int unsigned CODE_W        = 11,   // width of the virtual-line code
  parameter int unsigned CAL_LOG2_HITS = 16,   // log2 of the hits per calibration
  parameter int unsigned FRAC_W        = 16,   // fraction bits of a fine time (unit T_CLK)
  parameter int unsigned TAG_W         = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cal_start,
  input  logic               in_valid,
  input  logic [CODE_W-1:0]  in_code,
  input  logic [TAG_W-1:0]   in_tag,
  output logic               out_valid,
  output logic [FRAC_W:0]    out_fine,
  output logic [TAG_W-1:0]   out_tag,
  output cal_state_e         state,
  output logic               calibrated
);

  localparam int unsigned NBINS = 2 ** CODE_W;
  localparam int unsigned HW    = CAL_LOG2_HITS + 1;     // a bin can hold every hit
  localparam int unsigned CCW   = FRAC_W + 1;            // CC reaches one full period

  logic [HW-1:0]  hist_mem [NBINS];
  logic [CCW-1:0] cc_mem   [NBINS];

  // Histogram port: one synchronous read, one write.
  logic [CODE_W-1:0] h_raddr;
  logic [HW-1:0]     h_rdata;
  logic              h_we;
  logic [CODE_W-1:0] h_waddr;
  logic [HW-1:0]     h_wdata;

  always_ff @(posedge clk) begin
    h_rdata <= hist_mem[h_raddr];
    if (h_we) hist_mem[h_waddr] <= h_wdata;
  end

  // Characteristic curve port.
  logic              c_we;
  logic [CODE_W-1:0] c_waddr;
  logic [CCW-1:0]    c_wdata;
  logic [CCW-1:0]    c_rdata;

  always_ff @(posedge clk) begin
    c_rdata <= cc_mem[in_code];
    if (c_we) cc_mem[c_waddr] <= c_wdata;
  end

  cal_state_e        st;
  logic [CODE_W:0]   sweep;          // bin counter of the clear and build passes
  logic [HW-1:0]     nhits;          // hits counted so far
  logic              p_v;            // a histogram read was issued last clock
  logic [CODE_W-1:0] p_addr;         // ... for this bin
  logic              last_we;        // bypass of the previous write
  logic [CODE_W-1:0] last_waddr;
  logic [HW-1:0]     last_wdata;
  logic [HW+FRAC_W:0] cum2;          // 2 * running sum of the histogram
  logic [HW-1:0]     bin_cnt;
  logic [HW+FRAC_W:0] centre2;
  logic [HW+FRAC_W:0] scaled;

  assign state      = st;
  assign calibrated = (st == CAL_RUN);

  // Current value of the bin read last clock, including a write that landed meanwhile.
  assign bin_cnt = (last_we && last_waddr == p_addr) ? last_wdata : h_rdata;
  // CC = (cum + h/2) / 2**CAL_LOG2_HITS, expressed in units of 2**-FRAC_W.
  assign centre2 = cum2 + (HW + FRAC_W + 1)'(bin_cnt);
  assign scaled  = (centre2 << FRAC_W) >> (CAL_LOG2_HITS + 1);

  always_comb begin
    h_raddr = in_code;
    h_we    = 1'b0;
    h_waddr = p_addr;
    h_wdata = bin_cnt + 1'b1;
    c_we    = 1'b0;
    c_waddr = p_addr;
    c_wdata = scaled[CCW-1:0];
    unique case (st)
      CAL_CLEAR: begin
        h_we    = 1'b1;
        h_waddr = sweep[CODE_W-1:0];
        h_wdata = '0;
      end
      CAL_ACCUM, CAL_DRAIN: h_we = p_v;
      CAL_BUILD: begin
        h_raddr = sweep[CODE_W-1:0];
        h_we    = p_v;                // clear each bin once it has been used
        h_wdata = '0;
        c_we    = p_v;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= CAL_CLEAR;
      sweep      <= '0;
      nhits      <= '0;
      p_v        <= 1'b0;
      p_addr     <= '0;
      last_we    <= 1'b0;
      last_waddr <= '0;
      last_wdata <= '0;
      cum2       <= '0;
    end else begin
      last_we    <= h_we;
      last_waddr <= h_waddr;
      last_wdata <= h_wdata;
      p_v        <= 1'b0;
      p_addr     <= h_raddr;
      unique case (st)
        CAL_CLEAR: begin
          sweep <= sweep + 1'b1;
          if (sweep == (CODE_W+1)'(NBINS - 1)) st <= CAL_IDLE;
        end
        CAL_IDLE, CAL_RUN: begin
          if (cal_start) begin
            st    <= CAL_ACCUM;
            nhits <= '0;
          end
        end
        CAL_ACCUM: begin
          if (in_valid) begin
            p_v   <= 1'b1;
            nhits <= nhits + 1'b1;
            if (nhits == HW'(2 ** CAL_LOG2_HITS - 1)) st <= CAL_DRAIN;
          end
        end
        CAL_DRAIN: begin
          if (!p_v) begin
            st    <= CAL_BUILD;
            sweep <= '0;
            cum2  <= '0;
          end
        end
        CAL_BUILD: begin
          if (sweep < (CODE_W+1)'(NBINS)) begin
            p_v   <= 1'b1;
            sweep <= sweep + 1'b1;
          end
          if (p_v) cum2 <= cum2 + ((HW + FRAC_W + 1)'(bin_cnt) << 1);
          if (sweep == (CODE_W+1)'(NBINS) && !p_v) st <= CAL_RUN;
        end
        default: st <= CAL_IDLE;
      endcase
    end
  end

  // Conversion of hits once calibrated.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid && (st == CAL_RUN);

  always_ff @(posedge clk) out_tag <= in_tag;

  assign out_fine = c_rdata;

  // The conversion must never see a code while the curve is being rebuilt.
  a_no_lookup_in_build: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid |-> $past(st) == CAL_RUN);

endmodule
