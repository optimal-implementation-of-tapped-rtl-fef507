// tdc_top: two-channel (START and STOP) time-to-digital converter with tapped-delay-line
// fine interpolation, Nutt coarse counting, on-chip calibration and an interval histogram.
//
// Each channel (tdc_channel) timestamps the rising edges of its hit input against the shared
// coarse counter; interval_meas subtracts the START timestamp from the STOP timestamp and the
// histogram bins the result. The hits come either from the external inputs or, with
// sel_internal high, from the internal generator (hit_gen) that runs on the independent clock
// clk1. cal_start calibrates both channels at once by a code density test; it needs hits that
// are uncorrelated with clk, 2**CAL_LOG2_HITS of them on each channel, such as the internal
// generator supplies.
//
// The default build is the high-precision configuration: four parallel delay lines per channel
// merged after sum1s decoders. NTDL = 1 with DECODER = DEC_LOG2 gives the small configuration.
// Units: timestamps and intervals count T_CLK / 2**FRAC_W (30.5 fs at 500 MHz with FRAC_W=16);
// histogram bins are T_CLK / 2**(FRAC_W - BIN_SHIFT) wide.
//
// Timing: a hit appears as a timestamp NB + ceil(log2 NTDL) + 3 clocks after the clock edge
// that samples it, and a pair as an interval one clock later. The delay lines inside the
// channels are behavioural models of the FPGA carry chains; everything else is synthesizable.
`timescale 1ps/1fs
module tdc_top
  import tdc_pkg::*;
#(
  parameter int unsigned NTDL          = 4,
  parameter decoder_e    DECODER       = DEC_SUM1S,
  parameter int unsigned NCLB          = 60,
  parameter int unsigned NB            = 9,
  parameter int unsigned NCC           = 16,
  parameter int unsigned FRAC_W        = 16,
  parameter int unsigned CAL_LOG2_HITS = 16,
  parameter int unsigned NBINS         = 6400,
  parameter int unsigned BIN_SHIFT     = 9,
  parameter int unsigned HG_W          = 16
) (
  input  logic                            clk,          // CLK0, the converter clock
  input  logic                            rst_n,
  input  logic                            clk1,         // independent clock of the generator
  // hit sources
  input  logic                            start_ext,
  input  logic                            stop_ext,
  input  logic                            sel_internal,
  input  logic                            hg_en,
  input  logic [HG_W-1:0]                 hg_period,
  input  logic [HG_W-1:0]                 hg_delay,
  input  logic [HG_W-1:0]                 hg_width,
  // calibration
  input  logic                            cal_start,
  output logic [1:0]                      calibrated,   // [0] START, [1] STOP
  output cal_state_e                      cal_state_start,
  output cal_state_e                      cal_state_stop,
  // uncalibrated virtual-line codes, for code density and linearity tests
  output logic                            raw_valid_start,
  output logic [NB+tree_stages(NTDL)-1:0] raw_code_start,
  output logic                            raw_valid_stop,
  output logic [NB+tree_stages(NTDL)-1:0] raw_code_stop,
  // timestamps and intervals
  output logic                            start_ts_valid,
  output logic [NCC+FRAC_W-1:0]           start_ts,
  output logic                            stop_ts_valid,
  output logic [NCC+FRAC_W-1:0]           stop_ts,
  output logic                            meas_valid,
  output logic signed [NCC+FRAC_W-1:0]    meas_dt,
  // histogram
  input  logic                            hist_en,
  input  logic                            hist_clear,
  input  logic signed [NCC+FRAC_W-1:0]    hist_offset,
  input  logic [$clog2(NBINS)-1:0]        hist_rd_addr,
  output logic [31:0]                     hist_rd_data,
  output logic [31:0]                     hist_underflow,
  output logic [31:0]                     hist_overflow,
  output logic                            hist_busy
);

  localparam int unsigned TS_W = NCC + FRAC_W;

  // ---- hit sources ----
  logic start_int, stop_int, start_hit, stop_hit;

  hit_gen #(.W(HG_W)) u_gen (
    .clk1, .rst_n, .en(hg_en), .period(hg_period), .delay(hg_delay), .width(hg_width),
    .start(start_int), .stop(stop_int)
  );

  assign start_hit = sel_internal ? start_int : start_ext;
  assign stop_hit  = sel_internal ? stop_int  : stop_ext;

  // ---- coarse counter shared by both channels ----
  logic [NCC-1:0] coarse;
  coarse_counter #(.NCC(NCC)) u_cc (.clk, .rst_n, .en(1'b1), .count(coarse));

  // ---- channels ----
  tdc_channel #(
    .NTDL(NTDL), .DECODER(DECODER), .NCLB(NCLB), .NB(NB), .NCC(NCC), .FRAC_W(FRAC_W),
    .CAL_LOG2_HITS(CAL_LOG2_HITS), .SEED(1)
  ) u_ch_start (
    .clk, .rst_n, .hit(start_hit), .coarse, .cal_start,
    .raw_valid(raw_valid_start), .raw_code(raw_code_start),
    .ts_valid(start_ts_valid), .ts(start_ts),
    .cal_state(cal_state_start), .calibrated(calibrated[0])
  );

  tdc_channel #(
    .NTDL(NTDL), .DECODER(DECODER), .NCLB(NCLB), .NB(NB), .NCC(NCC), .FRAC_W(FRAC_W),
    .CAL_LOG2_HITS(CAL_LOG2_HITS), .SEED(2)
  ) u_ch_stop (
    .clk, .rst_n, .hit(stop_hit), .coarse, .cal_start,
    .raw_valid(raw_valid_stop), .raw_code(raw_code_stop),
    .ts_valid(stop_ts_valid), .ts(stop_ts),
    .cal_state(cal_state_stop), .calibrated(calibrated[1])
  );

  // ---- interval and histogram ----
  interval_meas #(.TS_W(TS_W)) u_meas (
    .clk, .rst_n,
    .start_valid(start_ts_valid), .start_ts,
    .stop_valid(stop_ts_valid),   .stop_ts,
    .out_valid(meas_valid), .out_dt(meas_dt)
  );

  histogram #(.DT_W(TS_W), .NBINS(NBINS), .BIN_SHIFT(BIN_SHIFT), .CNT_W(32)) u_hist (
    .clk, .rst_n, .en(hist_en), .clear(hist_clear), .offset(hist_offset),
    .in_valid(meas_valid), .in_dt(meas_dt),
    .rd_addr(hist_rd_addr), .rd_data(hist_rd_data),
    .underflow(hist_underflow), .overflow(hist_overflow), .busy(hist_busy)
  );

endmodule
