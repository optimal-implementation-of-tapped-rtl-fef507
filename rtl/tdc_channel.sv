// tdc_channel: one complete timestamping channel of the TDL time-to-digital converter.
//
// The hit input drives NTDL delay lines in parallel (spatial sub-interpolation). Their taps
// are sampled on every system clock edge; each line's thermometer code is widened to 2**NB
// inputs with zeros (480 taps into a 512-input decoder) and decoded by its own decoder, of the
// kind DECODER selects; a tree adder sums the NTDL results into the code of one virtual line
// with about NTDL times finer bins. The calibrator maps that code onto a fine time, the time
// from the hit to the sampling edge, and the coarse count of the sampling edge completes the
// timestamp (Nutt interpolation):
//
//     ts = coarse * 2**FRAC_W - fine        (unit T_CLK / 2**FRAC_W, modulo 2**(NCC+FRAC_W))
//
// so the difference of two channels' timestamps is T_fine1 + (N_cc2 - N_cc1) T_CLK - T_fine2.
//
// Timing: a hit sampled at clock edge e produces ts_valid NB + ceil(log2 NTDL) + 3 clocks
// after e (sampler 1, decoders NB, adder tree, calibrator lookup 1, output register 1), only
// once the calibrator has been calibrated (calibrated high). raw_valid / raw_code give each
// virtual-line code before calibration. The delay lines here are behavioural models of the
// carry chains (tdl_carry8); the rest is synthesizable. The structure follows the published
// architecture; the timestamp format and the hit detector are this design's choices.
`timescale 1ps/1fs
module tdc_channel
  import tdc_pkg::*;
#(
  parameter int unsigned NTDL          = 4,
  parameter decoder_e    DECODER       = DEC_SUM1S,
  parameter int unsigned NCLB          = 60,
  parameter int unsigned NB            = 9,
  parameter int unsigned NCC           = 16,
  parameter int unsigned FRAC_W        = 16,
  parameter int unsigned CAL_LOG2_HITS = 16,
  parameter int unsigned SEED          = 1,       // varies the model lines between channels
  parameter real         TAU_PS        = 5.0,     // mean tap delay of the line models
  parameter real         SPREAD        = 0.5      // relative spread of the tap delays
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          hit,          // asynchronous START or STOP
  input  logic [NCC-1:0]                coarse,       // shared coarse counter
  input  logic                          cal_start,
  output logic                          raw_valid,
  output logic [NB+tree_stages(NTDL)-1:0] raw_code,
  output logic                          ts_valid,
  output logic [NCC+FRAC_W-1:0]         ts,
  output cal_state_e                    cal_state,
  output logic                          calibrated
);

  localparam int unsigned NT   = NCLB * 8;
  localparam int unsigned N    = 2 ** NB;
  localparam int unsigned L    = tree_stages(NTDL);
  localparam int unsigned CW   = NB + L;

  // ---- delay lines (models of the carry chains) ----
  logic [NTDL-1:0][NT-1:0] taps;
  for (genvar t = 0; t < NTDL; t++) begin : g_tdl
    // Each parallel line is reached a fraction of a tap later than the one before, which
    // is what interleaves their bins.
    tdl_carry8 #(
      .NCLB        (NCLB),
      .TAU_PS      (TAU_PS),
      .SPREAD      (SPREAD),
      .IN_OFFSET_PS(TAU_PS * real'(t) / real'(NTDL)),
      .SEED        (SEED * 16 + t)
    ) u_tdl (
      .hit  (hit),
      .taps (taps[t])
    );
  end

  // ---- sampling flip-flops and hit detection ----
  logic [NTDL-1:0][NT-1:0] code;
  logic                    hit_valid;
  logic [NCC-1:0]          hit_coarse;

  tdl_sampler #(.NTDL(NTDL), .NT(NT), .NCC(NCC)) u_smp (
    .clk, .rst_n, .taps, .coarse,
    .code, .hit_valid, .hit_coarse
  );

  // ---- one decoder per line ----
  logic [NTDL-1:0]         dec_valid;
  logic [NTDL-1:0][NB-1:0] dec_bin;

  for (genvar t = 0; t < NTDL; t++) begin : g_dec
    logic [N-1:0] padded;
    assign padded = N'(code[t]);           // unused decoder inputs are zero
    if (DECODER == DEC_LOG2) begin : g_log2
      decoder_log2 #(.NB(NB)) u_dec (
        .clk, .rst_n, .in_valid(hit_valid), .in_code(padded),
        .out_valid(dec_valid[t]), .out_bin(dec_bin[t])
      );
    end else begin : g_sum1s
      decoder_sum1s #(.NB(NB)) u_dec (
        .clk, .rst_n, .in_valid(hit_valid), .in_code(padded),
        .out_valid(dec_valid[t]), .out_bin(dec_bin[t])
      );
    end
  end

  // ---- merge of the lines into the virtual line ----
  adder_tree #(.NTDL(NTDL), .W(NB)) u_add (
    .clk, .rst_n, .in_valid(&dec_valid), .in_val(dec_bin),
    .out_valid(raw_valid), .out_sum(raw_code)
  );

  // The coarse count travels alongside the decoders and the adder tree.
  logic [NB+L-1:0][NCC-1:0] coarse_pipe;
  always_ff @(posedge clk) begin
    coarse_pipe[0] <= hit_coarse;
    for (int i = 1; i < int'(NB + L); i++) coarse_pipe[i] <= coarse_pipe[i-1];
  end

  // ---- calibration and timestamp ----
  logic              cal_valid;
  logic [FRAC_W:0]   cal_fine;
  logic [NCC-1:0]    cal_coarse;

  calibrator #(
    .CODE_W(CW), .CAL_LOG2_HITS(CAL_LOG2_HITS), .FRAC_W(FRAC_W), .TAG_W(NCC)
  ) u_cal (
    .clk, .rst_n, .cal_start,
    .in_valid(raw_valid), .in_code(raw_code), .in_tag(coarse_pipe[NB+L-1]),
    .out_valid(cal_valid), .out_fine(cal_fine), .out_tag(cal_coarse),
    .state(cal_state), .calibrated
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) ts_valid <= 1'b0;
    else        ts_valid <= cal_valid;

  always_ff @(posedge clk)
    ts <= {cal_coarse, FRAC_W'(0)} - (NCC+FRAC_W)'(cal_fine);

endmodule
