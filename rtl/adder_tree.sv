// adder_tree: pipelined sum of the NTDL decoder outputs of one channel. The sum is the code
// of the virtual delay line formed by the parallel lines (spatial sub-interpolation).
//
// The inputs are padded with zeros to the next power of two and added pairwise in
// ceil(log2(NTDL)) registered stages (1 stage for 2 lines, 2 for 3 or 4, 3 for 5 to 8), each
// stage one bit wider than the one before. With NTDL = 1 there is no stage and the input is
// the output.
//
// Timing: one set of inputs per clock, sum after ceil(log2(NTDL)) clocks; out_valid follows
// in_valid. The stage count follows the published architecture.
`timescale 1ps/1fs
module adder_tree
  import tdc_pkg::*;
#(
  parameter int unsigned NTDL = 4,
  parameter int unsigned W    = 9
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              in_valid,
  input  logic [NTDL-1:0][W-1:0]            in_val,
  output logic                              out_valid,
  output logic [W+tree_stages(NTDL)-1:0]    out_sum
);

  localparam int unsigned L = tree_stages(NTDL);
  localparam int unsigned P = 2 ** L;

  for (genvar l = 0; l <= L; l++) begin : g_lv
    localparam int unsigned CNT = P >> l;
    localparam int unsigned WL  = W + l;
    logic [CNT-1:0][WL-1:0] val;
    logic                   v;
    if (l == 0) begin : g_in
      always_comb begin
        val = '0;
        for (int i = 0; i < int'(NTDL); i++) val[i] = in_val[i];
      end
      assign v = in_valid;
    end else begin : g_add
      always_ff @(posedge clk)
        for (int j = 0; j < int'(CNT); j++)
          val[j] <= WL'(g_lv[l-1].val[2*j]) + WL'(g_lv[l-1].val[2*j+1]);
      always_ff @(posedge clk or negedge rst_n)
        if (!rst_n) v <= 1'b0;
        else        v <= g_lv[l-1].v;
    end
  end

  assign out_sum   = g_lv[L].val[0];
  assign out_valid = g_lv[L].v;

endmodule
