// Parallel multiply-accumulate array: LANES multiplier groups (8 groups of
// 8 multipliers, 64 multipliers and 8 accumulators in the reference
// configuration), group g computing lag base+g of the current cycle.
//
// All groups receive the same three words per beat: the leading-sequence
// word, the sliding-sequence word and register C. Each group applies its own
// slide (mac_group SHIFT = g), so one beat adds LANES products to each of
// LANES lags. When the beat marked `in_last` has been accumulated, `res_valid`
// is high for one clock with the LANES finished lags on `res` (res[g] is lag
// base+g of the cycle) and `res_tag` returns the `in_tag` that came with that
// last beat, so the caller can label the results. Latency from a beat to its
// result is LATENCY = 3 clocks; beats can be issued every clock, across cycle
// boundaries as well. The grouping follows the source design; the tag and the
// pipeline depth are this implementation's.
module mac_array
  import corr_pkg::*;
#(
  parameter int unsigned LANES    = corr_pkg::CORR_LANES,
  parameter int unsigned SAMPLE_W = corr_pkg::CORR_SAMPLE_W,
  parameter int unsigned ACC_W    = corr_pkg::CORR_ACC_W,
  parameter int unsigned TAG_W    = 1
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           in_valid,
  input  logic                           in_first,
  input  logic                           in_last,
  input  logic [TAG_W-1:0]               in_tag,
  input  logic [LANES-1:0][SAMPLE_W-1:0] x,
  input  logic [LANES-1:0][SAMPLE_W-1:0] y,
  input  logic [LANES-1:0][SAMPLE_W-1:0] c,
  output logic signed [ACC_W-1:0]        res [LANES],
  output logic                           res_valid,
  output logic [TAG_W-1:0]               res_tag
);

  localparam int unsigned LATENCY = 3;   // equals mac_group's pipeline depth

  logic [LANES-1:0] grp_valid;

  for (genvar g = 0; g < LANES; g++) begin : g_grp
    mac_group #(
      .LANES(LANES), .SAMPLE_W(SAMPLE_W), .ACC_W(ACC_W), .SHIFT(g)
    ) u_grp (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (in_valid),
      .in_first (in_first),
      .in_last  (in_last),
      .x        (x),
      .y        (y),
      .c        (c),
      .acc      (res[g]),
      .acc_valid(grp_valid[g])
    );
  end

  // The tag travels beside the groups' pipelines.
  logic [TAG_W-1:0] tag_pipe [LATENCY];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < LATENCY; s++) tag_pipe[s] <= '0;
    end else begin
      tag_pipe[0] <= in_tag;
      for (int s = 1; s < LATENCY; s++) tag_pipe[s] <= tag_pipe[s-1];
    end
  end

  assign res_valid = grp_valid[0];
  assign res_tag   = tag_pipe[LATENCY-1];

  // All groups see the same control, so they finish together.
  a_groups_in_step: assert property (@(posedge clk) disable iff (!rst_n)
    grp_valid == {LANES{grp_valid[0]}})
    else $error("mac_array: groups out of step");

endmodule
