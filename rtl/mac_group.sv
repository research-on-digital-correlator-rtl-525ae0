// One multiplier group of the correlator: LANES multipliers, an adder that
// sums their products, and an accumulator.
//
// The group computes one lag of the correlation, the lag SHIFT of the
// current cycle. Every beat brings one word of the leading sequence x[0..7],
// the current word of the sliding sequence y[0..7] and register C, which holds
// the previous word of the sliding sequence (zero at the start of a cycle).
// Multiplier i pairs x[i] with the sliding sequence moved SHIFT places to the
// right: with y[i-SHIFT] when i >= SHIFT, otherwise with C[LANES+i-SHIFT],
// i.e. the sample that slid in from the previous word. This operand rule is
// the source design's (shown there for SHIFT = 0, 1 and 2).
//
// Timing (this implementation's choice): products are registered, the sum is
// registered, then accumulated, so a beat presented at clock t reaches the
// accumulator at the edge ending clock t+2. The first beat of a cycle
// (`in_first`) loads the accumulator instead of adding. `acc_valid` is high
// for one clock, three clocks after the beat marked `in_last`, while `acc`
// holds the finished lag; the accumulator can take the next cycle's first
// beat in the following clock, so cycles run back to back.
module mac_group
  import corr_pkg::*;
#(
  parameter int unsigned LANES    = corr_pkg::CORR_LANES,
  parameter int unsigned SAMPLE_W = corr_pkg::CORR_SAMPLE_W,
  parameter int unsigned ACC_W    = corr_pkg::CORR_ACC_W,
  parameter int unsigned SHIFT    = 0,   // slide of this group, 0 .. LANES-1
  localparam int unsigned PROD_W  = 2 * SAMPLE_W,
  localparam int unsigned SUM_W   = PROD_W + $clog2(LANES)
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           in_valid,
  input  logic                           in_first,   // first beat of a cycle
  input  logic                           in_last,    // last beat of a cycle
  input  logic [LANES-1:0][SAMPLE_W-1:0] x,          // leading sequence word
  input  logic [LANES-1:0][SAMPLE_W-1:0] y,          // sliding sequence word
  input  logic [LANES-1:0][SAMPLE_W-1:0] c,          // previous sliding word (register C)
  output logic signed [ACC_W-1:0]        acc,
  output logic                           acc_valid
);

  // Operands of the multipliers: the sliding sequence moved SHIFT places right.
  logic [LANES-1:0][SAMPLE_W-1:0] w;
  always_comb begin
    for (int i = 0; i < LANES; i++) begin
      if (i >= int'(SHIFT)) w[i] = y[i - SHIFT];
      else            w[i] = c[LANES + i - SHIFT];
    end
  end

  // Stage 1: LANES multipliers.
  logic signed [PROD_W-1:0] prod [LANES];
  logic p_valid, p_first, p_last;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LANES; i++) prod[i] <= '0;
      p_valid <= 1'b0;
      p_first <= 1'b0;
      p_last  <= 1'b0;
    end else begin
      for (int i = 0; i < LANES; i++) prod[i] <= $signed(x[i]) * $signed(w[i]);
      p_valid <= in_valid;
      p_first <= in_first;
      p_last  <= in_last;
    end
  end

  // Stage 2: adder over the group's products.
  logic signed [SUM_W-1:0] sum_c, sum;
  logic s_valid, s_first, s_last;
  always_comb begin
    sum_c = '0;
    for (int i = 0; i < LANES; i++) sum_c += SUM_W'(prod[i]);
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum     <= '0;
      s_valid <= 1'b0;
      s_first <= 1'b0;
      s_last  <= 1'b0;
    end else begin
      sum     <= sum_c;
      s_valid <= p_valid;
      s_first <= p_first;
      s_last  <= p_last;
    end
  end

  // Stage 3: accumulator.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      acc_valid <= 1'b0;
    end else begin
      acc_valid <= s_valid && s_last;
      if (s_valid) acc <= s_first ? ACC_W'(sum) : acc + ACC_W'(sum);
    end
  end

  initial assert (SHIFT < LANES) else $error("mac_group: SHIFT must be below LANES");

endmodule
