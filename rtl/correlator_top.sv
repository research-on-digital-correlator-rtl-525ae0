// Parallel-slide cross-correlator for two long sampled sequences.
//
// Computes R(tau) = sum_n x(n) * y(n - tau) for every lag tau = -(N-1) ..
// N-1 of two N-sample sequences (N = 8000 signed 12-bit samples in the
// reference configuration). Instead of one multiplier per lag, or one
// sample per RAM read, each RAM word holds eight consecutive samples, and a
// 64-multiplier array works on a whole word of each sequence per clock: eight
// groups of eight multipliers each advance a different lag by eight products.
// A register C holding the previous word of the sliding sequence lets every
// group see the sliding sequence at its own offset without unaligned reads.
//
// Operation:
//  1. `acq_start`, then N samples on `smp_x`/`smp_y` with `smp_valid` (the
//     outputs of the dual A/D converter). sample_packer writes them eight to
//     a word into RAM1 (X) and RAM2 (Y) as they arrive; `acq_busy` is high
//     meanwhile.
//  2. When the last word is written the correlation starts by itself
//     (`busy` high). corr_controller reads one word pair per clock; beats run
//     with X leading (tau >= 0), then with the RAM roles swapped (tau <= 0).
//  3. At the end of each cycle the eight finished lags appear for one clock
//     on `res_data` with `res_valid`; `res_tau[g]` is the lag of `res_data[g]`
//     and `res_dir` the direction. tau = 0 is produced by both directions.
//     `done` rises with the last results and stays high until the next
//     `acq_start`.
//
// Timing: with W = N/8 words, the correlation takes W*(W+1) clocks of read
// beats (1,001,000 at the reference size, 10.01 ms at 100 MHz) plus a
// 4-clock pipeline (RAM read, multiply, add, accumulate). Results are not
// back-pressured. The algorithm, the sizes and the RAM organisation follow
// the source design; the port protocol, the pipeline and the way negative
// lags reuse the datapath by swapping the RAMs are this implementation's.
// The clock is the 100 MHz system clock (a PLL outside this module).
module correlator_top
  import corr_pkg::*;
#(
  parameter int unsigned LANES     = corr_pkg::CORR_LANES,
  parameter int unsigned SAMPLE_W  = corr_pkg::CORR_SAMPLE_W,
  parameter int unsigned N_SAMPLES = corr_pkg::CORR_N_SAMPLES,
  localparam int unsigned N_WORDS  = N_SAMPLES / LANES,
  localparam int unsigned AW       = (N_WORDS > 1) ? $clog2(N_WORDS) : 1,
  localparam int unsigned ACC_W    = 2 * SAMPLE_W + $clog2(N_SAMPLES),
  localparam int unsigned TAU_W    = $clog2(N_SAMPLES) + 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // acquisition
  input  logic                       acq_start,
  input  logic                       smp_valid,
  input  logic signed [SAMPLE_W-1:0] smp_x,
  input  logic signed [SAMPLE_W-1:0] smp_y,
  output logic                       acq_busy,
  // correlation
  output logic                       busy,
  output logic                       done,
  output logic                       res_valid,
  output slide_dir_e                 res_dir,
  output logic signed [TAU_W-1:0]    res_tau  [LANES],
  output logic signed [ACC_W-1:0]    res_data [LANES]
);

  typedef logic [LANES-1:0][SAMPLE_W-1:0] word_t;

  // ---------------------------------------------------------------- acquisition
  logic          computing;
  logic          wr_en, acq_done;
  logic [AW-1:0] wr_addr;
  word_t         wr_x, wr_y;

  sample_packer #(.LANES(LANES), .SAMPLE_W(SAMPLE_W), .N_WORDS(N_WORDS)) u_packer (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (acq_start && !computing),
    .smp_valid(smp_valid),
    .smp_x    (smp_x),
    .smp_y    (smp_y),
    .we       (wr_en),
    .waddr    (wr_addr),
    .wdata_x  (wr_x),
    .wdata_y  (wr_y),
    .busy     (acq_busy),
    .done     (acq_done)
  );

  // ---------------------------------------------------------------- sequencing
  logic          rd_en, b_first, b_last, b_final;
  logic [AW-1:0] addr_lead, addr_slide, b_blk;
  slide_dir_e    b_dir;
  logic          ctrl_busy;

  corr_controller #(.N_WORDS(N_WORDS)) u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (acq_done),
    .busy      (ctrl_busy),
    .rd_en     (rd_en),
    .addr_lead (addr_lead),
    .addr_slide(addr_slide),
    .dir       (b_dir),
    .blk       (b_blk),
    .first     (b_first),
    .last      (b_last),
    .final_beat(b_final)
  );

  // ---------------------------------------------------------------- RAM1 / RAM2
  // Right slide: X (RAM1) leads. Left slide: Y (RAM2) leads.
  logic [AW-1:0] ram1_raddr, ram2_raddr;
  word_t         ram1_q, ram2_q;
  assign ram1_raddr = (b_dir == SLIDE_RIGHT) ? addr_lead  : addr_slide;
  assign ram2_raddr = (b_dir == SLIDE_RIGHT) ? addr_slide : addr_lead;

  seq_ram #(.LANES(LANES), .SAMPLE_W(SAMPLE_W), .N_WORDS(N_WORDS)) u_ram1 (
    .clk(clk), .we(wr_en), .waddr(wr_addr), .wdata(wr_x),
    .re(rd_en), .raddr(ram1_raddr), .rq(ram1_q)
  );

  seq_ram #(.LANES(LANES), .SAMPLE_W(SAMPLE_W), .N_WORDS(N_WORDS)) u_ram2 (
    .clk(clk), .we(wr_en), .waddr(wr_addr), .wdata(wr_y),
    .re(rd_en), .raddr(ram2_raddr), .rq(ram2_q)
  );

  // Beat control, delayed by the RAM read latency.
  logic          d_valid, d_first, d_last, d_final;
  slide_dir_e    d_dir;
  logic [AW-1:0] d_blk;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_valid <= 1'b0;
      d_first <= 1'b0;
      d_last  <= 1'b0;
      d_final <= 1'b0;
      d_dir   <= SLIDE_RIGHT;
      d_blk   <= '0;
    end else begin
      d_valid <= rd_en;
      d_first <= b_first;
      d_last  <= b_last;
      d_final <= b_final;
      d_dir   <= b_dir;
      d_blk   <= b_blk;
    end
  end

  word_t lead_w, slide_w, c_w;
  assign lead_w  = (d_dir == SLIDE_RIGHT) ? ram1_q : ram2_q;
  assign slide_w = (d_dir == SLIDE_RIGHT) ? ram2_q : ram1_q;

  // ---------------------------------------------------------------- register C
  c_register #(.LANES(LANES), .SAMPLE_W(SAMPLE_W)) u_creg (
    .clk  (clk),
    .rst_n(rst_n),
    .clear(acq_done || (d_valid && d_last)),
    .load (d_valid),
    .d    (slide_w),
    .q    (c_w)
  );

  // ---------------------------------------------------------------- MAC array
  localparam int unsigned TAG_W = 2 + AW;   // {final, dir, cycle index}
  logic [TAG_W-1:0]       r_tag;
  logic                   r_valid, r_final;
  slide_dir_e             r_dir;
  logic [AW-1:0]          r_blk;
  logic signed [ACC_W-1:0] r_data [LANES];

  mac_array #(.LANES(LANES), .SAMPLE_W(SAMPLE_W), .ACC_W(ACC_W), .TAG_W(TAG_W)) u_mac (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (d_valid),
    .in_first (d_first),
    .in_last  (d_last),
    .in_tag   ({d_final, d_dir, d_blk}),
    .x        (lead_w),
    .y        (slide_w),
    .c        (c_w),
    .res      (r_data),
    .res_valid(r_valid),
    .res_tag  (r_tag)
  );
  assign {r_final, r_dir, r_blk} = r_tag;

  // ---------------------------------------------------------------- results
  assign res_valid = r_valid;
  assign res_dir   = r_dir;
  always_comb begin
    for (int g = 0; g < LANES; g++) begin
      res_data[g] = r_data[g];
      if (r_dir == SLIDE_RIGHT) res_tau[g] = TAU_W'(LANES * r_blk + g);
      else                      res_tau[g] = -TAU_W'(LANES * r_blk + g);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      computing <= 1'b0;
      done      <= 1'b0;
    end else begin
      if (acq_start && !computing) done <= 1'b0;
      if (acq_done) computing <= 1'b1;
      if (r_valid && r_final) begin
        computing <= 1'b0;
        done      <= 1'b1;
      end
    end
  end
  assign busy = computing;

  initial assert (N_SAMPLES % LANES == 0)
    else $error("correlator_top: N_SAMPLES must be a multiple of LANES");

  // The correlation must not start while a previous one still runs.
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
    acq_done |-> !ctrl_busy)
    else $error("correlator_top: acquisition finished during a correlation");

endmodule
