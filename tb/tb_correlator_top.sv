// End-to-end test of correlator_top at a reduced size (N = 96 samples, 12
// words; every structure is as at full size, only the RAM depth differs).
//
// Two acquisitions are run back to back with different random sequences.
// Samples are fed with random gaps in smp_valid. Every result is compared with
// R(tau) = sum_n x(n) y(n-tau) computed here directly from the samples, each
// lag -(N-1)..N-1 must appear exactly once (tau = 0 once per direction), and
// the time from the start of the correlation to `done` must be W*(W+1) read
// beats plus the fixed pipeline latency. The test also counts the mechanisms
// of the design and fails if any never happened: gaps during acquisition,
// register C cleared at a cycle boundary, right- and left-slide cycles, a
// one-beat cycle, results in consecutive clocks (back-to-back cycles) and an
// acq_start ignored while a correlation runs. All of them are seen from the
// ports, so the test needs nothing inside the design.
module tb_correlator_top;
  import corr_pkg::*;

  localparam int N      = 96;
  localparam int LANES  = 8;
  localparam int SW     = 12;
  localparam int W      = N / LANES;
  localparam int ACC_W  = 2 * SW + $clog2(N);
  localparam int TAU_W  = $clog2(N) + 1;
  // Clocks from the rise of busy to the rise of done: one read beat per clock,
  // then RAM read, multiply, add and accumulate, and the done register.
  localparam int EXPECT_CLKS = W * (W + 1) + 5;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                    acq_start = 1'b0, smp_valid = 1'b0;
  logic signed [SW-1:0]    smp_x = '0, smp_y = '0;
  logic                    acq_busy, busy, done, res_valid;
  slide_dir_e              res_dir;
  logic signed [TAU_W-1:0] res_tau  [LANES];
  logic signed [ACC_W-1:0] res_data [LANES];

  correlator_top #(.LANES(LANES), .SAMPLE_W(SW), .N_SAMPLES(N)) dut (.*);

  int checks = 0, failures = 0;
  int xs [N], ys [N];
  int seen_r [N], seen_l [N];

  // mechanism counters
  int n_gaps, n_cclear, n_right, n_left, n_onebeat, n_b2b, n_ignored;
  logic prev_res_valid = 1'b0;

  function automatic longint ref_r(int tau);
    longint s = 0;
    for (int n = 0; n < N; n++)
      if (n - tau >= 0 && n - tau < N) s += longint'(xs[n]) * longint'(ys[n - tau]);
    return s;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // Result monitor
  always @(posedge clk) begin
    if (rst_n && res_valid) begin
      if (prev_res_valid) n_b2b++;
      if (res_dir == SLIDE_RIGHT) n_right++; else n_left++;
      for (int g = 0; g < LANES; g++) begin
        int t;
        t = int'(res_tau[g]);
        check(longint'(res_data[g]) == ref_r(t),
              $sformatf("tau=%0d got %0d exp %0d", t, res_data[g], ref_r(t)));
        if (res_dir == SLIDE_RIGHT) begin
          check(t >= 0 && t < N, $sformatf("right lag %0d out of range", t));
          if (t >= 0 && t < N) seen_r[t]++;
        end else begin
          check(t <= 0 && t > -N, $sformatf("left lag %0d out of range", t));
          if (t <= 0 && t > -N) seen_l[-t]++;
        end
      end
    end
    // A cycle other than the first of a pass only gives correct lags g > 0
    // if register C was cleared at the boundary before it; the last cycle
    // of a pass is a single beat.
    if (rst_n && res_valid && res_tau[0] != 0) n_cclear++;
    if (rst_n && res_valid && (res_tau[0] == TAU_W'(LANES * (W - 1)) || res_tau[0] == -TAU_W'(LANES * (W - 1))))
      n_onebeat++;
    prev_res_valid <= res_valid;
  end

  task automatic run_once(int seed_mode);
    int clks;
    for (int i = 0; i < N; i++) begin
      seen_r[i] = 0;
      seen_l[i] = 0;
      if (seed_mode == 0) begin
        xs[i] = int'($urandom_range(4095)) - 2048;
        ys[i] = int'($urandom_range(4095)) - 2048;
      end else begin
        // extreme values to exercise the accumulator width
        xs[i] = ($urandom_range(1) != 0) ? -2048 : 2047;
        ys[i] = ($urandom_range(1) != 0) ? -2048 : 2047;
      end
    end
    @(negedge clk) acq_start = 1'b1;
    @(negedge clk) acq_start = 1'b0;
    for (int i = 0; i < N; i++) begin
      while ($urandom_range(3) == 0) begin
        smp_valid = 1'b0;
        if (i % LANES != 0) n_gaps++;
        @(negedge clk);
      end
      smp_valid = 1'b1;
      smp_x = SW'(xs[i]);
      smp_y = SW'(ys[i]);
      @(negedge clk);
    end
    smp_valid = 1'b0;
    wait (busy);
    clks = 0;
    while (!done) begin
      @(negedge clk);
      clks++;
      if (clks == 10) begin
        acq_start = 1'b1;             // must be ignored while computing
        @(negedge clk);
        clks++;
        acq_start = 1'b0;
        if (!acq_busy) n_ignored++;
      end
    end
    check(clks == EXPECT_CLKS, $sformatf("correlation took %0d clocks, expected %0d", clks, EXPECT_CLKS));
    $display("correlation of %0d samples: %0d clocks (%0d read beats)", N, clks, W * (W + 1));
    for (int t = 0; t < N; t++) begin
      check(seen_r[t] == 1, $sformatf("right lag %0d seen %0d times", t, seen_r[t]));
      check(seen_l[t] == 1, $sformatf("left lag %0d seen %0d times", -t, seen_l[t]));
    end
    repeat (3) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    run_once(0);
    run_once(1);
    $display("mechanisms: gaps=%0d c_clear=%0d right_cycles=%0d left_cycles=%0d one_beat=%0d back_to_back=%0d ignored_start=%0d",
             n_gaps, n_cclear, n_right, n_left, n_onebeat, n_b2b, n_ignored);
    check(n_gaps > 0,      "no acquisition gap");
    check(n_cclear > 0,    "register C never cleared at a cycle boundary");
    check(n_right == 2 * W, "right-slide cycle count");
    check(n_left == 2 * W,  "left-slide cycle count");
    check(n_onebeat > 0,   "no one-beat cycle");
    check(n_b2b > 0,       "no back-to-back results");
    check(n_ignored > 0,   "no ignored acq_start");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
