// Full-size run of correlator_top with its default parameters: two sequences
// of 8000 signed 12-bit samples (1000 RAM words each), all 15999 lags.
//
// The inputs are the delayed-sinusoid test case: sampled at 1 MHz for 8 ms,
// Y is two periods of a 500 Hz sine during the first 4 ms, X is the same two
// periods 2 ms later (2000 samples), both at full scale (+-2047). Every
// result is compared with R(tau) = sum_n x(n) y(n-tau) computed here; the
// largest R must be at tau = +2000, and the correlation must take
// 1000*1001 read beats (10.01 ms at 100 MHz) plus the 5-clock pipeline.
module tb_correlator_full;
  import corr_pkg::*;

  localparam int N      = CORR_N_SAMPLES;
  localparam int LANES  = CORR_LANES;
  localparam int SW     = CORR_SAMPLE_W;
  localparam int W      = N / LANES;
  localparam int ACC_W  = 2 * SW + $clog2(N);
  localparam int TAU_W  = $clog2(N) + 1;
  localparam int DELAY  = 2000;   // samples
  localparam int PERIOD = 2000;   // samples per sine period
  localparam int EXPECT_CLKS = W * (W + 1) + 5;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                    acq_start = 1'b0, smp_valid = 1'b0;
  logic signed [SW-1:0]    smp_x = '0, smp_y = '0;
  logic                    acq_busy, busy, done, res_valid;
  slide_dir_e              res_dir;
  logic signed [TAU_W-1:0] res_tau  [LANES];
  logic signed [ACC_W-1:0] res_data [LANES];

  correlator_top dut (.*);

  int checks = 0, failures = 0;
  int xs [N], ys [N];
  longint ref_r [2*N-1];    // index tau + N - 1
  int seen [2*N-1];
  longint peak_val = 0;
  int peak_tau = 0;
  int n_right = 0, n_left = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n && res_valid) begin
      if (res_dir == SLIDE_RIGHT) n_right++; else n_left++;
      for (int g = 0; g < LANES; g++) begin
        int t;
        t = int'(res_tau[g]);
        if (t > -N && t < N) begin
          check(longint'(res_data[g]) == ref_r[t + N - 1],
                $sformatf("tau=%0d got %0d exp %0d", t, res_data[g], ref_r[t + N - 1]));
          seen[t + N - 1]++;
          if (longint'(res_data[g]) > peak_val) begin
            peak_val = longint'(res_data[g]);
            peak_tau = t;
          end
        end else begin
          check(1'b0, $sformatf("lag %0d out of range", t));
        end
      end
    end
  end

  initial begin
    int clks;
    for (int n = 0; n < N; n++) begin
      ys[n] = (n < 2 * PERIOD) ? int'(2047.0 * $sin(2.0 * 3.14159265358979 * n / PERIOD)) : 0;
      xs[n] = (n >= DELAY && n < DELAY + 2 * PERIOD) ? ys[n - DELAY] : 0;
    end
    for (int t = -(N - 1); t < N; t++) begin
      longint s;
      s = 0;
      for (int n = (t > 0 ? t : 0); n < N && n - t < N; n++) s += longint'(xs[n]) * longint'(ys[n - t]);
      ref_r[t + N - 1] = s;
      seen[t + N - 1] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk) acq_start = 1'b1;
    @(negedge clk) acq_start = 1'b0;
    for (int n = 0; n < N; n++) begin
      smp_valid = 1'b1;
      smp_x = SW'(xs[n]);
      smp_y = SW'(ys[n]);
      @(negedge clk);
    end
    smp_valid = 1'b0;
    wait (busy);
    clks = 0;
    while (!done) begin
      @(negedge clk);
      clks++;
    end
    $display("correlation: %0d clocks = %0.2f ms at 100 MHz; peak R=%0d at tau=%0d",
             clks, clks / 1.0e5, peak_val, peak_tau);
    check(clks == EXPECT_CLKS, $sformatf("took %0d clocks, expected %0d", clks, EXPECT_CLKS));
    check(peak_tau == DELAY, $sformatf("peak at tau=%0d, expected %0d", peak_tau, DELAY));
    check(n_right == W && n_left == W, "cycle counts");
    for (int t = -(N - 1); t < N; t++)
      check(seen[t + N - 1] == (t == 0 ? 2 : 1), $sformatf("lag %0d seen %0d times", t, seen[t + N - 1]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
