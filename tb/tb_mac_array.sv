// Test of mac_array against the definition of correlation: two random
// sequences of 40 samples (5 words) are fed the way the correlator does,
// cycle k pairing x word a+k with y word a and the previous y word as C
// (zero on the first beat), all cycles back to back. The results of cycle k
// must equal R(8k+g) = sum_n x(n) y(n-8k-g) computed directly, arrive three
// clocks after the cycle's last beat, and carry that beat's tag.
module tb_mac_array;
  localparam int LANES = 8, SW = 12, ACC_W = 37, NW = 5, N = NW * LANES, TAG_W = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid = 1'b0, in_first = 1'b0, in_last = 1'b0;
  logic [TAG_W-1:0] in_tag = '0, res_tag;
  logic [LANES-1:0][SW-1:0] x = '0, y = '0, c = '0;
  logic signed [ACC_W-1:0] res [LANES];
  logic res_valid;

  mac_array #(.TAG_W(TAG_W)) dut (.*);

  int checks = 0, failures = 0;
  logic signed [SW-1:0] xs [N], ys [N];
  int cyc = 0, n_res = 0;
  int last_at [$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  function automatic longint ref_r(int tau);
    longint s;
    s = 0;
    for (int n = tau; n < N; n++) s += longint'(xs[n]) * longint'(ys[n - tau]);
    return s;
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && res_valid) begin
      int k, t;
      k = int'(res_tag);
      t = last_at.pop_front();
      check(cyc - t == 3, $sformatf("latency %0d", cyc - t));
      check(k == n_res, $sformatf("tag %0d, expected %0d", k, n_res));
      for (int g = 0; g < LANES; g++)
        check(longint'(res[g]) == ref_r(LANES * k + g),
              $sformatf("R(%0d) got %0d exp %0d", LANES * k + g, res[g], ref_r(LANES * k + g)));
      n_res++;
    end
  end

  initial begin
    for (int n = 0; n < N; n++) begin
      xs[n] = SW'($urandom);
      ys[n] = SW'($urandom);
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < NW; k++) begin
      for (int a = 0; a < NW - k; a++) begin
        for (int i = 0; i < LANES; i++) begin
          x[i] = xs[LANES * (a + k) + i];
          y[i] = ys[LANES * a + i];
          c[i] = (a == 0) ? '0 : ys[LANES * (a - 1) + i];
        end
        in_valid = 1'b1; in_first = (a == 0); in_last = (a == NW - 1 - k);
        in_tag = TAG_W'(k);
        if (in_last) last_at.push_back(cyc);
        @(negedge clk);
      end
    end
    in_valid = 1'b0; in_first = 1'b0; in_last = 1'b0;
    repeat (6) @(negedge clk);
    check(n_res == NW, $sformatf("%0d results", n_res));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
