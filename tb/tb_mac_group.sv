// Test of mac_group for shifts 0, 1, 2 and 7: random x, y and C words in
// cycles of random length (1 to 5 beats, sometimes with idle clocks between
// beats, sometimes back to back). For each cycle the expected result is
// the sum over its beats of x[i] * z[8+i-SHIFT], where z is the 16-sample
// window {C, y} (z[0..7] = C, z[8..15] = y), i.e. the sliding word moved SHIFT
// places right. The result must appear exactly three clocks after the last
// beat, for one clock.
module tb_mac_group;
  localparam int LANES = 8, SW = 12, ACC_W = 37;
  localparam int NG = 4;
  localparam int SHIFTS [NG] = '{0, 1, 2, 7};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid = 1'b0, in_first = 1'b0, in_last = 1'b0;
  logic [LANES-1:0][SW-1:0] x = '0, y = '0, c = '0;
  logic signed [ACC_W-1:0] acc [NG];
  logic [NG-1:0] acc_valid;

  for (genvar j = 0; j < NG; j++) begin : g_dut
    mac_group #(.LANES(LANES), .SAMPLE_W(SW), .ACC_W(ACC_W), .SHIFT(SHIFTS[j])) dut (
      .clk, .rst_n, .in_valid, .in_first, .in_last, .x, .y, .c,
      .acc(acc[j]), .acc_valid(acc_valid[j]));
  end

  int checks = 0, failures = 0;
  longint expq [NG][$];
  int cyc = 0;
  int last_at [$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && acc_valid != '0) begin
      check(acc_valid == '1, "groups finish together");
      check(last_at.size() > 0, "unexpected result");
      if (last_at.size() > 0) begin
        int t;
        t = last_at.pop_front();
        check(cyc - t == 3, $sformatf("latency %0d", cyc - t));
        for (int j = 0; j < NG; j++) begin
          longint e;
          e = expq[j].pop_front();
          check(longint'(acc[j]) == e, $sformatf("shift %0d got %0d exp %0d", SHIFTS[j], acc[j], e));
        end
      end
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 200; r++) begin
      longint e [NG];
      int beats;
      beats = int'($urandom_range(1, 5));
      for (int j = 0; j < NG; j++) e[j] = 0;
      for (int b = 0; b < beats; b++) begin
        logic signed [SW-1:0] z [16];
        if ($urandom_range(3) == 0) begin
          in_valid = 1'b0; in_first = 1'b0; in_last = 1'b0;
          x = {$urandom, $urandom, $urandom};   // junk on idle clocks
          @(negedge clk);
        end
        x = {$urandom, $urandom, $urandom};
        y = {$urandom, $urandom, $urandom};
        c = {$urandom, $urandom, $urandom};
        for (int i = 0; i < LANES; i++) begin
          z[i] = c[i];
          z[8 + i] = y[i];
        end
        for (int j = 0; j < NG; j++)
          for (int i = 0; i < LANES; i++)
            e[j] += longint'($signed(x[i])) * longint'(z[8 + i - SHIFTS[j]]);
        in_valid = 1'b1; in_first = (b == 0); in_last = (b == beats - 1);
        if (in_last) begin
          for (int j = 0; j < NG; j++) expq[j].push_back(e[j]);
          last_at.push_back(cyc);
        end
        @(negedge clk);
      end
    end
    in_valid = 1'b0; in_first = 1'b0; in_last = 1'b0;
    repeat (6) @(negedge clk);
    check(last_at.size() == 0, "results missing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
