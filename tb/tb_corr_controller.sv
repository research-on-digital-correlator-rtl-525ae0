// Test of corr_controller with 6 words: the issued beats must be exactly,
// in this order, for the right slide and then the left slide, cycles
// k = 0..5 with beats a = 0..5-k reading leading word a+k and sliding word a,
// with first/last marking each cycle and final only on the very last beat,
// one beat per clock without gaps (6*7 = 42 clocks). A start while busy must
// be ignored, and a second start afterwards must repeat the schedule.
module tb_corr_controller;
  import corr_pkg::*;
  localparam int NW = 6, AW = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start = 1'b0;
  logic busy, rd_en, first, last, final_beat;
  logic [AW-1:0] addr_lead, addr_slide, blk;
  slide_dir_e dir;

  corr_controller #(.N_WORDS(NW)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  task automatic run_schedule();
    int beats = 0;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    for (int d = 0; d < 2; d++)
      for (int k = 0; k < NW; k++)
        for (int a = 0; a < NW - k; a++) begin
          check(rd_en && busy, "beat issued");
          check(int'(addr_lead) == a + k && int'(addr_slide) == a,
                $sformatf("d%0d k%0d a%0d: addresses %0d/%0d", d, k, a, addr_lead, addr_slide));
          check(int'(dir) == d && int'(blk) == k, "direction and cycle index");
          check(first == (a == 0) && last == (a == NW - 1 - k), "first/last");
          check(final_beat == (d == 1 && k == NW - 1), "final");
          beats++;
          if (beats == 5) start = 1'b1;   // ignored while busy
          @(negedge clk);
          start = 1'b0;
        end
    check(beats == NW * (NW + 1), "beat count");
    check(!busy && !rd_en, "idle after final beat");
    repeat (3) @(negedge clk);
    check(!busy, "stays idle");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!busy && !rd_en, "idle after reset");
    run_schedule();
    run_schedule();
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
