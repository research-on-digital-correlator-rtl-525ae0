// Test of sample_packer with 4 words of 8 lanes: random samples with random
// gaps in smp_valid; every write must carry the right eight samples of both
// channels in sampling order (lane n = sample 8a+n) at address a, exactly
// N_WORDS writes must occur, `done` must pulse with the last write, and
// samples offered after the end must be ignored. A second acquisition after
// a new `start` must restart at address 0.
module tb_sample_packer;
  localparam int LANES = 8, SW = 12, NW = 4, AW = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start = 1'b0, smp_valid = 1'b0;
  logic signed [SW-1:0] smp_x = '0, smp_y = '0;
  logic we, busy, done;
  logic [AW-1:0] waddr;
  logic [LANES-1:0][SW-1:0] wdata_x, wdata_y;

  sample_packer #(.LANES(LANES), .SAMPLE_W(SW), .N_WORDS(NW)) dut (.*);

  int checks = 0, failures = 0;
  logic [SW-1:0] xs [NW*LANES], ys [NW*LANES];
  int n_writes, n_done;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) begin
    if (rst_n && we) begin
      n_writes++;
      for (int i = 0; i < LANES; i++) begin
        check(wdata_x[i] == xs[waddr*LANES + i], $sformatf("x word %0d lane %0d got %h exp %h t=%0t", waddr, i, wdata_x[i], xs[waddr*LANES + i], $time));
        check(wdata_y[i] == ys[waddr*LANES + i], $sformatf("y word %0d lane %0d", waddr, i));
      end
      check(int'(waddr) == n_writes - 1, $sformatf("write %0d went to address %0d", n_writes - 1, waddr));
      check(done == (int'(waddr) == NW - 1), "done with last write only");
    end
    if (rst_n && done) n_done++;
  end

  task automatic acquire();
    n_writes = 0;
    n_done = 0;
    for (int i = 0; i < NW*LANES; i++) begin
      xs[i] = SW'($urandom);
      ys[i] = SW'($urandom);
    end
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    check(busy, "busy after start");
    for (int i = 0; i < NW*LANES; i++) begin
      while ($urandom_range(2) == 0) begin smp_valid = 1'b0; @(negedge clk); end
      smp_valid = 1'b1;
      smp_x = xs[i];
      smp_y = ys[i];
      @(negedge clk);
    end
    // extra samples after the end are ignored
    smp_x = '1;
    repeat (10) @(negedge clk);
    smp_valid = 1'b0;
    check(!busy, "busy dropped at the end");
    check(n_writes == NW, $sformatf("%0d writes", n_writes));
    check(n_done == 1, $sformatf("%0d done pulses", n_done));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    acquire();
    acquire();
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
