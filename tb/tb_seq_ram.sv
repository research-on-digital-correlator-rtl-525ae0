// Test of seq_ram at its default size (1000 words of 8 x 12 bits): fill every
// word with random data, read every word back in random order and check the
// one-clock read latency and that the output holds while `re` is low.
module tb_seq_ram;
  localparam int LANES = 8, SW = 12, NW = 1000, AW = 10;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic we = 1'b0, re = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [LANES-1:0][SW-1:0] wdata = '0, rq;

  seq_ram dut (.*);

  int checks = 0, failures = 0;
  logic [LANES*SW-1:0] model [NW];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    logic [LANES*SW-1:0] held;
    for (int a = 0; a < NW; a++) begin
      model[a] = {$urandom, $urandom, $urandom};
      @(negedge clk);
      we = 1'b1; waddr = AW'(a); wdata = model[a];
    end
    @(negedge clk) we = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      int a;
      a = int'($urandom_range(NW - 1));
      re = 1'b1; raddr = AW'(a);
      @(negedge clk);
      check(rq == model[a], $sformatf("word %0d", a));
      held = rq;
      re = 1'b0; raddr = AW'($urandom_range(NW - 1));
      @(negedge clk);
      check(rq == held, "output held while re low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
