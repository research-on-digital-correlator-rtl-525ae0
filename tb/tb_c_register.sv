// Test of c_register: zero after reset, loads on `load`, holds otherwise,
// and `clear` empties it even when `load` is high in the same clock.
module tb_c_register;
  localparam int LANES = 8, SW = 12;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic clear = 1'b0, load = 1'b0;
  logic [LANES-1:0][SW-1:0] d = '0, q;

  c_register dut (.*);

  int checks = 0, failures = 0;
  logic [LANES-1:0][SW-1:0] model;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    d = {$urandom, $urandom, $urandom};
    @(negedge clk);
    check(q == '0, "zero in reset");
    rst_n = 1'b1;
    model = '0;
    for (int i = 0; i < 500; i++) begin
      d     = {$urandom, $urandom, $urandom};
      clear = ($urandom_range(4) == 0);
      load  = ($urandom_range(1) == 1);
      @(negedge clk);
      if (clear)     model = '0;
      else if (load) model = d;
      check(q == model, $sformatf("step %0d clear=%0b load=%0b", i, clear, load));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
