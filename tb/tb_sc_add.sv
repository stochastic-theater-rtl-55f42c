// tb_sc_add: 3-input scaled adder. Cycle by cycle the output must be the input
// picked by a round-robin pointer 0,1,2,0,... one clock earlier; and with
// random streams of densities 0.2, 0.5 and 0.8 the output density must be near
// their average, 0.5.
module tb_sc_add;
  logic clk = 1'b0, rst;
  logic [2:0] a;
  logic y;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sc_add #(.N(3)) dut (.clk, .rst, .a, .y);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ptr, ones, mism;
    logic exp_y;
    rst = 1; a = '0;
    @(posedge clk); #1; rst = 0;
    check(y == 1'b0, "output cleared");
    ptr = 0; ones = 0; mism = 0;
    for (int t = 0; t < 15000; t++) begin
      a[0] = ($urandom_range(0, 999) < 200);
      a[1] = ($urandom_range(0, 999) < 500);
      a[2] = ($urandom_range(0, 999) < 800);
      exp_y = a[ptr];
      ptr = (ptr + 1) % 3;
      @(posedge clk); #1;
      if (y != exp_y) mism++;
      ones += int'(y);
    end
    check(mism == 0, $sformatf("round-robin mismatches %0d", mism));
    check(ones > 7200 && ones < 7800, $sformatf("density %0d/15000 near 0.5", ones));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
