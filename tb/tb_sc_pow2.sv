// tb_sc_pow2: the squarer output must be a(t) AND a(t-1) (XNOR for bipolar)
// every cycle, and for an uncorrelated stream of density 0.6 the output
// density must be near 0.36.
module tb_sc_pow2;
  logic clk = 1'b0, rst, a, yu, yb;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sc_pow2 #(.BIPOLAR(1'b0)) du (.clk, .rst, .a, .y(yu));
  sc_pow2 #(.BIPOLAR(1'b1)) db (.clk, .rst, .a, .y(yb));

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
    logic prev;
    int ones, mism;
    rst = 1; a = 0;
    @(posedge clk); #1; rst = 0;
    prev = 0; ones = 0; mism = 0;
    for (int t = 0; t < 20000; t++) begin
      a = ($urandom_range(0, 999) < 600);
      #1;
      if (yu != (a & prev)) mism++;
      if (yb != ~(a ^ prev)) mism++;
      ones += int'(yu);
      @(posedge clk); #1;
      prev = a;
    end
    check(mism == 0, $sformatf("bit mismatches %0d", mism));
    check(ones > 6800 && ones < 7600, $sformatf("density %0d/20000 near 0.36", ones));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
