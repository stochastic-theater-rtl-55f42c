// tb_sc_expr_datapath: default program. Cycle by cycle against a model of the
// node list: aux0 = i0&i1, aux1 = i2&i3&i4, func = previous-cycle pick of aux0
// or aux1 alternately; g = pick of (i0 & i0_prev & ~i1) or ~i2. Then with
// uncorrelated random streams of known density the two outputs must be near
// (i0*i1 + i2*i3*i4)/2 and (i0^2(1-i1) + 1-i2)/2.
module tb_sc_expr_datapath;
  logic clk = 1'b0, rst;
  logic [4:0] in_s;
  logic [1:0] out_s;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sc_expr_datapath dut (.clk, .rst, .in_s, .out_s);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real p [5] = '{0.9, 0.7, 0.6, 0.8, 0.5};
    real ef, eg;
    int ptr, mism, ones_f, ones_g, n;
    logic i0_prev;
    logic [1:0] e;
    rst = 1; in_s = '0;
    @(posedge clk); #1; rst = 0;
    ptr = 0; mism = 0; ones_f = 0; ones_g = 0; i0_prev = 0;
    n = 30000;
    for (int t = 0; t < n; t++) begin
      for (int i = 0; i < 5; i++) in_s[i] = ($urandom_range(0, 9999) < int'(p[i] * 10000));
      #1;
      e[0] = (ptr == 0) ? (in_s[0] & in_s[1]) : (in_s[2] & in_s[3] & in_s[4]);
      e[1] = (ptr == 0) ? (in_s[0] & i0_prev & ~in_s[1]) : ~in_s[2];
      ptr = 1 - ptr;
      i0_prev = in_s[0];
      @(posedge clk); #1;
      if (out_s != e) mism++;
      ones_f += int'(out_s[0]); ones_g += int'(out_s[1]);
    end
    ef = (p[0] * p[1] + p[2] * p[3] * p[4]) / 2.0;
    eg = (p[0] * p[0] * (1.0 - p[1]) + (1.0 - p[2])) / 2.0;
    check(mism == 0, $sformatf("cycle mismatches %0d", mism));
    check((real'(ones_f) / n - ef) < 0.02 && (ef - real'(ones_f) / n) < 0.02,
          $sformatf("func %f expected %f", real'(ones_f) / n, ef));
    check((real'(ones_g) / n - eg) < 0.02 && (eg - real'(ones_g) / n) < 0.02,
          $sformatf("g %f expected %f", real'(ones_g) / n, eg));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
