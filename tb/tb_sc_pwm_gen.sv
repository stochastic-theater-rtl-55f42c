// tb_sc_pwm_gen: the PWM output must repeat with a period of 16 clocks and be
// high for 8 of them (defaults), and for 3 of 10 with other parameters.
module tb_sc_pwm_gen;
  logic clk = 1'b0, rst, p16, p10;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sc_pwm_gen                          d16 (.clk, .rst, .pwm_out(p16));
  sc_pwm_gen #(.PERIOD(10), .HIGH(3)) d10 (.clk, .rst, .pwm_out(p10));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic h16 [160];
    int hi16, hi10;
    rst = 1; @(posedge clk); #1; rst = 0;
    hi16 = 0; hi10 = 0;
    for (int t = 0; t < 160; t++) begin
      @(posedge clk); #1;
      h16[t] = p16;
      hi16 += int'(p16); hi10 += int'(p10);
    end
    check(hi16 == 80, $sformatf("16-period high count %0d", hi16));
    check(hi10 == 48, $sformatf("10-period high count %0d", hi10));
    for (int t = 16; t < 160; t++) check(h16[t] == h16[t - 16], "period 16");
    for (int t = 0; t < 16; t++)   check(h16[t] == (t < 8), $sformatf("duty shape t=%0d", t));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
