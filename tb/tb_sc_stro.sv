// tb_sc_stro: the oscillator must stay low while disabled, and when enabled
// its periods must lie within 2*(STAGES*STAGE_PS -+ JITTER_PS); two instances
// with different seeds must not toggle in step.
module tb_sc_stro;
  logic en;
  logic c1, c2;
  int checks = 0, failures = 0;

  sc_stro #(.STAGES(5), .STAGE_PS(200), .JITTER_PS(50), .SEED(1)) o1 (.en, .clk_out(c1));
  sc_stro #(.STAGES(5), .STAGE_PS(200), .JITTER_PS(50), .SEED(2)) o2 (.en, .clk_out(c2));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int edges1 = 0, edges2 = 0;
  time last1 = 0, minp = 0, maxp = 0;
  always @(posedge c1) begin
    if (edges1 > 0) begin
      if (minp == 0 || $time - last1 < minp) minp = $time - last1;
      if ($time - last1 > maxp) maxp = $time - last1;
    end
    last1 = $time;
    edges1++;
  end
  always @(posedge c2) edges2++;

  initial begin
    int same;
    en = 0;
    #5000;
    check(edges1 == 0 && c1 == 0, "no clock while disabled");
    en = 1;
    same = 0;
    for (int i = 0; i < 200; i++) begin
      #100;
      if (c1 == c2) same++;
    end
    #500000;
    check(edges1 > 200 && edges2 > 200, $sformatf("running: %0d and %0d edges", edges1, edges2));
    check(minp >= 1800 && maxp <= 2200, $sformatf("period %0t..%0t", minp, maxp));
    check(maxp > minp, "period jitters");
    check(same < 200, "instances differ");
    en = 0;
    #5000;
    edges1 = 0;
    #10000;
    check(edges1 == 0, "stops when disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
