// tb_sc_lfsr: checks the LFSR against a separately written model of the
// x^9 + x^5 + 1 and x^4 + x^3 + 1 registers, its full period of 2^W-1 states
// with no state repeated early, seed loading and the zero-seed guard.
module tb_sc_lfsr;
  logic clk = 1'b0, rst, load, en;
  logic [8:0] seed9, st9;
  logic [3:0] seed4, st4;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sc_lfsr #(.W(9)) dut9 (.clk, .rst, .load, .en, .seed(seed9), .state(st9));
  sc_lfsr #(.W(4)) dut4 (.clk, .rst, .load, .en, .seed(seed4), .state(st4));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [8:0] m9;
    logic [3:0] m4;
    bit seen9 [512];
    bit seen4 [16];
    int first_rep9, first_rep4;
    rst = 1; load = 0; en = 0; seed9 = 9'h0A5; seed4 = 4'h9;
    @(posedge clk); #1;
    check(st9 == 9'h0A5 && st4 == 4'h9, "reset loads seed");
    rst = 0; en = 1;
    m9 = 9'h0A5; m4 = 4'h9;
    for (int i = 0; i < 512; i++) seen9[i] = 0;
    for (int i = 0; i < 16; i++)  seen4[i] = 0;
    seen9[m9] = 1; seen4[m4] = 1;
    first_rep9 = -1; first_rep4 = -1;
    for (int t = 1; t <= 511; t++) begin
      @(posedge clk); #1;
      m9 = {m9[7:0], m9[8] ^ m9[4]};
      m4 = {m4[2:0], m4[3] ^ m4[2]};
      if (st9 != m9) begin failures++; $display("FAIL: W=9 step %0d %h != %h", t, st9, m9); end
      if (t <= 15 && st4 != m4) begin failures++; $display("FAIL: W=4 step %0d", t); end
      if (seen9[st9] && first_rep9 < 0) first_rep9 = t;
      seen9[st9] = 1;
      if (t <= 15) begin
        if (seen4[st4] && first_rep4 < 0) first_rep4 = t;
        seen4[st4] = 1;
      end
      check(st9 != 0, "W=9 never zero");
    end
    check(first_rep9 == 511, $sformatf("W=9 period 511 (first repeat %0d)", first_rep9));
    check(first_rep4 == 15, $sformatf("W=4 period 15 (first repeat %0d)", first_rep4));
    // Hold when not enabled.
    en = 0; m9 = st9;
    repeat (3) @(posedge clk); #1;
    check(st9 == m9, "holds while en low");
    // Load, and zero seed replaced by 1.
    seed9 = 9'd0; load = 1;
    @(posedge clk); #1;
    check(st9 == 9'd1, "zero seed becomes 1");
    seed9 = 9'h1FF;
    @(posedge clk); #1;
    check(st9 == 9'h1FF, "load takes seed");
    load = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
