// tb_sc_bin2sto: over one full LFSR period a value v must give exactly v-1
// ones (the pseudo-random number runs through 1..2^W-1 once and the output is
// 1 when it is below v), for several values and two widths, independent of the
// seed. Also checks the bit-by-bit rule against a model of the generator.
module tb_sc_bin2sto;
  logic clk = 1'b0, rst, load, en;
  logic [8:0] seed9, val9;
  logic [3:0] seed4, val4;
  logic sto9, sto4;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sc_bin2sto #(.W(9)) dut9 (.clk, .rst, .load, .en, .seed(seed9), .value(val9), .sto(sto9));
  sc_bin2sto #(.W(4)) dut4 (.clk, .rst, .load, .en, .seed(seed4), .value(val4), .sto(sto4));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones9, ones4, bitfail;
    logic [8:0] m9;
    int vals9 [6] = '{1, 2, 100, 256, 320, 511};
    int vals4 [3] = '{1, 9, 15};
    rst = 1; load = 0; en = 0; seed9 = 9'h3; seed4 = 4'h5; val9 = 0; val4 = 0;
    @(posedge clk); #1; rst = 0;
    foreach (vals9[n]) begin
      val9 = 9'(vals9[n]); val4 = 4'(vals4[n % 3]);
      seed9 = 9'(37 * n + 11); load = 1;
      @(posedge clk); #1; load = 0; en = 1;
      m9 = (seed9 == 0) ? 9'd1 : seed9;
      ones9 = 0; ones4 = 0; bitfail = 0;
      for (int t = 0; t < 511; t++) begin
        if (sto9 != (m9 < val9)) bitfail++;
        ones9 += int'(sto9);
        if (t < 15) ones4 += int'(sto4);
        @(posedge clk); #1;
        m9 = {m9[7:0], m9[8] ^ m9[4]};
      end
      en = 0;
      check(ones9 == vals9[n] - 1, $sformatf("W=9 v=%0d ones=%0d", vals9[n], ones9));
      check(bitfail == 0, $sformatf("W=9 v=%0d bit rule mismatches %0d", vals9[n], bitfail));
      check(ones4 == vals4[n % 3] - 1, $sformatf("W=4 v=%0d ones=%0d", vals4[n % 3], ones4));
    end
    // Value 0 gives a stream of zeros.
    val9 = 0; en = 1; ones9 = 0;
    repeat (100) begin @(posedge clk); #1; ones9 += int'(sto9); end
    check(ones9 == 0, "value 0 gives no ones");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
