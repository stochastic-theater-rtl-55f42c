// tb_sc_sto2bin: random stream and random enable; the ones and total counters
// must match counts kept by the testbench, and clear on reset.
module tb_sc_sto2bin;
  logic clk = 1'b0, rst, en, sto;
  logic [31:0] ones, total;
  logic [7:0]  ones8, total8;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sc_sto2bin #(.CNT_W(32)) dut   (.clk, .rst, .en, .sto, .ones(ones), .total(total));
  sc_sto2bin #(.CNT_W(8))  dut8  (.clk, .rst, .en, .sto, .ones(ones8), .total(total8));

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
    int m_ones, m_total;
    rst = 1; en = 0; sto = 0;
    @(posedge clk); #1; rst = 0;
    check(ones == 0 && total == 0, "cleared by reset");
    m_ones = 0; m_total = 0;
    for (int t = 0; t < 1000; t++) begin
      en  = ($urandom_range(0, 3) != 0);
      sto = ($urandom_range(0, 99) < 30);
      @(posedge clk); #1;
      if (en) begin m_total++; if (sto) m_ones++; end
      if (t % 50 == 49)
        check(ones == 32'(m_ones) && total == 32'(m_total),
              $sformatf("t=%0d ones %0d/%0d total %0d/%0d", t, ones, m_ones, total, m_total));
    end
    check(ones8 == 8'(m_ones) && total8 == 8'(m_total), "8-bit counters wrap");
    rst = 1; @(posedge clk); #1; rst = 0;
    check(ones == 0 && total == 0, "cleared again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
