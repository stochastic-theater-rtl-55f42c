// tb_sc_not: the inverter must turn a stream of density p into 1-p bit by bit.
module tb_sc_not;
  logic a, y;
  int checks = 0, failures = 0;

  sc_not dut (.a, .y);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones_in = 0, ones_out = 0;
    for (int t = 0; t < 1000; t++) begin
      a = ($urandom_range(0, 99) < 30);
      #1;
      checks++;
      if (y !== ~a) failures++;
      ones_in += int'(a); ones_out += int'(y);
    end
    checks++;
    if (ones_in + ones_out != 1000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
