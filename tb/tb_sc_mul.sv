// tb_sc_mul: exhaustive check of 2- and 3-input unipolar (1 only when all
// inputs are 1) and bipolar multipliers (1 when the number of 0 bits, i.e. of
// -1 factors, is even).
module tb_sc_mul;
  logic [1:0] a2;
  logic [2:0] a3;
  logic yu2, yu3, yb2, yb3;
  int checks = 0, failures = 0;

  sc_mul #(.N(2), .BIPOLAR(1'b0)) u2 (.a(a2), .y(yu2));
  sc_mul #(.N(3), .BIPOLAR(1'b0)) u3 (.a(a3), .y(yu3));
  sc_mul #(.N(2), .BIPOLAR(1'b1)) b2 (.a(a2), .y(yb2));
  sc_mul #(.N(3), .BIPOLAR(1'b1)) b3 (.a(a3), .y(yb3));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int zeros3, zeros2;
      a3 = 3'(v); a2 = 2'(v);
      #1;
      zeros3 = 3 - $countones(a3);
      zeros2 = 2 - $countones(a2);
      check(yu3 == (v == 7), $sformatf("unipolar 3 a=%b", a3));
      check(yb3 == (zeros3 % 2 == 0), $sformatf("bipolar 3 a=%b", a3));
      if (v < 4) begin
        check(yu2 == (v == 3), $sformatf("unipolar 2 a=%b", a2));
        check(yb2 == (zeros2 % 2 == 0), $sformatf("bipolar 2 a=%b", a2));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
