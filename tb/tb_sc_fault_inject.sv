// tb_sc_fault_inject: random buses, nets and levels; only the selected net is
// forced and only while enabled.
module tb_sc_fault_inject;
  logic [7:0] a, y;
  logic en, val;
  logic [2:0] sel;
  int checks = 0, failures = 0;

  sc_fault_inject #(.N(8)) dut (.a, .en, .sel, .val, .y);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] exp_y;
    int stuck0 = 0, stuck1 = 0;
    for (int t = 0; t < 500; t++) begin
      a = 8'($urandom); en = 1'($urandom); sel = 3'($urandom); val = 1'($urandom);
      #1;
      exp_y = a;
      if (en) begin
        if (val) exp_y = a | (8'd1 << sel);
        else     exp_y = a & ~(8'd1 << sel);
        if (val) stuck1++; else stuck0++;
      end
      checks++;
      if (y !== exp_y) begin failures++; $display("FAIL: a=%b en=%b sel=%0d val=%b y=%b", a, en, sel, val, y); end
    end
    checks++;
    if (stuck0 == 0 || stuck1 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
