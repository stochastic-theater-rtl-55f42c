// tb_correlation_effect: why stochastic units need uncorrelated streams.
//   - Two 8-bit streams 00110011 and 11001100 both encode 0.5, but being
//     aligned against each other their AND is all zeros (0 instead of 0.25).
//   - The stream 01110110 counts as 5/8 = 0.625 unipolar, 2*(5/8-0.5) = 0.25
//     bipolar.
//   - Two generators of the same value 0.5 with different seeds multiply to
//     about 0.25 over 511 bits; with the same seed the "product" is the value
//     itself, 0.5.
module tb_correlation_effect;
  logic clk = 1'b0, rst, load, en;
  logic [1:0] a;
  logic y;
  logic sto, s_a, s_b, s_c;
  logic [31:0] ones, total;
  logic prod_ind, prod_same;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sc_mul #(.N(2)) u_mul (.a(a), .y(y));
  sc_sto2bin #(.CNT_W(32)) u_cnt (.clk, .rst, .en, .sto, .ones, .total);
  sc_bin2sto #(.W(9)) g_a (.clk, .rst, .load, .en, .seed(9'd1),   .value(9'd257), .sto(s_a));
  sc_bin2sto #(.W(9)) g_b (.clk, .rst, .load, .en, .seed(9'd300), .value(9'd257), .sto(s_b));
  sc_bin2sto #(.W(9)) g_c (.clk, .rst, .load, .en, .seed(9'd1),   .value(9'd257), .sto(s_c));
  sc_mul #(.N(2)) m_ind  (.a({s_a, s_b}), .y(prod_ind));
  sc_mul #(.N(2)) m_same (.a({s_a, s_c}), .y(prod_same));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] sa = 8'b00110011, sb = 8'b11001100, s3 = 8'b01110110;
    int n_ind, n_same;
    real uni, bip;
    rst = 1; load = 0; en = 0; a = '0; sto = 0;
    @(posedge clk); #1; rst = 0;
    // Table I style: aligned streams.
    begin
      int zeros = 0;
      for (int i = 0; i < 8; i++) begin
        a = {sa[i], sb[i]}; #1;
        zeros += int'(!y);
      end
      check(zeros == 8, "aligned 0.5 x 0.5 gives 0");
    end
    // Fig. 3 style: 01110110.
    en = 1;
    for (int i = 7; i >= 0; i--) begin sto = s3[i]; @(posedge clk); #1; end
    en = 0;
    uni = real'(ones) / real'(total);
    bip = 2.0 * (uni - 0.5);
    check(ones == 5 && total == 8, $sformatf("counted %0d/%0d", ones, total));
    check(uni == 0.625 && bip == 0.25, $sformatf("unipolar %f bipolar %f", uni, bip));
    // Independent versus identical generators.
    load = 1; @(posedge clk); #1; load = 0; en = 1;
    n_ind = 0; n_same = 0;
    for (int t = 0; t < 511; t++) begin
      n_ind += int'(prod_ind); n_same += int'(prod_same);
      @(posedge clk); #1;
    end
    check(n_same == 256, $sformatf("same seed: %0d of 511 (the value itself)", n_same));
    check(n_ind > 100 && n_ind < 160, $sformatf("different seeds: %0d of 511 (about 128)", n_ind));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
