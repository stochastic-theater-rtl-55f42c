// tb_sc_klt_dotprod: P=4 samples, K=3 components, random streams. Every
// output bit must equal x[c] AND lambda[k][c] of the previous clock, c being
// the round-robin pointer 0..P-1; a bipolar instance uses XNOR.
module tb_sc_klt_dotprod;
  localparam int P = 4, K = 3;
  logic clk = 1'b0, rst;
  logic [P-1:0] x;
  logic [K-1:0][P-1:0] lambda;
  logic [K-1:0] fu, fb;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sc_klt_dotprod #(.P(P), .K(K), .BIPOLAR(1'b0)) du (.clk, .rst, .x, .lambda, .f(fu));
  sc_klt_dotprod #(.P(P), .K(K), .BIPOLAR(1'b1)) db (.clk, .rst, .x, .lambda, .f(fb));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ptr;
    logic [K-1:0] eu, eb;
    rst = 1; x = '0; lambda = '0;
    @(posedge clk); #1; rst = 0;
    ptr = 0;
    for (int t = 0; t < 2000; t++) begin
      x = P'($urandom);
      for (int k = 0; k < K; k++) lambda[k] = P'($urandom);
      for (int k = 0; k < K; k++) begin
        eu[k] = x[ptr] & lambda[k][ptr];
        eb[k] = (x[ptr] == lambda[k][ptr]);
      end
      ptr = (ptr + 1) % P;
      @(posedge clk); #1;
      checks++;
      if (fu != eu || fb != eb) begin
        failures++;
        if (failures < 5) $display("FAIL t=%0d f=%b/%b exp %b/%b", t, fu, fb, eu, eb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
