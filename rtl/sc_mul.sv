// sc_mul: N-input stochastic multiplier.
//
// Unipolar streams multiply with an AND of all inputs: the output is 1 only
// when every input is 1, so its density is the product of the input densities
// when the inputs are uncorrelated. Bipolar streams multiply with XNOR; for
// more than two inputs the XNOR is chained, which equals the parity rule
// out = ~(a0 ^ a1 ^ ... ) for an even number of inputs and its complement
// otherwise, each step being a bipolar product. Purely combinational. The AND
// and XNOR rules and the n-ary form are the framework's; the XNOR chain for
// more than two bipolar inputs is this design's reading.
module sc_mul #(
  parameter int unsigned N       = 2,
  parameter bit          BIPOLAR = 1'b0
) (
  input  logic [N-1:0] a,
  output logic         y
);

  always_comb begin
    if (BIPOLAR) begin
      y = a[0];
      for (int unsigned i = 1; i < N; i++) y = ~(y ^ a[i]);
    end else begin
      y = &a;
    end
  end

endmodule
