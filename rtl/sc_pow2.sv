// sc_pow2: stochastic squarer.
//
// Multiplies the stream by a copy of itself delayed by one clock: the delay
// makes the two bits of each product come from different positions of a
// pseudo-random stream, so they behave as two independent streams of the same
// value and their product (AND unipolar, XNOR bipolar) encodes a^2. The output
// is combinational from the input and the delay register, which clears on rst.
// Structure as in the framework; reset value is this design's choice.
module sc_pow2 #(
  parameter bit BIPOLAR = 1'b0
) (
  input  logic clk,
  input  logic rst,
  input  logic a,
  output logic y
);

  logic a_d;

  always_ff @(posedge clk) begin
    if (rst) a_d <= 1'b0;
    else     a_d <= a;
  end

  assign y = BIPOLAR ? ~(a ^ a_d) : (a & a_d);

endmodule
