// sc_not: stochastic negation / complement.
//
// Inverts every bit of the stream. A unipolar stream of value a becomes 1-a;
// a bipolar stream of value a becomes -a. Both the negation and the complement
// operator of a datapath map onto this unit. Purely combinational.
module sc_not (
  input  logic a,
  output logic y
);

  assign y = ~a;

endmodule
