// sc_klt_dotprod: unrolled stochastic datapath of the KLT projection.
//
// Computes K projections of one P-dimensional sample, f_k = sum_p x_p*l_pk,
// fully in parallel. Each product is a 2-input stochastic multiplier (AND, or
// XNOR when BIPOLAR) of the sample stream x_p and the coefficient stream
// lambda[k][p]; the P products of one component go into a P-input scaled
// adder, so output k encodes f_k / P. The sample streams are shared by all
// components; every coefficient has its own stream. Outputs are registered
// (one clock through the adder); the value of a run is valid once the
// counters have integrated a full bitstream. In the platform the P samples
// are written one after the other into the input memory, which plays the role
// of the delay line of the unrolled dot-product; the multiplier array and the
// adder follow the framework's unrolled architecture.
module sc_klt_dotprod #(
  parameter int unsigned P       = 500,
  parameter int unsigned K       = 100,
  parameter bit          BIPOLAR = 1'b0
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic [P-1:0]          x,
  input  logic [K-1:0][P-1:0]   lambda,
  output logic [K-1:0]          f
);

  for (genvar k = 0; k < K; k++) begin : g_comp
    logic [P-1:0] prod;
    for (genvar p = 0; p < P; p++) begin : g_mul
      sc_mul #(.N(2), .BIPOLAR(BIPOLAR)) u_mul (
        .a({x[p], lambda[k][p]}),
        .y(prod[p])
      );
    end
    sc_add #(.N(P)) u_add (
      .clk(clk),
      .rst(rst),
      .a  (prod),
      .y  (f[k])
    );
  end

endmodule
