// sc_add: N-input stochastic scaled adder (average).
//
// A round-robin multiplexer: a counter modulo N selects one input each clock
// and the selected bit is registered to the output, so over time each input
// contributes 1/N of the output bits and the output encodes (a0+...+aN-1)/N.
// Works the same for unipolar and bipolar streams. The output lags the inputs
// by one clock. The counter starts at input 0 after rst. The mux and mod-N
// counter follow the framework; the output register gives the one-cycle delay
// it assigns to the adder tree.
module sc_add #(
  parameter int unsigned N = 2
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] a,
  output logic         y
);

  localparam int unsigned CW = (N > 1) ? $clog2(N) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt <= '0;
      y   <= 1'b0;
    end else begin
      cnt <= (cnt == CW'(N - 1)) ? '0 : cnt + CW'(1);
      y   <= a[cnt];
    end
  end

endmodule
