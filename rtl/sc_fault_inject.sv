// sc_fault_inject: stuck-at fault injector for a bus of bitstreams.
//
// While en is high the net chosen by sel is forced to val (stuck-at-0 or
// stuck-at-1); every other net, and all nets while en is low, pass unchanged.
// Holding en for a window gives a transient fault, holding it for the whole
// run a permanent one. A fault is thus described by a net identifier, the
// time it is applied and its logic level, as in the framework's fault model.
// Combinational. The framework applies faults from simulator scripts; putting
// them in a synthesizable injector is this design's choice.
module sc_fault_inject #(
  parameter int unsigned N  = 8,
  parameter int unsigned SW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]  a,
  input  logic          en,
  input  logic [SW-1:0] sel,
  input  logic          val,
  output logic [N-1:0]  y
);

  always_comb begin
    y = a;
    if (en && (32'(sel) < N)) y[sel] = val;
  end

endmodule
