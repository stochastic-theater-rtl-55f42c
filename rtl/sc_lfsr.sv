// sc_lfsr: pseudo-random number generator of a binary-to-stochastic converter.
//
// A W-bit maximal-length Fibonacci LFSR: each enabled clock the register shifts
// one place up and the XOR of the tapped stages enters at bit 0, so the state
// walks through all 2^W-1 non-zero values before repeating. Reset or load puts
// the seed into the register (a zero seed, which would lock the register, is
// replaced by 1). The state is the registered output, valid the cycle after a
// load or step. The generator with clock, reset and seed follows the
// framework's converter; the LFSR form and taps are this design's choice.
module sc_lfsr
  import sc_pkg::*;
#(
  parameter int unsigned W = 9
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load,
  input  logic         en,
  input  logic [W-1:0] seed,
  output logic [W-1:0] state
);

  localparam logic [31:0] TAPS_FULL = lfsr_taps(W);
  localparam logic [W-1:0] TAPS = TAPS_FULL[W-1:0];

  logic [W-1:0] seed_nz;
  logic         fb;

  assign seed_nz = (seed == '0) ? W'(1) : seed;
  assign fb      = ^(state & TAPS);

  always_ff @(posedge clk) begin
    if (rst || load) state <= seed_nz;
    else if (en)     state <= {state[W-2:0], fb};
  end

endmodule
