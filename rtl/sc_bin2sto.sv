// sc_bin2sto: binary-to-stochastic converter.
//
// A pseudo-random number A from an LFSR is compared each cycle with the binary
// value B; the output bit is 1 when A < B and 0 otherwise, so the density of 1s
// in the stream approaches B over the whole LFSR period. Because the LFSR never
// produces 0, a value v gives exactly v-1 ones in every 2^W-1 cycles. The
// output is combinational from the registered LFSR state and the value, so a
// new bit appears every enabled clock. The comparator rule (A<B gives 1) is the
// framework's; the LFSR is sc_lfsr.
module sc_bin2sto #(
  parameter int unsigned W = 9
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load,
  input  logic         en,
  input  logic [W-1:0] seed,
  input  logic [W-1:0] value,
  output logic         sto
);

  logic [W-1:0] rnd;

  sc_lfsr #(.W(W)) u_prng (
    .clk  (clk),
    .rst  (rst),
    .load (load),
    .en   (en),
    .seed (seed),
    .state(rnd)
  );

  assign sto = (rnd < value);

endmodule
