// sc_stro: behavioural model of a self-timed ring oscillator (STRO).
//
// This is a simulation model, not synthesizable logic: a real STRO is an
// asynchronous ring of stages whose frequency depends on the ring length,
// voltage, temperature and placement. Each stochastic unit gets its own
// oscillator, so the clocks of different units drift apart and the bitstreams
// they produce stay uncorrelated. The model gives a clock whose half period is
// STAGES * STAGE_PS picoseconds plus a random jitter of up to +-JITTER_PS, and
// a per-instance SEED so that instances differ. While en is low the output
// stays at 0. The configurable ring length follows the framework; the delay
// figures and the jitter model are this design's assumptions. Delays are in
// the simulator's time unit (1 ps unless a timescale says otherwise).
module sc_stro #(
  parameter int unsigned STAGES    = 5,
  parameter int unsigned STAGE_PS  = 200,
  parameter int unsigned JITTER_PS = 50,
  parameter int unsigned SEED      = 1
) (
  input  logic en,
  output logic clk_out
);

  int unsigned rng;
  int          half;

  initial begin
    clk_out = 1'b0;
    rng     = SEED * 32'h9E37_79B9 + 32'h1234_5678;
    forever begin
      if (!en) begin
        clk_out = 1'b0;
        @(posedge en);
      end
      // Small linear congruential step for a deterministic jitter per instance.
      rng  = rng * 32'd1664525 + 32'd1013904223;
      half = int'(STAGES * STAGE_PS);
      if (JITTER_PS > 0)
        half = half + int'(rng % (2 * JITTER_PS + 1)) - int'(JITTER_PS);
      if (half < 1) half = 1;
      #(half) clk_out = ~clk_out;
    end
  end

endmodule
