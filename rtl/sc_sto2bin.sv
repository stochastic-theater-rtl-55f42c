// sc_sto2bin: stochastic-to-binary converter.
//
// Two binary counters: one adds 1 for every cycle in which the stream bit is 1,
// the other for every cycle at all, so ones/total is the value the stream
// encodes. Both count only while en is high (the conversion window set by the
// controller) and clear on rst. The counts are registered and are valid the
// cycle after the last counted bit. The two-counter structure is the
// framework's; the shared enable is this design's addition.
module sc_sto2bin #(
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic             sto,
  output logic [CNT_W-1:0] ones,
  output logic [CNT_W-1:0] total
);

  always_ff @(posedge clk) begin
    if (rst) begin
      ones  <= '0;
      total <= '0;
    end else if (en) begin
      total <= total + CNT_W'(1);
      if (sto) ones <= ones + CNT_W'(1);
    end
  end

endmodule
