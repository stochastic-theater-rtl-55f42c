// sc_pwm_gen: PWM generator of the analog-to-stochastic interface.
//
// A free-running counter modulo PERIOD; pwm_out is high for the first HIGH
// counts of each period. Outside the FPGA the PWM output is filtered by an RC
// network and used as the reference of a comparator whose other input is the
// analog sensor, so the comparator output is the sensor's stochastic stream.
// Only the generator's existence and its CLK_IN/PWM_OUT pins are given by the
// framework; period and duty cycle are this design's choices.
module sc_pwm_gen #(
  parameter int unsigned PERIOD = 16,
  parameter int unsigned HIGH   = 8
) (
  input  logic clk,
  input  logic rst,
  output logic pwm_out
);

  localparam int unsigned CW = (PERIOD > 1) ? $clog2(PERIOD) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt     <= '0;
      pwm_out <= 1'b0;
    end else begin
      cnt     <= (cnt == CW'(PERIOD - 1)) ? '0 : cnt + CW'(1);
      pwm_out <= (32'(cnt) < HIGH);
    end
  end

endmodule
