// sc_ctrl_fsm: controller of the stochastic test platform, with burn-in counter.
//
// Runs one evaluation of a stochastic datapath when start is seen in IDLE:
//   LOAD    1 cycle: generators reload their seeds, the datapath and the
//           output counters are cleared.
//   BURNIN  BURN_IN cycles: the input streams run through the datapath but the
//           outputs are not counted yet, so units that need time to settle
//           (FSM-based units, register delays) reach their steady state.
//           Skipped when BURN_IN is 0.
//   RUN     LEN cycles: the output converters count.
//   CAPTURE 1 cycle: the counts are copied to the result memory; done pulses.
// busy is high from the cycle after start until CAPTURE ends, i.e. for
// 2 + BURN_IN + LEN cycles. The sequence (wait for the host, burn-in, then
// conversion) and the Clk/En/Rst/Busy interface follow the framework; the
// state encoding, the LOAD and CAPTURE steps and the default burn-in length
// are this design's choices.
module sc_ctrl_fsm
  import sc_pkg::*;
#(
  parameter int unsigned LEN     = 512,
  parameter int unsigned BURN_IN = 8,
  parameter int unsigned CW      = $clog2(((LEN > BURN_IN) ? LEN : BURN_IN) + 1)
) (
  input  logic clk,
  input  logic rst,
  input  logic start,
  output logic busy,
  output logic done,
  output logic gen_load,
  output logic gen_en,
  output logic sd_rst,
  output logic conv_rst,
  output logic conv_en,
  output logic capture,
  output plat_state_e state_o
);

  plat_state_e   state;
  logic [CW-1:0] cnt;

  assign state_o = state;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= ST_IDLE;
      cnt   <= '0;
    end else begin
      unique case (state)
        ST_IDLE: if (start) state <= ST_LOAD;
        ST_LOAD: begin
          cnt   <= '0;
          state <= (BURN_IN == 0) ? ST_RUN : ST_BURNIN;
        end
        ST_BURNIN: begin
          if (cnt == CW'(BURN_IN - 1)) begin
            cnt   <= '0;
            state <= ST_RUN;
          end else cnt <= cnt + CW'(1);
        end
        ST_RUN: begin
          if (cnt == CW'(LEN - 1)) begin
            cnt   <= '0;
            state <= ST_CAPTURE;
          end else cnt <= cnt + CW'(1);
        end
        ST_CAPTURE: state <= ST_IDLE;
        default:    state <= ST_IDLE;
      endcase
    end
  end

  always_comb begin
    busy     = (state != ST_IDLE);
    gen_load = (state == ST_LOAD);
    sd_rst   = (state == ST_LOAD);
    conv_rst = (state == ST_LOAD);
    gen_en   = (state == ST_BURNIN) || (state == ST_RUN);
    conv_en  = (state == ST_RUN);
    capture  = (state == ST_CAPTURE);
    done     = (state == ST_CAPTURE);
  end

  // A run always takes LOAD, then BURNIN or RUN.
  a_load_next: assert property (@(posedge clk) disable iff (rst)
    (state == ST_LOAD) |=> (state == ST_BURNIN || state == ST_RUN));

endmodule
