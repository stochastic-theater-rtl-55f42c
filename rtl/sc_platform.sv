// sc_platform: test platform around a stochastic datapath (SD).
//
// Holds every supporting unit the SD needs, with the SD itself left outside and
// connected through sto_vars (streams to the SD) and sd_out (streams from it):
//   - input-value memory: N_IN words of WL bits, written by the host
//     (wr_en/wr_addr/wr_data). All words are read in parallel, one per
//     generator, so it is a register array rather than a block RAM.
//   - bin2sto bank: one sc_bin2sto per input word, generator i seeded with
//     seed_of(i, WL) so that no two generators run in step.
//   - fault injector: may force one of the N_IN streams to 0 or 1 (flt_*).
//   - sto2bin bank: one sc_sto2bin per SD output.
//   - result memory: at the end of a run the ones and total counts of each
//     output are stored; the host reads them with rd_addr, one cycle later.
//   - sc_ctrl_fsm: after start, reloads the seeds and clears the SD, lets the
//     streams run for BURN_IN cycles, converts for LEN = 2^WL cycles, then
//     stores the results; busy covers the whole run, done pulses at its end.
// The SD may run on its own clock; sd_rst is then a level it sees for at least
// the LOAD cycle (and the platform reset). The structure follows the
// framework's test platform; the memory organisation, host port and fault
// injector placement are this design's choices.
module sc_platform
  import sc_pkg::*;
#(
  parameter int unsigned N_IN    = 12,
  parameter int unsigned N_OUT   = 1,
  parameter int unsigned WL      = 9,
  parameter int unsigned CNT_W   = 32,
  parameter int unsigned BURN_IN = 8,
  parameter int unsigned LEN     = 2 ** WL,
  parameter int unsigned AW      = (N_IN > 1) ? $clog2(N_IN) : 1,
  parameter int unsigned OW      = (N_OUT > 1) ? $clog2(N_OUT) : 1
) (
  input  logic             clk,
  input  logic             rst,
  // control (SoC interface)
  input  logic             start,
  output logic             busy,
  output logic             done,
  output plat_state_e      state,
  // host access to the input values
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WL-1:0]    wr_data,
  // host access to the results
  input  logic [OW-1:0]    rd_addr,
  output logic [CNT_W-1:0] rd_ones,
  output logic [CNT_W-1:0] rd_total,
  // fault injection on the input streams
  input  logic             flt_en,
  input  logic [AW-1:0]    flt_sel,
  input  logic             flt_val,
  // stochastic datapath connection
  output logic [N_IN-1:0]  sto_vars,
  output logic             sd_rst,
  input  logic [N_OUT-1:0] sd_out
);

  logic gen_load, gen_en, fsm_sd_rst, conv_rst, conv_en, capture;

  sc_ctrl_fsm #(.LEN(LEN), .BURN_IN(BURN_IN)) u_fsm (
    .clk     (clk),
    .rst     (rst),
    .start   (start),
    .busy    (busy),
    .done    (done),
    .gen_load(gen_load),
    .gen_en  (gen_en),
    .sd_rst  (fsm_sd_rst),
    .conv_rst(conv_rst),
    .conv_en (conv_en),
    .capture (capture),
    .state_o (state)
  );

  assign sd_rst = rst | fsm_sd_rst;

  // Input-value memory.
  logic [WL-1:0] in_val [N_IN];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int unsigned i = 0; i < N_IN; i++) in_val[i] <= '0;
    end else if (wr_en && (32'(wr_addr) < N_IN)) begin
      in_val[wr_addr] <= wr_data;
    end
  end

  // Binary-to-stochastic bank.
  logic [N_IN-1:0] gen_sto;

  // Generated in groups of GRP so that no single generate loop gets too long
  // for elaboration tools.
  localparam int unsigned GRP  = 256;
  localparam int unsigned NGRP = (N_IN + GRP - 1) / GRP;

  for (genvar g = 0; g < NGRP; g++) begin : g_grp
    for (genvar j = 0; j < GRP; j++) begin : g_gen
      localparam int unsigned I = g * GRP + j;
      if (I < N_IN) begin : g_one
        localparam logic [31:0] SEED = seed_of(I, WL);
        sc_bin2sto #(.W(WL)) u_b2s (
          .clk  (clk),
          .rst  (rst),
          .load (gen_load),
          .en   (gen_en),
          .seed (SEED[WL-1:0]),
          .value(in_val[I]),
          .sto  (gen_sto[I])
        );
      end
    end
  end

  sc_fault_inject #(.N(N_IN), .SW(AW)) u_flt (
    .a  (gen_sto),
    .en (flt_en),
    .sel(flt_sel),
    .val(flt_val),
    .y  (sto_vars)
  );

  // Stochastic-to-binary bank and result memory.
  logic [CNT_W-1:0] cnt_ones  [N_OUT];
  logic [CNT_W-1:0] cnt_total [N_OUT];
  logic [CNT_W-1:0] res_ones  [N_OUT];
  logic [CNT_W-1:0] res_total [N_OUT];

  for (genvar k = 0; k < N_OUT; k++) begin : g_conv
    sc_sto2bin #(.CNT_W(CNT_W)) u_s2b (
      .clk  (clk),
      .rst  (rst | conv_rst),
      .en   (conv_en),
      .sto  (sd_out[k]),
      .ones (cnt_ones[k]),
      .total(cnt_total[k])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int unsigned k = 0; k < N_OUT; k++) begin
        res_ones[k]  <= '0;
        res_total[k] <= '0;
      end
    end else if (capture) begin
      for (int unsigned k = 0; k < N_OUT; k++) begin
        res_ones[k]  <= cnt_ones[k];
        res_total[k] <= cnt_total[k];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_ones  <= '0;
      rd_total <= '0;
    end else if (32'(rd_addr) < N_OUT) begin
      rd_ones  <= res_ones[rd_addr];
      rd_total <= res_total[rd_addr];
    end
  end

  // The host must not start a run while one is going on.
  a_no_restart: assert property (@(posedge clk) disable iff (rst)
    busy |-> !start)
    else $warning("start ignored while busy");

endmodule
