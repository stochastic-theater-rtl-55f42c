// stochastic_theater: two autonomous stochastic computing systems and the
// PWM generator of the analog sensor interface.
//
// KLT system: a test platform feeding the unrolled KLT datapath. Its input
// memory holds KLT_P sample values (addresses 0..P-1) followed by the K*P
// projection coefficients (address P + k*P + p holds lambda_pk). One run turns
// them into bitstreams of 2^WL bits and returns, for each of the K components,
// the count of 1s of f_k / P.
// Expression system: a test platform feeding the node-list datapath; its
// default program computes the example (i0*i1 + i2*i3*i4)/2 and a second
// expression that uses negation, complement and square.
// Each system has its own host port (prefix klt_/expr_), controller, fault
// injector and datapath clock (klt_sd_clk / expr_sd_clk), which a design would
// take from its own ring oscillator and a test may tie to clk. The platform
// side (generators, converters, memories, controllers) runs on clk. Resets are
// synchronous and active high.
module stochastic_theater
  import sc_pkg::*;
#(
  parameter int unsigned WL        = 9,
  parameter int unsigned CNT_W     = 32,
  parameter int unsigned BURN_IN   = 8,
  parameter int unsigned KLT_P     = 500,
  parameter int unsigned KLT_K     = 100,
  parameter int unsigned KLT_NIN   = KLT_P + KLT_P * KLT_K,
  parameter int unsigned KLT_AW    = $clog2(KLT_NIN),
  parameter int unsigned KLT_OW    = (KLT_K > 1) ? $clog2(KLT_K) : 1,
  parameter int unsigned EXPR_NIN  = 5,
  parameter int unsigned EXPR_NOUT = 2,
  parameter int unsigned EXPR_AW   = $clog2(EXPR_NIN),
  parameter int unsigned EXPR_OW   = (EXPR_NOUT > 1) ? $clog2(EXPR_NOUT) : 1,
  parameter int unsigned PWM_PERIOD = 16,
  parameter int unsigned PWM_HIGH   = 8
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               klt_sd_clk,
  input  logic               expr_sd_clk,
  // KLT system host port
  input  logic               klt_start,
  output logic               klt_busy,
  output logic               klt_done,
  output plat_state_e        klt_state,
  input  logic               klt_wr_en,
  input  logic [KLT_AW-1:0]  klt_wr_addr,
  input  logic [WL-1:0]      klt_wr_data,
  input  logic [KLT_OW-1:0]  klt_rd_addr,
  output logic [CNT_W-1:0]   klt_rd_ones,
  output logic [CNT_W-1:0]   klt_rd_total,
  input  logic               klt_flt_en,
  input  logic [KLT_AW-1:0]  klt_flt_sel,
  input  logic               klt_flt_val,
  // expression system host port
  input  logic               expr_start,
  output logic               expr_busy,
  output logic               expr_done,
  output plat_state_e        expr_state,
  input  logic               expr_wr_en,
  input  logic [EXPR_AW-1:0] expr_wr_addr,
  input  logic [WL-1:0]      expr_wr_data,
  input  logic [EXPR_OW-1:0] expr_rd_addr,
  output logic [CNT_W-1:0]   expr_rd_ones,
  output logic [CNT_W-1:0]   expr_rd_total,
  input  logic               expr_flt_en,
  input  logic [EXPR_AW-1:0] expr_flt_sel,
  input  logic               expr_flt_val,
  // analog interface: PWM reference for the external comparator
  output logic               pwm_out
);

  // ---------------- KLT system ----------------
  logic [KLT_NIN-1:0] klt_vars;
  logic               klt_sd_rst;
  logic [KLT_K-1:0]   klt_f;

  sc_platform #(
    .N_IN(KLT_NIN), .N_OUT(KLT_K), .WL(WL), .CNT_W(CNT_W), .BURN_IN(BURN_IN),
    .AW(KLT_AW), .OW(KLT_OW)
  ) u_klt_platform (
    .clk(clk), .rst(rst),
    .start(klt_start), .busy(klt_busy), .done(klt_done), .state(klt_state),
    .wr_en(klt_wr_en), .wr_addr(klt_wr_addr), .wr_data(klt_wr_data),
    .rd_addr(klt_rd_addr), .rd_ones(klt_rd_ones), .rd_total(klt_rd_total),
    .flt_en(klt_flt_en), .flt_sel(klt_flt_sel), .flt_val(klt_flt_val),
    .sto_vars(klt_vars), .sd_rst(klt_sd_rst), .sd_out(klt_f)
  );

  sc_klt_dotprod #(.P(KLT_P), .K(KLT_K)) u_klt_sd (
    .clk   (klt_sd_clk),
    .rst   (klt_sd_rst),
    .x     (klt_vars[KLT_P-1:0]),
    .lambda(klt_vars[KLT_NIN-1:KLT_P]),
    .f     (klt_f)
  );

  // ---------------- expression system ----------------
  logic [EXPR_NIN-1:0]  expr_vars;
  logic                 expr_sd_rst;
  logic [EXPR_NOUT-1:0] expr_out;

  sc_platform #(
    .N_IN(EXPR_NIN), .N_OUT(EXPR_NOUT), .WL(WL), .CNT_W(CNT_W), .BURN_IN(BURN_IN),
    .AW(EXPR_AW), .OW(EXPR_OW)
  ) u_expr_platform (
    .clk(clk), .rst(rst),
    .start(expr_start), .busy(expr_busy), .done(expr_done), .state(expr_state),
    .wr_en(expr_wr_en), .wr_addr(expr_wr_addr), .wr_data(expr_wr_data),
    .rd_addr(expr_rd_addr), .rd_ones(expr_rd_ones), .rd_total(expr_rd_total),
    .flt_en(expr_flt_en), .flt_sel(expr_flt_sel), .flt_val(expr_flt_val),
    .sto_vars(expr_vars), .sd_rst(expr_sd_rst), .sd_out(expr_out)
  );

  sc_expr_datapath #(.N_IN(EXPR_NIN), .N_OUT(EXPR_NOUT)) u_expr_sd (
    .clk  (expr_sd_clk),
    .rst  (expr_sd_rst),
    .in_s (expr_vars),
    .out_s(expr_out)
  );

  // ---------------- analog interface ----------------
  sc_pwm_gen #(.PERIOD(PWM_PERIOD), .HIGH(PWM_HIGH)) u_pwm (
    .clk    (clk),
    .rst    (rst),
    .pwm_out(pwm_out)
  );

endmodule
