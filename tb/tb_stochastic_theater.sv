// tb_stochastic_theater: end-to-end runs of both systems in the top level,
// reduced to a KLT of P=4 samples and K=2 components (9-bit values, 512-bit
// streams, burn-in 8). The testbench acts as the host: it writes the values,
// starts a run, waits for busy to drop and reads the counts back.
//   1. KLT and expression systems with their datapaths on the platform clock.
//   2. The same with each datapath on its own ring-oscillator clock.
//   3. KLT with a permanent stuck-at-1 fault on coefficient lambda_00.
//   4. KLT with a transient stuck-at-0 fault on sample x_1.
// Results are compared with the exact real-valued expressions within a
// tolerance; faults must move the result by no more than their share. Each
// mechanism (burn-in, conversion, capture, host write/read, both fault levels,
// transient and permanent faults, oscillator clocking, PWM) is counted and
// must occur. The busy time of every run must be 2 + 8 + 512 cycles.
module tb_stochastic_theater;
  import sc_pkg::*;
  localparam int WL = 9, LEN = 512, BURN = 8, P = 4, K = 2;
  localparam int NIN = P + P * K;
  localparam real TOL = 0.06;

  logic clk = 1'b0, rst;
  logic use_osc;
  logic osc_klt, osc_expr;
  logic klt_sd_clk, expr_sd_clk;

  logic klt_start, klt_busy, klt_done, klt_wr_en, klt_flt_en, klt_flt_val;
  plat_state_e klt_state, expr_state;
  logic [3:0] klt_wr_addr, klt_flt_sel;
  logic [WL-1:0] klt_wr_data;
  logic klt_rd_addr;
  logic [31:0] klt_rd_ones, klt_rd_total;

  logic expr_start, expr_busy, expr_done, expr_wr_en, expr_flt_en, expr_flt_val;
  logic [2:0] expr_wr_addr, expr_flt_sel;
  logic [WL-1:0] expr_wr_data;
  logic expr_rd_addr;
  logic [31:0] expr_rd_ones, expr_rd_total;
  logic pwm_out;

  int checks = 0, failures = 0;
  int n_burnin = 0, n_conv = 0, n_capture = 0, n_wr = 0, n_rd = 0;
  int n_stuck1 = 0, n_stuck0 = 0, n_transient = 0, n_permanent = 0, n_osc = 0, n_pwm = 0;

  always #5 clk = ~clk;

  sc_stro #(.STAGES(1), .STAGE_PS(5), .JITTER_PS(1), .SEED(3)) u_osc_klt  (.en(use_osc), .clk_out(osc_klt));
  sc_stro #(.STAGES(1), .STAGE_PS(6), .JITTER_PS(2), .SEED(7)) u_osc_expr (.en(use_osc), .clk_out(osc_expr));

  assign klt_sd_clk  = use_osc ? osc_klt  : clk;
  assign expr_sd_clk = use_osc ? osc_expr : clk;

  stochastic_theater #(.KLT_P(P), .KLT_K(K)) dut (
    .clk, .rst, .klt_sd_clk, .expr_sd_clk,
    .klt_start, .klt_busy, .klt_done, .klt_state, .klt_wr_en, .klt_wr_addr, .klt_wr_data,
    .klt_rd_addr, .klt_rd_ones, .klt_rd_total, .klt_flt_en, .klt_flt_sel, .klt_flt_val,
    .expr_start, .expr_busy, .expr_done, .expr_state, .expr_wr_en, .expr_wr_addr, .expr_wr_data,
    .expr_rd_addr, .expr_rd_ones, .expr_rd_total, .expr_flt_en, .expr_flt_sel, .expr_flt_val,
    .pwm_out);

  // Mechanism monitors.
  logic pwm_d;
  always @(posedge clk) begin
    if (klt_state == ST_BURNIN) n_burnin++;
    if (klt_state == ST_RUN) n_conv++;
    if (klt_done) n_capture++;
    if (klt_flt_en && klt_state == ST_RUN) begin
      if (klt_flt_val) n_stuck1++; else n_stuck0++;
    end
    if (use_osc && klt_state == ST_RUN) n_osc++;
    pwm_d <= pwm_out;
    if (pwm_out != pwm_d) n_pwm++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Value encoded by a 9-bit word in this design's generators.
  function automatic real enc(int v);
    return (v < 1) ? 0.0 : real'(v - 1) / real'(LEN - 1);
  endfunction

  int xv [P]     = '{400, 300, 450, 200};
  int lv [K][P]  = '{'{350, 480, 120, 260}, '{500, 90, 310, 410}};
  int ev [5]     = '{460, 358, 307, 410, 256};

  task automatic klt_write(int a, int v);
    klt_wr_en = 1; klt_wr_addr = 4'(a); klt_wr_data = WL'(v);
    @(posedge clk); #1; klt_wr_en = 0; n_wr++;
  endtask

  task automatic expr_write(int a, int v);
    expr_wr_en = 1; expr_wr_addr = 3'(a); expr_wr_data = WL'(v);
    @(posedge clk); #1; expr_wr_en = 0; n_wr++;
  endtask

  // Starts both systems together and waits until both are idle.
  task automatic run_both(output int cyc_klt, output int cyc_expr);
    klt_start = 1; expr_start = 1; @(posedge clk); #1; klt_start = 0; expr_start = 0;
    cyc_klt = 0; cyc_expr = 0;
    while (klt_busy || expr_busy) begin
      cyc_klt += int'(klt_busy); cyc_expr += int'(expr_busy);
      @(posedge clk); #1;
    end
  endtask

  task automatic klt_read(int k, output real r);
    klt_rd_addr = 1'(k); @(posedge clk); #1; n_rd++;
    check(klt_rd_total == 32'(LEN), $sformatf("KLT total %0d", klt_rd_total));
    r = real'(klt_rd_ones) / real'(klt_rd_total);
  endtask

  task automatic expr_read(int k, output real r);
    expr_rd_addr = 1'(k); @(posedge clk); #1; n_rd++;
    check(expr_rd_total == 32'(LEN), $sformatf("expr total %0d", expr_rd_total));
    r = real'(expr_rd_ones) / real'(expr_rd_total);
  endtask

  real f_ref [K];
  real f_clean [K];

  task automatic check_all(string tag);
    real r, ef, eg;
    for (int k = 0; k < K; k++) begin
      klt_read(k, r);
      f_clean[k] = r;
      check(absr(r - f_ref[k]) < TOL, $sformatf("%s f_%0d = %f expected %f", tag, k, r, f_ref[k]));
    end
    ef = (enc(ev[0]) * enc(ev[1]) + enc(ev[2]) * enc(ev[3]) * enc(ev[4])) / 2.0;
    eg = (enc(ev[0]) * enc(ev[0]) * (1.0 - enc(ev[1])) + (1.0 - enc(ev[2]))) / 2.0;
    expr_read(0, r);
    check(absr(r - ef) < TOL, $sformatf("%s func = %f expected %f", tag, r, ef));
    expr_read(1, r);
    check(absr(r - eg) < TOL, $sformatf("%s g = %f expected %f", tag, r, eg));
  endtask

  initial begin
    int ck, ce;
    real r, ref0;
    rst = 1; use_osc = 0;
    klt_start = 0; klt_wr_en = 0; klt_wr_addr = 0; klt_wr_data = 0; klt_rd_addr = 0;
    klt_flt_en = 0; klt_flt_sel = 0; klt_flt_val = 0;
    expr_start = 0; expr_wr_en = 0; expr_wr_addr = 0; expr_wr_data = 0; expr_rd_addr = 0;
    expr_flt_en = 0; expr_flt_sel = 0; expr_flt_val = 0;
    repeat (3) @(posedge clk); #1; rst = 0;

    for (int p = 0; p < P; p++) klt_write(p, xv[p]);
    for (int k = 0; k < K; k++)
      for (int p = 0; p < P; p++) klt_write(P + k * P + p, lv[k][p]);
    for (int i = 0; i < 5; i++) expr_write(i, ev[i]);
    for (int k = 0; k < K; k++) begin
      f_ref[k] = 0.0;
      for (int p = 0; p < P; p++) f_ref[k] += enc(xv[p]) * enc(lv[k][p]);
      f_ref[k] /= P;
    end

    // 1. platform clock
    run_both(ck, ce);
    check(ck == 2 + BURN + LEN && ce == 2 + BURN + LEN,
          $sformatf("busy cycles %0d / %0d", ck, ce));
    check_all("clk");

    // 2. own oscillator clocks
    use_osc = 1;
    run_both(ck, ce);
    check(ck == 2 + BURN + LEN, $sformatf("busy cycles with oscillators %0d", ck));
    check_all("osc");
    use_osc = 0;
    repeat (3) @(posedge clk); #1;

    // 3. permanent stuck-at-1 on lambda_00: f_0 becomes (x0 + sum_{p>0} x_p l_p0)/P.
    klt_flt_en = 1; klt_flt_sel = 4'(P); klt_flt_val = 1; n_permanent++;
    run_both(ck, ce);
    klt_flt_en = 0;
    ref0 = f_ref[0] + enc(xv[0]) * (1.0 - enc(lv[0][0])) / P;
    klt_read(0, r);
    check(absr(r - ref0) < TOL, $sformatf("stuck-at-1 f_0 = %f expected %f", r, ref0));
    check(absr(r - f_ref[0]) < 1.0 / P + TOL, "stuck-at-1 error within one input's share");
    klt_read(1, r);
    check(absr(r - f_ref[1]) < TOL, "other component unaffected");

    // 4. transient stuck-at-0 on x_1 for 64 cycles of the conversion window.
    klt_start = 1; @(posedge clk); #1; klt_start = 0;
    while (klt_state != ST_RUN) begin @(posedge clk); #1; end
    repeat (100) @(posedge clk); #1;
    klt_flt_en = 1; klt_flt_sel = 4'd1; klt_flt_val = 0; n_transient++;
    repeat (64) @(posedge clk); #1;
    klt_flt_en = 0;
    while (klt_busy) begin @(posedge clk); #1; end
    for (int k = 0; k < K; k++) begin
      klt_read(k, r);
      check(absr(r - f_ref[k]) < TOL + 64.0 / LEN / P,
            $sformatf("transient fault f_%0d = %f near %f", k, r, f_ref[k]));
      check(r <= f_clean[k] + 0.02, $sformatf("stuck-at-0 does not raise f_%0d", k));
    end

    // Every mechanism must have happened.
    check(n_burnin > 0,    $sformatf("burn-in cycles %0d", n_burnin));
    check(n_conv > 0,      $sformatf("conversion cycles %0d", n_conv));
    check(n_capture == 4,  $sformatf("captures %0d", n_capture));
    check(n_wr == NIN + 5, $sformatf("host writes %0d", n_wr));
    check(n_rd > 0,        $sformatf("host reads %0d", n_rd));
    check(n_stuck1 > 0,    $sformatf("stuck-at-1 cycles %0d", n_stuck1));
    check(n_stuck0 > 0,    $sformatf("stuck-at-0 cycles %0d", n_stuck0));
    check(n_permanent > 0 && n_transient > 0, "permanent and transient faults");
    check(n_osc > 0,       $sformatf("oscillator-clocked cycles %0d", n_osc));
    check(n_pwm > 0,       $sformatf("PWM edges %0d", n_pwm));
    $display("mechanisms: burnin=%0d conv=%0d capture=%0d wr=%0d rd=%0d s1=%0d s0=%0d perm=%0d trans=%0d osc=%0d pwm=%0d",
             n_burnin, n_conv, n_capture, n_wr, n_rd, n_stuck1, n_stuck0, n_permanent, n_transient, n_osc, n_pwm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
