// tb_klt_face_projection: the KLT workload at its full projection length: one
// 500-pixel sample (a 20x25 image) projected onto K = 8 of the 100
// components, 9-bit values, 512-bit streams, so each component is a
// 500-input stochastic dot product as at the default size. The host writes
// 500 sample values and 500*K coefficients (drawn at random), runs the KLT and
// the expression system once on the platform clock, and reads back all K
// components and the expression output. Each component must be within a tolerance of
// f_k = (1/500) * sum_p x_p * lambda_pk, and the run must take 2 + 8 + 512
// cycles of busy.
module tb_klt_face_projection;
  import sc_pkg::*;
  localparam int WL = 9, LEN = 512, BURN = 8, P = 500, K = 8;
  localparam int NIN = P + P * K;
  localparam real TOL = 0.08;

  logic clk = 1'b0, rst;
  logic klt_start, klt_busy, klt_done, klt_wr_en;
  plat_state_e klt_state, expr_state;
  logic [12:0] klt_wr_addr;
  logic [WL-1:0] klt_wr_data;
  logic [2:0] klt_rd_addr;
  logic [31:0] klt_rd_ones, klt_rd_total;
  logic expr_start, expr_busy, expr_done, expr_wr_en;
  logic [2:0] expr_wr_addr;
  logic [WL-1:0] expr_wr_data;
  logic expr_rd_addr;
  logic [31:0] expr_rd_ones, expr_rd_total;
  logic pwm_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  stochastic_theater #(.KLT_P(P), .KLT_K(K)) dut (
    .clk, .rst, .klt_sd_clk(clk), .expr_sd_clk(clk),
    .klt_start, .klt_busy, .klt_done, .klt_state, .klt_wr_en, .klt_wr_addr, .klt_wr_data,
    .klt_rd_addr, .klt_rd_ones, .klt_rd_total, .klt_flt_en(1'b0), .klt_flt_sel(13'd0), .klt_flt_val(1'b0),
    .expr_start, .expr_busy, .expr_done, .expr_state, .expr_wr_en, .expr_wr_addr, .expr_wr_data,
    .expr_rd_addr, .expr_rd_ones, .expr_rd_total, .expr_flt_en(1'b0), .expr_flt_sel(3'd0), .expr_flt_val(1'b0),
    .pwm_out);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  function automatic real enc(int v);
    return (v < 1) ? 0.0 : real'(v - 1) / real'(LEN - 1);
  endfunction

  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  initial begin
    repeat (NIN + 5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int  xv [P];
  int  lv [K][P];
  real fref [K];

  initial begin
    int cyc, maxerr_k;
    real r, maxerr;
    int ev [5] = '{460, 358, 307, 410, 256};
    rst = 1; klt_start = 0; klt_wr_en = 0; klt_wr_addr = 0; klt_wr_data = 0; klt_rd_addr = 0;
    expr_start = 0; expr_wr_en = 0; expr_wr_addr = 0; expr_wr_data = 0; expr_rd_addr = 0;
    repeat (3) @(posedge clk); #1; rst = 0;

    for (int p = 0; p < P; p++) xv[p] = $urandom_range(1, LEN - 1);
    for (int k = 0; k < K; k++) begin
      fref[k] = 0.0;
      for (int p = 0; p < P; p++) begin
        lv[k][p] = $urandom_range(1, LEN - 1);
        fref[k] += enc(xv[p]) * enc(lv[k][p]);
      end
      fref[k] /= P;
    end
    klt_wr_en = 1;
    for (int a = 0; a < NIN; a++) begin
      klt_wr_addr = 13'(a);
      klt_wr_data = WL'((a < P) ? xv[a] : lv[(a - P) / P][(a - P) % P]);
      @(posedge clk); #1;
    end
    klt_wr_en = 0;
    expr_wr_en = 1;
    for (int i = 0; i < 5; i++) begin
      expr_wr_addr = 3'(i); expr_wr_data = WL'(ev[i]); @(posedge clk); #1;
    end
    expr_wr_en = 0;

    klt_start = 1; expr_start = 1; @(posedge clk); #1; klt_start = 0; expr_start = 0;
    cyc = 0;
    while (klt_busy) begin cyc++; @(posedge clk); #1; end
    check(cyc == 2 + BURN + LEN, $sformatf("busy cycles %0d", cyc));

    maxerr = 0.0; maxerr_k = 0;
    for (int k = 0; k < K; k++) begin
      klt_rd_addr = 3'(k); @(posedge clk); #1;
      r = real'(klt_rd_ones) / real'(LEN);
      check(klt_rd_total == 32'(LEN), "total");
      check(absr(r - fref[k]) < TOL, $sformatf("f_%0d = %f expected %f", k, r, fref[k]));
      if (absr(r - fref[k]) > maxerr) begin maxerr = absr(r - fref[k]); maxerr_k = k; end
    end
    $display("largest KLT error %f at component %0d", maxerr, maxerr_k);
    expr_rd_addr = 1'b0; @(posedge clk); #1;
    r = real'(expr_rd_ones) / real'(LEN);
    check(absr(r - (enc(ev[0]) * enc(ev[1]) + enc(ev[2]) * enc(ev[3]) * enc(ev[4])) / 2.0) < 0.06,
          $sformatf("expression func %f", r));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
