// tb_sc_ctrl_fsm: one run with LEN=16 and BURN_IN=3, one with no burn-in.
// Counts the cycles of busy (must be 2 + BURN_IN + LEN), of generator enable
// (BURN_IN + LEN), of converter enable (LEN), of burn-in, and checks the
// single-cycle load and done pulses and their order.
module tb_sc_ctrl_fsm;
  import sc_pkg::*;
  logic clk = 1'b0, rst, start;
  logic busy_a, done_a, gl_a, ge_a, sr_a, cr_a, ce_a, cap_a;
  logic busy_b, done_b, gl_b, ge_b, sr_b, cr_b, ce_b, cap_b;
  plat_state_e st_a, st_b;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sc_ctrl_fsm #(.LEN(16), .BURN_IN(3)) dut_a (
    .clk, .rst, .start, .busy(busy_a), .done(done_a), .gen_load(gl_a), .gen_en(ge_a),
    .sd_rst(sr_a), .conv_rst(cr_a), .conv_en(ce_a), .capture(cap_a), .state_o(st_a));
  sc_ctrl_fsm #(.LEN(16), .BURN_IN(0)) dut_b (
    .clk, .rst, .start, .busy(busy_b), .done(done_b), .gen_load(gl_b), .gen_en(ge_b),
    .sd_rst(sr_b), .conv_rst(cr_b), .conv_en(ce_b), .capture(cap_b), .state_o(st_b));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nb_a, ng_a, nc_a, nl_a, nd_a, nburn_a, nb_b, ng_b, nc_b, nburn_b;
    int t_load, t_first_conv, t_done;
    rst = 1; start = 0;
    repeat (2) @(posedge clk); #1; rst = 0;
    check(!busy_a && !busy_b && st_a == ST_IDLE, "idle after reset");
    start = 1; @(posedge clk); #1; start = 0;
    nb_a = 0; ng_a = 0; nc_a = 0; nl_a = 0; nd_a = 0; nburn_a = 0;
    nb_b = 0; ng_b = 0; nc_b = 0; nburn_b = 0;
    t_load = -1; t_first_conv = -1; t_done = -1;
    for (int t = 0; t < 60; t++) begin
      nb_a += int'(busy_a); ng_a += int'(ge_a); nc_a += int'(ce_a);
      nl_a += int'(gl_a);   nd_a += int'(done_a);
      nburn_a += int'(st_a == ST_BURNIN);
      nb_b += int'(busy_b); ng_b += int'(ge_b); nc_b += int'(ce_b);
      nburn_b += int'(st_b == ST_BURNIN);
      if (gl_a && t_load < 0) t_load = t;
      if (ce_a && t_first_conv < 0) t_first_conv = t;
      if (done_a && t_done < 0) t_done = t;
      if (gl_a) check(sr_a && cr_a && !ge_a, "load clears datapath and counters");
      if (done_a) check(cap_a, "capture with done");
      @(posedge clk); #1;
    end
    check(nb_a == 2 + 3 + 16, $sformatf("busy cycles %0d", nb_a));
    check(ng_a == 3 + 16, $sformatf("generator cycles %0d", ng_a));
    check(nc_a == 16, $sformatf("conversion cycles %0d", nc_a));
    check(nburn_a == 3, $sformatf("burn-in cycles %0d", nburn_a));
    check(nl_a == 1 && nd_a == 1, "single load and done pulse");
    check(t_load == 0 && t_first_conv == 4 && t_done == 20,
          $sformatf("order load %0d conv %0d done %0d", t_load, t_first_conv, t_done));
    check(nb_b == 2 + 16 && ng_b == 16 && nc_b == 16 && nburn_b == 0,
          $sformatf("no burn-in: busy %0d gen %0d conv %0d", nb_b, ng_b, nc_b));
    check(!busy_a && !busy_b, "idle at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
