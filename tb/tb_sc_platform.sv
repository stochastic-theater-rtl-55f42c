// tb_sc_platform: a 4-input, 2-output platform (6-bit values, 64-bit streams,
// burn-in 5) around a datapath modelled here: out0 = in0 AND in1, out1 = in2.
// Checks the busy time (2 + 5 + 64 cycles), the exact count of output 1 (a
// 64-cycle window over a period-63 generator of value v holds v-1 or v ones),
// the product on output 0 within a tolerance, and stuck-at-1, stuck-at-0 and
// transient faults on input 2.
module tb_sc_platform;
  import sc_pkg::*;
  localparam int WL = 6, LEN = 64, BURN = 5;
  logic clk = 1'b0, rst, start, busy, done;
  plat_state_e state;
  logic wr_en;
  logic [1:0] wr_addr;
  logic [WL-1:0] wr_data;
  logic rd_addr;
  logic [31:0] rd_ones, rd_total;
  logic flt_en, flt_val;
  logic [1:0] flt_sel;
  logic [3:0] sto_vars;
  logic sd_rst;
  logic [1:0] sd_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sc_platform #(.N_IN(4), .N_OUT(2), .WL(WL), .CNT_W(32), .BURN_IN(BURN)) dut (
    .clk, .rst, .start, .busy, .done, .state, .wr_en, .wr_addr, .wr_data,
    .rd_addr, .rd_ones, .rd_total, .flt_en, .flt_sel, .flt_val,
    .sto_vars, .sd_rst, .sd_out);

  assign sd_out[0] = sto_vars[0] & sto_vars[1];
  assign sd_out[1] = sto_vars[2];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_val(int a, int v);
    wr_en = 1; wr_addr = 2'(a); wr_data = WL'(v);
    @(posedge clk); #1;
    wr_en = 0;
  endtask

  task automatic run(output int cycles);
    start = 1; @(posedge clk); #1; start = 0;
    cycles = 0;
    while (busy) begin cycles++; @(posedge clk); #1; end
  endtask

  task automatic read_res(int k, output int ones, output int total);
    rd_addr = 1'(k); @(posedge clk); #1;
    ones = int'(rd_ones); total = int'(rd_total);
  endtask

  initial begin
    int cyc, o0, t0, o1, t1, exp0;
    int v [4] = '{48, 40, 21, 7};
    rst = 1; start = 0; wr_en = 0; wr_addr = 0; wr_data = 0; rd_addr = 0;
    flt_en = 0; flt_sel = 0; flt_val = 0;
    repeat (2) @(posedge clk); #1; rst = 0;
    for (int i = 0; i < 4; i++) write_val(i, v[i]);

    run(cyc);
    check(cyc == 2 + BURN + LEN, $sformatf("busy cycles %0d", cyc));
    read_res(0, o0, t0); read_res(1, o1, t1);
    exp0 = v[0] * v[1] / LEN;
    check(t0 == LEN && t1 == LEN, "total count equals stream length");
    check(o1 == v[2] - 1 || o1 == v[2], $sformatf("out1 ones %0d for value %0d", o1, v[2]));
    check(o0 > exp0 - 8 && o0 < exp0 + 8, $sformatf("out0 ones %0d expected ~%0d", o0, exp0));

    // Same inputs, same seeds: a second run repeats exactly.
    begin
      int o0b, t0b;
      run(cyc); read_res(0, o0b, t0b);
      check(o0b == o0, "run is repeatable");
    end

    // Permanent stuck-at-1 and stuck-at-0 on input 2.
    flt_en = 1; flt_sel = 2; flt_val = 1;
    run(cyc); read_res(1, o1, t1);
    check(o1 == LEN, $sformatf("stuck-at-1 gives %0d", o1));
    flt_val = 0;
    run(cyc); read_res(1, o1, t1);
    check(o1 == 0, $sformatf("stuck-at-0 gives %0d", o1));
    flt_en = 0;

    // Transient stuck-at-1 for 10 cycles in the conversion window.
    start = 1; @(posedge clk); #1; start = 0;
    while (state != ST_RUN) begin @(posedge clk); #1; end
    repeat (20) @(posedge clk); #1;
    flt_en = 1; flt_sel = 2; flt_val = 1;
    repeat (10) @(posedge clk); #1;
    flt_en = 0;
    while (busy) begin @(posedge clk); #1; end
    read_res(1, o1, t1);
    check(o1 >= v[2] - 1 && o1 <= v[2] + 10 && o1 > v[2] - 1 + 0,
          $sformatf("transient fault gives %0d", o1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
