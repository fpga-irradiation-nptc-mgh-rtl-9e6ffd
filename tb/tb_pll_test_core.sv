// tb_pll_test_core: the PLL test as a core section of the irradiation framework.
//
// Same board setup as tb_hitreg (behavioural PLL, hit looped back to bin 13, set value 13).
// A run of 100 reference cycles after lock must leave both voted counters at 100. A TDC error
// 40 cycles into a second run stops the result count while the total count goes on. A clock
// error in a third run stops both. After each run the counts must hold while run is low. An
// upset written into one copy of a counter must be outvoted and flagged. Between the runs the
// framework reset clears the counters. The reference is scaled to a 25.6 ns period.
module tb_pll_test_core;
  import irradiation_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int T = 25600;
  localparam int DLY = 100;
  localparam int BIN = T / 32;
  localparam int W = 16;
  localparam tdc_value_t SET = 5'h0D;

  logic clk40 = 1'b0, hit = 1'b0, powerdown_n = 1'b0, stop_glb = 1'b0;
  logic rst_n = 1'b1, run = 1'b0;
  logic clk_0, clk_90, clk80, lock;
  tdc_value_t tdc_value = ~SET;
  logic all_ok, led_pllclk_runs_n, led_tdc_ok_n, pllclk_runs, tdc_ok, valid;
  tdc_value_t led_tdc, tdc;
  logic [W-1:0] total_count, result_count;
  logic total_mismatch, result_mismatch;
  int checks = 0, failures = 0;
  int n_tdc_err = 0, n_clk_err = 0, n_upset = 0;

  pll320_model #(.T_REF_PS(T), .DELAY_PS(DLY)) u_pll (
    .CLKA(clk40), .POWERDOWN(powerdown_n), .stop_glb,
    .GLA(clk80), .GLB(clk_0), .GLC(clk_90), .LOCK(lock)
  );

  pll_test_core #(.CNT_W(W)) dut (
    .clk40, .clk80, .clk_0, .clk_90, .pll_lock(lock), .rst_n, .run, .hit, .tdc_value,
    .all_ok, .pllclk_runs, .tdc, .tdc_ok, .valid, .led_tdc, .led_tdc_ok_n,
    .led_pllclk_runs_n, .total_count, .total_mismatch, .result_count, .result_mismatch
  );

  always #(T/2) clk40 = ~clk40;

  always #50 begin
    automatic longint r = (longint'($time) - T/2 - (DLY + ((int'(SET) + 16) % 32) * BIN + BIN/2 - 50)) % T;
    if (r < 0) r += T;
    hit = (r < T/2);
  end

  initial begin : watchdog
    #(longint'(T) * 3000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: total=%0d result=%0d", what, $time, total_count, result_count);
    end
  endtask

  // one run of n cycles; an error is injected after 'err_at' cycles (kind 1 TDC, 2 clock)
  task automatic do_run(input int n, input int err_at, input int kind,
                        output int exp_total, output int exp_result);
    bit tdc_bad = 0, clk_bad = 0;
    exp_total = 0; exp_result = 0;
    @(posedge clk40);
    #(T/4) run = 1'b1;
    for (int i = 0; i < n; i++) begin
      if (i == err_at && kind == 1) tdc_value = ~5'd3;
      if (i == err_at && kind == 2) stop_glb = 1'b1;
      @(posedge clk40);
      // an error made in the high half of a cycle is latched at the next edge: the
      // counters still count that edge and stop from the one after
      if (kind == 1 && i == err_at + 1) tdc_bad = 1;
      if (kind == 2 && i == err_at + 1) clk_bad = 1;
      if (!clk_bad) exp_total++;
      if (!clk_bad && !tdc_bad) exp_result++;
      #(T/4);
    end
    run = 1'b0;
    tdc_value = ~SET;
    stop_glb = 1'b0;
    repeat (5) @(posedge clk40);
    #(T/4);
  endtask

  task automatic restart();
    rst_n = 1'b0;
    powerdown_n = 1'b0;
    repeat (2) @(posedge clk40);
    #(T/4);
    check(total_count == 0 && result_count == 0, "framework reset clears the counters");
    rst_n = 1'b1;
    powerdown_n = 1'b1;
    repeat (20) @(posedge clk40);
    #(T/4);
    check(all_ok && pllclk_runs, "checker good before the run");
  endtask

  initial begin
    int et, er;
    restart();
    do_run(100, -1, 0, et, er);
    check(total_count == W'(100) && result_count == W'(100), "clean run counts every cycle");
    check(!total_mismatch && !result_mismatch, "copies agree");

    restart();
    do_run(100, 40, 1, et, er);
    check(total_count == W'(et) && result_count == W'(er), "TDC error stops the result count");
    check(er < et && et == 100, "result below total");
    n_tdc_err++;

    // upset in one copy of the total counter
    dut.g_ctr[2].u_total_ctr.count[0] = ~dut.g_ctr[2].u_total_ctr.count[0];
    #1;
    check(total_mismatch && total_count == W'(et), "copy upset outvoted and flagged");
    n_upset++;

    restart();
    do_run(100, 30, 2, et, er);
    check(total_count == W'(et) && result_count == W'(er) && et < 100, "clock error stops both");
    n_clk_err++;

    check(n_tdc_err > 0 && n_clk_err > 0 && n_upset > 0, "all cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
