// tb_fpga_irradiation_top: end-to-end test of both core sections through the top.
//
// SEU section (run length 2^10 cycles, 64-stage chain): one run at each selectable clock
// frequency, 40, 80, 160 and 240 MHz, following the test procedure: reset, start the clock,
// let the run end on the trigger bit, stop the clock, read the counts. Each run must end
// 2^10 clock periods after it starts; a clean run must give (2^10 - 64) / 2 ones; the
// 80 MHz run gets an upset in the chain and must differ from that by exactly one; the
// 160 MHz run gets an upset in one result copy, which must be outvoted and flagged.
// PLL-test section (16-bit counters), at the same time: start-up after lock, a clean counting
// window, a TDC error, a clock error and a restart by lock loss, with the voted counts
// checked after each window. Every mechanism is counted and must occur at least once.
// The PLL reference is scaled to a 25.6 ns period so that all its edges fall on whole
// picoseconds.
module tb_fpga_irradiation_top;
  import irradiation_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned TRIG = 10;
  localparam int unsigned DEPTH = 64;
  localparam int unsigned W = 16;
  localparam int T = 25600;
  localparam int DLY = 100;
  localparam int BIN = T / 32;
  localparam tdc_value_t SET = 5'h0D;
  localparam int CLEAN = ((1 << TRIG) - DEPTH) / 2;

  // SEU section
  logic seu_clk = 1'b0, seu_rst_n = 1'b1, seu_clk_en = 1'b0;
  int seu_half_ps = 12500;
  logic [TRIG:0] seu_data_count, seu_result;
  logic [2:0][TRIG:0] seu_result_copies;
  logic seu_mismatch, seu_done;

  // PLL-test section
  logic clk40 = 1'b0, hit = 1'b0, powerdown_n = 1'b0, stop_glb = 1'b0;
  logic pll_rst_n = 1'b1, pll_run = 1'b0;
  logic clk_0, clk_90, clk80, lock;
  tdc_value_t tdc_value = ~SET;
  logic all_ok, led_pllclk_runs_n, led_tdc_ok_n, pllclk_runs, tdc_ok, valid;
  tdc_value_t led_tdc, tdc;
  logic [W-1:0] total_count, result_count;
  logic total_mismatch, result_mismatch;

  int checks = 0, failures = 0;
  int n_seu_run = 0, n_freq[4] = '{0, 0, 0, 0}, n_chain_upset = 0, n_copy_upset = 0;
  int n_pll_lock = 0, n_pll_window = 0, n_tdc_err = 0, n_clk_err = 0;
  bit seu_finished = 0, pll_finished = 0;

  fpga_irradiation_top #(.TRIGGER_BIT(TRIG), .DEPTH(DEPTH), .PLL_CNT_W(W)) dut (
    .seu_clk, .seu_rst_n, .seu_data_count, .seu_result, .seu_result_copies, .seu_mismatch,
    .seu_done,
    .clk40, .clk80, .clk_0, .clk_90, .pll_lock(lock), .pll_rst_n, .pll_run, .hit, .tdc_value,
    .all_ok, .pllclk_runs, .tdc, .tdc_ok, .valid, .led_tdc, .led_tdc_ok_n, .led_pllclk_runs_n,
    .total_count, .total_mismatch, .result_count, .result_mismatch
  );

  pll320_model #(.T_REF_PS(T), .DELAY_PS(DLY)) u_pll (
    .CLKA(clk40), .POWERDOWN(powerdown_n), .stop_glb,
    .GLA(clk80), .GLB(clk_0), .GLC(clk_90), .LOCK(lock)
  );

  // SEU clock: the frequency-selected PLL output, gated on and off by the run procedure
  initial forever begin
    #(seu_half_ps);
    seu_clk = seu_clk_en ? ~seu_clk : 1'b0;
  end

  always #(T/2) clk40 = ~clk40;

  always #50 begin
    automatic longint r = (longint'($time) - T/2 - (DLY + ((int'(SET) + 16) % 32) * BIN + BIN/2 - 50)) % T;
    if (r < 0) r += T;
    hit = (r < T/2);
  end

  initial begin : watchdog
    #(longint'(T) * 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endfunction

  // ---------------- SEU section: one run per frequency
  task automatic seu_run(input int fi, input int mhz, input int kind);
    longint t_start, t_end, t_exp;
    seu_half_ps = 500000 / mhz;     // half period in ps
    seu_clk_en = 1'b0;
    seu_rst_n = 1'b0;
    #(4 * seu_half_ps);
    check(seu_result == 0 && !seu_done, "SEU reset");
    seu_rst_n = 1'b1;
    #(seu_half_ps / 2);
    seu_clk_en = 1'b1;              // start: enable the PLL clock
    @(posedge seu_clk);
    t_start = $time;
    if (kind == 1) begin            // upset in the chain, half-way through
      repeat ((1 << TRIG) / 2) @(posedge seu_clk);
      #1 dut.u_seu_core.u_chain.stage[DEPTH/2] = ~dut.u_seu_core.u_chain.stage[DEPTH/2];
      n_chain_upset++;
    end
    @(posedge seu_done);
    t_end = $time;
    repeat (20) @(posedge seu_clk);
    seu_clk_en = 1'b0;              // end: disable the PLL clock
    #(4 * seu_half_ps);
    // the first edge counts as cycle 1, so done rises 2^TRIG - 1 periods after it
    t_exp = longint'((1 << TRIG) - 1) * 2 * seu_half_ps;
    check(t_end - t_start == t_exp, "run length 2^TRIGGER_BIT clock periods");
    check(seu_data_count == (TRIG+1)'(1 << TRIG), "data counter stopped at the trigger");
    if (kind == 2) begin            // upset in one result copy, after the run
      dut.u_seu_core.g_result[0].u_result_ctr.count[2] =
        ~dut.u_seu_core.g_result[0].u_result_ctr.count[2];
      #1;
      check(seu_mismatch && seu_result == (TRIG+1)'(CLEAN), "copy upset outvoted and flagged");
      n_copy_upset++;
    end else if (kind == 1) begin
      check(!seu_mismatch, "copies agree");
      check(seu_result == (TRIG+1)'(CLEAN + 1) || seu_result == (TRIG+1)'(CLEAN - 1),
            "chain upset changes the count by one");
    end else begin
      check(!seu_mismatch && seu_result == (TRIG+1)'(CLEAN), "clean run count");
    end
    n_seu_run++;
    n_freq[fi]++;
  endtask

  initial begin : seu_thread
    seu_run(0, 40, 0);
    seu_run(1, 80, 1);
    seu_run(2, 160, 2);
    seu_run(3, 240, 0);
    seu_finished = 1;
  end

  // ---------------- PLL-test section
  task automatic pll_start();
    pll_rst_n = 1'b0;
    powerdown_n = 1'b0;
    tdc_value = ~SET;
    stop_glb = 1'b0;
    repeat (2) @(posedge clk40);
    #(T/4);
    check(total_count == 0 && result_count == 0 && !lock, "PLL test reset");
    pll_rst_n = 1'b1;
    powerdown_n = 1'b1;
    repeat (20) @(posedge clk40);
    #(T/4);
    check(lock && all_ok && tdc == SET && led_tdc == SET, "PLL locked and checked good");
    n_pll_lock++;
  endtask

  // counting window of n cycles, error made at cycle err_at (kind 1 TDC, 2 clock)
  task automatic pll_window(input int n, input int err_at, input int kind);
    int et = 0, er = 0;
    bit bad_tdc = 0, bad_clk = 0;
    #0 pll_run = 1'b1;
    for (int i = 0; i < n; i++) begin
      if (i == err_at && kind == 1) tdc_value = ~5'd7;
      if (i == err_at && kind == 2) stop_glb = 1'b1;
      @(posedge clk40);
      if (i == err_at + 1 && kind == 1) bad_tdc = 1;
      if (i == err_at + 1 && kind == 2) bad_clk = 1;
      if (!bad_clk) et++;
      if (!bad_clk && !bad_tdc) er++;
      #(T/4);
    end
    pll_run = 1'b0;
    repeat (3) @(posedge clk40);
    #(T/4);
    check(total_count == W'(et) && result_count == W'(er), "voted PLL counts");
    check(!total_mismatch && !result_mismatch, "PLL counter copies agree");
    if (kind == 1) begin
      check(led_tdc_ok_n && !all_ok && pllclk_runs, "TDC error shown");
      n_tdc_err++;
    end
    if (kind == 2) begin
      check(led_pllclk_runs_n && !all_ok, "clock error shown");
      n_clk_err++;
    end
    n_pll_window++;
  endtask

  initial begin : pll_thread
    pll_start();
    pll_window(200, -1, 0);
    pll_start();
    pll_window(200, 50, 1);
    pll_start();
    pll_window(200, 120, 2);
    pll_finished = 1;
  end

  initial begin
    wait (seu_finished && pll_finished);
    check(n_seu_run == 4, "four SEU runs");
    foreach (n_freq[i]) check(n_freq[i] > 0, "every clock frequency used");
    check(n_chain_upset > 0, "chain upset happened");
    check(n_copy_upset > 0, "result copy upset happened");
    check(n_pll_lock > 0, "PLL lock and checker start-up happened");
    check(n_pll_window > 0, "PLL counting window happened");
    check(n_tdc_err > 0, "TDC error happened");
    check(n_clk_err > 0, "clock error happened");
    $display("SEU runs %0d (40/80/160/240 MHz: %0d/%0d/%0d/%0d), chain upsets %0d, copy upsets %0d",
             n_seu_run, n_freq[0], n_freq[1], n_freq[2], n_freq[3], n_chain_upset, n_copy_upset);
    $display("PLL starts %0d, windows %0d, TDC errors %0d, clock errors %0d",
             n_pll_lock, n_pll_window, n_tdc_err, n_clk_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
