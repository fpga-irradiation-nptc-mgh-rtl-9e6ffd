// tb_top_default: the top with every parameter at its default (run length 2^33 cycles,
// 1024-stage chain, 34-bit counters).
//
// A full SEU run of 2^33 cycles is too long to simulate, so the SEU section is run for the
// first 2^24 cycles only: the data counter, the voted result (against a reference model of
// the 1024-cycle chain latency) and the still-low trigger are checked, and an upset written
// into the chain must change the count by exactly one. The PLL-test section goes through a
// complete operation at the same time: PLL lock, checker start-up, a 500-cycle counting
// window with the voted counters read back, then a TDC error that stops the result count.
// The PLL reference is scaled to a 25.6 ns period so that all edges fall on whole picoseconds.
module tb_top_default;
  import irradiation_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned TRIG = TRIGGER_BIT_DEF;
  localparam int unsigned DEPTH = CHAIN_DEPTH_DEF;
  localparam int unsigned W = PLL_CNT_W_DEF;
  localparam int T = 25600;
  localparam int DLY = 100;
  localparam int BIN = T / 32;
  localparam tdc_value_t SET = 5'h0D;
  localparam int unsigned SEU_CYCLES = 1 << 24;

  logic seu_clk = 1'b0, seu_rst_n = 1'b1;
  logic [TRIG:0] seu_data_count, seu_result;
  logic [2:0][TRIG:0] seu_result_copies;
  logic seu_mismatch, seu_done;

  logic clk40 = 1'b0, hit = 1'b0, powerdown_n = 1'b0;
  logic pll_rst_n = 1'b1, pll_run = 1'b0;
  logic clk_0, clk_90, clk80, lock;
  tdc_value_t tdc_value = ~SET;
  logic all_ok, led_pllclk_runs_n, led_tdc_ok_n, pllclk_runs, tdc_ok, valid;
  tdc_value_t led_tdc, tdc;
  logic [W-1:0] total_count, result_count;
  logic total_mismatch, result_mismatch;

  int checks = 0, failures = 0;
  bit seu_finished = 0, pll_finished = 0;

  fpga_irradiation_top dut (
    .seu_clk, .seu_rst_n, .seu_data_count, .seu_result, .seu_result_copies, .seu_mismatch,
    .seu_done,
    .clk40, .clk80, .clk_0, .clk_90, .pll_lock(lock), .pll_rst_n, .pll_run, .hit, .tdc_value,
    .all_ok, .pllclk_runs, .tdc, .tdc_ok, .valid, .led_tdc, .led_tdc_ok_n, .led_pllclk_runs_n,
    .total_count, .total_mismatch, .result_count, .result_mismatch
  );

  pll320_model #(.T_REF_PS(T), .DELAY_PS(DLY)) u_pll (
    .CLKA(clk40), .POWERDOWN(powerdown_n), .stop_glb(1'b0),
    .GLA(clk80), .GLB(clk_0), .GLC(clk_90), .LOCK(lock)
  );

  // the PLL-test clocks and hit stop once that section is done, to keep the simulation short
  initial while (!pll_finished) #(T/2) clk40 = ~clk40;

  initial while (!pll_finished) begin
    automatic longint r;
    #50;
    r = (longint'($time) - T/2 - (DLY + ((int'(SET) + 16) % 32) * BIN + BIN/2 - 50)) % T;
    if (r < 0) r += T;
    hit = (r < T/2);
  end

  initial begin : watchdog
    #(longint'(SEU_CYCLES) * 25000 * 2);
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

  // ones that have left the chain after n clean cycles: the data counter's LSB is 1 in
  // cycles 2, 4, ... and reaches the counters DEPTH cycles later
  function automatic longint clean_ones(input longint n);
    return (n > DEPTH) ? (n - DEPTH) / 2 : 0;
  endfunction

  initial begin : seu_thread
    #1 seu_rst_n = 1'b0;
    #10000 seu_rst_n = 1'b1;
    #5000;
    // 40 MHz clock
    for (int unsigned i = 1; i <= SEU_CYCLES; i++) begin
      seu_clk = 1'b1;
      #12500 seu_clk = 1'b0;
      if (i == SEU_CYCLES / 2) begin
        check(seu_result == (TRIG+1)'(clean_ones(i)), "SEU result half-way");
        dut.u_seu_core.u_chain.stage[100] = ~dut.u_seu_core.u_chain.stage[100];
      end
      #12500;
    end
    check(seu_data_count == (TRIG+1)'(SEU_CYCLES), "data counter");
    check(!seu_done, "trigger still low");
    check(!seu_mismatch, "result copies agree");
    check(seu_result == (TRIG+1)'(clean_ones(SEU_CYCLES) + 1) ||
          seu_result == (TRIG+1)'(clean_ones(SEU_CYCLES) - 1), "chain upset counted");
    seu_finished = 1;
  end

  initial begin : pll_thread
    int et, er;
    #1 pll_rst_n = 1'b0;
    repeat (2) @(posedge clk40);
    #(T/4);
    pll_rst_n = 1'b1;
    powerdown_n = 1'b1;
    repeat (20) @(posedge clk40);
    #(T/4);
    check(lock && all_ok && pllclk_runs && tdc == SET && !led_tdc_ok_n, "PLL checked good");
    pll_run = 1'b1;
    repeat (500) @(posedge clk40);
    #(T/4);
    pll_run = 1'b0;
    repeat (3) @(posedge clk40);
    #(T/4);
    check(total_count == W'(500) && result_count == W'(500), "clean counting window");
    pll_run = 1'b1;
    repeat (100) @(posedge clk40);
    #(T/4);
    tdc_value = ~5'd1;               // wrong set value: TDC error from the next edge on
    repeat (100) @(posedge clk40);
    #(T/4);
    pll_run = 1'b0;
    repeat (3) @(posedge clk40);
    #(T/4);
    check(total_count == W'(700) && result_count == W'(601), "TDC error stops the result count");
    check(!all_ok && led_tdc_ok_n && !total_mismatch && !result_mismatch, "error shown");
    pll_finished = 1;
  end

  initial begin
    wait (seu_finished && pll_finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
