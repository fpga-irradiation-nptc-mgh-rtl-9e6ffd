// fpga_irradiation_top: FPGA design for proton irradiation tests, with two core sections.
//
// The SEU core section (seu_core) runs a data counter into a long shift register chain and
// counts, in three voted copies, what comes out, for a fixed run length set by the counter's
// trigger bit. The PLL-test core section (pll_test_core) checks a PLL continuously with a
// TDC and a clock-rate check and counts, in three voted copies each, how long the PLL stayed
// correct. The two sections stand side by side with their own clocks and ports; the board
// chooses which one a run uses.
//
// Outside this module: the PLL that makes the SEU clock (40, 80, 160 or 240 MHz, enabled by
// the host at the start of a run and disabled at its end), the PLL whose outputs the PLL
// test checks (clk80, clk_0, clk_90 and its lock signal), the LVDS pad buffers, and the
// host link that starts runs and reads the counters. Their signals are ports here.
//
// Timing: seu_* signals belong to seu_clk; the PLL-test signals to clk40 (the checker's
// internals also use clk80, clk_0 and clk_90). Resets are asynchronous and active low.
module fpga_irradiation_top
  import irradiation_pkg::*;
#(
  parameter int unsigned TRIGGER_BIT = TRIGGER_BIT_DEF,
  parameter int unsigned DEPTH       = CHAIN_DEPTH_DEF,
  parameter int unsigned PLL_CNT_W   = PLL_CNT_W_DEF
) (
  // ---- SEU core section
  input  logic                      seu_clk,
  input  logic                      seu_rst_n,
  output logic [TRIGGER_BIT:0]      seu_data_count,
  output logic [TRIGGER_BIT:0]      seu_result,
  output logic [2:0][TRIGGER_BIT:0] seu_result_copies,
  output logic                      seu_mismatch,
  output logic                      seu_done,
  // ---- PLL-test core section
  input  logic                      clk40,
  input  logic                      clk80,
  input  logic                      clk_0,
  input  logic                      clk_90,
  input  logic                      pll_lock,
  input  logic                      pll_rst_n,
  input  logic                      pll_run,
  input  logic                      hit,
  input  tdc_value_t                tdc_value,
  output logic                      all_ok,
  output logic                      pllclk_runs,
  output tdc_value_t                tdc,
  output logic                      tdc_ok,
  output logic                      valid,
  output tdc_value_t                led_tdc,
  output logic                      led_tdc_ok_n,
  output logic                      led_pllclk_runs_n,
  output logic [PLL_CNT_W-1:0]      total_count,
  output logic                      total_mismatch,
  output logic [PLL_CNT_W-1:0]      result_count,
  output logic                      result_mismatch
);

  seu_core #(.TRIGGER_BIT(TRIGGER_BIT), .DEPTH(DEPTH)) u_seu_core (
    .clk(seu_clk), .rst_n(seu_rst_n), .data_count(seu_data_count), .result(seu_result),
    .result_copies(seu_result_copies), .mismatch(seu_mismatch), .done(seu_done)
  );

  pll_test_core #(.CNT_W(PLL_CNT_W)) u_pll_test_core (
    .clk40, .clk80, .clk_0, .clk_90, .pll_lock, .rst_n(pll_rst_n), .run(pll_run), .hit,
    .tdc_value, .all_ok, .pllclk_runs, .tdc, .tdc_ok, .valid, .led_tdc, .led_tdc_ok_n,
    .led_pllclk_runs_n, .total_count, .total_mismatch, .result_count, .result_mismatch
  );

endmodule
