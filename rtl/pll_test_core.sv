// pll_test_core: the PLL checker fitted into the irradiation test framework as a core section.
//
// The checker (module hitreg) drives two status lines: "PLL clock runs" and "All ok". For
// readout during irradiation each line feeds three counters that are triple voted. The
// total counters count the clk40 cycles of the run in which the PLL clocks were found
// running; the result counters count the cycles in which everything, clocks and TDC value,
// was found correct. As both lines are latched failures, the counts give the time from the
// start of the run to the first clock error and to the first error of any kind; a count equal
// to the run length means no error was seen. The checker's own LEDs, TDC value and switch
// inputs stay as they are.
//
// The checker, its status lines, the "Total CTR x3" and "Result CTR x3" blocks and their
// voting follow the design. What each counter counts, the run input and the counter width
// are this design's own choices.
//
// Interface: rst_n clears the counters (framework reset); pll_lock restarts the checker.
// run, from the host, opens the counting window and must be synchronous to clk40. Counters
// update on the rising edge of clk40.
module pll_test_core
  import irradiation_pkg::*;
#(
  parameter int unsigned CNT_W = PLL_CNT_W_DEF
) (
  input  logic       clk40,
  input  logic       clk80,
  input  logic       clk_0,
  input  logic       clk_90,
  input  logic       pll_lock,
  input  logic       rst_n,
  input  logic       run,
  input  logic       hit,
  input  tdc_value_t tdc_value,         // set value, inverted (switch inputs)
  // checker outputs
  output logic       all_ok,
  output logic       pllclk_runs,
  output tdc_value_t tdc,
  output logic       tdc_ok,
  output logic       valid,
  output tdc_value_t led_tdc,
  output logic       led_tdc_ok_n,
  output logic       led_pllclk_runs_n,
  // voted counters
  output logic [CNT_W-1:0] total_count,
  output logic             total_mismatch,
  output logic [CNT_W-1:0] result_count,
  output logic             result_mismatch
);

  hitreg u_hitreg (
    .all_ok, .clk40, .clk80, .clk_0, .clk_90, .hit,
    .led_pllclk_runs_n, .led_tdc, .led_tdc_ok_n, .pllclk_runs,
    .rst_n(pll_lock), .tdc, .tdc_ok, .tdc_value, .valid
  );

  logic [2:0][CNT_W-1:0] total_copy, result_copy;

  for (genvar i = 0; i < 3; i++) begin : g_ctr
    result_counter #(.WIDTH(CNT_W)) u_total_ctr (
      .clk(clk40), .rst_n, .en(run), .hit(pllclk_runs), .count(total_copy[i])
    );
    result_counter #(.WIDTH(CNT_W)) u_result_ctr (
      .clk(clk40), .rst_n, .en(run), .hit(all_ok), .count(result_copy[i])
    );
  end

  tvs #(.WIDTH(CNT_W)) u_total_tvs (
    .a(total_copy[0]), .b(total_copy[1]), .c(total_copy[2]),
    .voted(total_count), .mismatch(total_mismatch)
  );

  tvs #(.WIDTH(CNT_W)) u_result_tvs (
    .a(result_copy[0]), .b(result_copy[1]), .c(result_copy[2]),
    .voted(result_count), .mismatch(result_mismatch)
  );

endmodule
