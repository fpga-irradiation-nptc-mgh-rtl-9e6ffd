// clock_check: checks that the three PLL output clocks run at the right rate.
//
// While clk40 is high, three small counters count the rising edges of clk_0 and clk_90
// (320 MHz) and of clk80 (80 MHz); while clk40 is low they are held at zero. On the falling
// edge of clk40, before the counters clear, the result is registered: the clocks run if
// both 320 MHz counts are 3 or 4 (4 nominal, 3 allowed for an edge that coincides with the
// clk40 edge) and the 80 MHz count is exactly 1. A stopped or wrong-frequency PLL output
// gives other counts and clears pllclk_runs. Counter widths, the accepted counts and the
// edges follow the design.
//
// Interface: rst_n clears pllclk_runs asynchronously; pllclk_runs changes on the falling
// edge of clk40 and reflects the preceding high half of clk40.
//
// Circuit note: clk40 is used as the asynchronous clear of the three edge counters. That is
// how the check measures one half period of clk40 and is intended.
module clock_check (
  input  logic clk_0,
  input  logic clk_90,
  input  logic clk80,
  input  logic clk40,
  input  logic rst_n,
  output logic pllclk_runs
);

  logic [2:0] cnt_0, cnt_90;
  logic [1:0] cnt80;

  always_ff @(posedge clk_0 or negedge clk40)
    if (!clk40) cnt_0 <= '0;
    else        cnt_0 <= cnt_0 + 1'b1;

  always_ff @(posedge clk_90 or negedge clk40)
    if (!clk40) cnt_90 <= '0;
    else        cnt_90 <= cnt_90 + 1'b1;

  always_ff @(posedge clk80 or negedge clk40)
    if (!clk40) cnt80 <= '0;
    else        cnt80 <= cnt80 + 1'b1;

  always_ff @(negedge clk40 or negedge rst_n)
    if (!rst_n) pllclk_runs <= 1'b0;
    else        pllclk_runs <= (cnt_0  inside {3'd3, 3'd4}) &&
                               (cnt_90 inside {3'd3, 3'd4}) &&
                               (cnt80 == 2'd1);

endmodule
