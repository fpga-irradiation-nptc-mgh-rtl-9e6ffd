// hitreg: self-test of a PLL that makes 80 MHz and two 320 MHz clocks (0 and 90 degrees)
// from a 40 MHz reference.
//
// Three parts check the PLL continuously. The TDC (module tdc) measures, in 0.78 ns bins,
// where in the 40 MHz period the hit input rises; on the board hit is the 40 MHz clock
// itself, looped back through a short jumper, so a healthy PLL always gives the same bin.
// The TDC check (module tdc_check) compares each value with the value set on two rotary
// switches, and the clock check (module clock_check) counts PLL clock edges per half period
// of clk40. Errors are latched until reset for the LEDs, and all_ok is high while neither a
// TDC error nor a clock error has been seen.
//
// Ports follow the checker's original interface. tdc_value comes from switches that read
// inverted, so the expected value is ~tdc_value. The LED outputs ending in _n are active
// low. rst_n is the PLL lock signal: the checker restarts whenever the PLL loses lock.
// All of this follows the design; only the split into three sub-modules is this design's own.
//
// Timing: tdc and valid change on the rising edge of clk40, two clk40 cycles after the
// period they measure ends; tdc_ok on the falling edge; the latched outputs settle seven
// clk40 cycles after rst_n rises and change on rising clk40.
module hitreg
  import irradiation_pkg::*;
(
  output logic       all_ok,
  input  logic       clk40,
  input  logic       clk80,
  input  logic       clk_0,
  input  logic       clk_90,
  input  logic       hit,
  output logic       led_pllclk_runs_n,
  output tdc_value_t led_tdc,
  output logic       led_tdc_ok_n,
  output logic       pllclk_runs,
  input  logic       rst_n,
  output tdc_value_t tdc,
  output logic       tdc_ok,
  input  tdc_value_t tdc_value,
  output logic       valid
);

  tdc_value_t          chan;
  logic                ld_valid;
  logic                pllclk_runs_live;
  logic                led_tdc_ok, led_pllclk_runs;

  tdc u_tdc (
    .clk_0, .clk_90, .clk80, .clk40, .rst_n, .hit,
    .chan, .valid(ld_valid), .window()
  );

  clock_check u_clock_check (
    .clk_0, .clk_90, .clk80, .clk40, .rst_n, .pllclk_runs(pllclk_runs_live)
  );

  tdc_check u_tdc_check (
    .clk40, .rst_n, .chan, .valid(ld_valid), .set_value(~tdc_value),
    .pllclk_runs(pllclk_runs_live), .tdc_ok, .led_chan(led_tdc),
    .led_tdc_ok, .led_pllclk_runs
  );

  assign all_ok            = led_pllclk_runs && led_tdc_ok;
  assign pllclk_runs       = led_pllclk_runs;
  assign tdc               = chan;
  assign valid             = ld_valid;
  assign led_pllclk_runs_n = !led_pllclk_runs;
  assign led_tdc_ok_n      = !led_tdc_ok;

endmodule
