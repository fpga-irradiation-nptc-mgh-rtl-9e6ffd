// tdc_check: compares the TDC output with its set value and latches errors for the LEDs.
//
// On the falling edge of clk40, whenever the TDC reports a valid value, tdc_ok is set if the
// value equals set_value and cleared otherwise; without a valid value tdc_ok keeps its state.
// A 4-bit start-up counter runs from reset up to 7 and stays there. When it reaches 6 the
// latches are initialised: the TDC-ok and clock-ok flags to 1 and the displayed value to the
// current TDC value. From 7 onward each latch records a failure and holds it until reset:
// a failing comparison clears led_tdc_ok and shows the failing TDC value on led_chan, and a
// failing clock check clears led_pllclk_runs. The behaviour, including the start-up delay
// that lets the TDC fill after the PLL locks, follows the design.
//
// Interface: rst_n (the PLL lock) clears everything asynchronously. tdc_ok changes on the
// falling edge of clk40, the latches on the rising edge. set_value is the expected bin in
// true polarity.
module tdc_check
  import irradiation_pkg::*;
(
  input  logic       clk40,
  input  logic       rst_n,
  input  tdc_value_t chan,            // TDC value
  input  logic       valid,           // TDC value is valid
  input  tdc_value_t set_value,       // expected TDC value
  input  logic       pllclk_runs,     // live result of the clock check
  output logic       tdc_ok,          // live result of the comparison
  output tdc_value_t led_chan,        // first value, then the last failing value
  output logic       led_tdc_ok,      // no TDC error since start-up
  output logic       led_pllclk_runs  // no clock error since start-up
);

  localparam logic [3:0] INIT_CNT  = 4'd6;
  localparam logic [3:0] CHECK_CNT = 4'd7;

  logic [3:0] lockcnt;

  always_ff @(negedge clk40 or negedge rst_n)
    if (!rst_n)     tdc_ok <= 1'b0;
    else if (valid) tdc_ok <= (chan == set_value);

  always_ff @(posedge clk40 or negedge rst_n)
    if (!rst_n)                  lockcnt <= '0;
    else if (lockcnt != CHECK_CNT) lockcnt <= lockcnt + 1'b1;

  always_ff @(posedge clk40 or negedge rst_n)
    if (!rst_n) begin
      led_chan        <= '0;
      led_tdc_ok      <= 1'b0;
      led_pllclk_runs <= 1'b0;
    end else if (lockcnt == INIT_CNT) begin
      led_chan        <= chan;
      led_tdc_ok      <= 1'b1;
      led_pllclk_runs <= 1'b1;
    end else if (lockcnt == CHECK_CNT) begin
      if (!tdc_ok) begin
        led_chan   <= chan;
        led_tdc_ok <= 1'b0;
      end
      if (!pllclk_runs) led_pllclk_runs <= 1'b0;
    end

endmodule
