// tdc: 32-bin time-to-digital converter that measures where the hit input rises within one
// 25 ns period of the 40 MHz clock.
//
// How it works. Four 8-bit shift registers sample hit on four phases of the 320 MHz PLL
// clock: rising clk_0, rising clk_90, falling clk_0 and falling clk_90. Together they take a
// sample every 0.78 ns. On the falling edge of clk40 the two rising-edge registers are copied
// into hold registers, and on the rising edge of clk80 (which coincides with that falling
// edge of clk40) the two falling-edge registers are. On the rising edge of clk40 the hold
// registers are interleaved into one 32-bit word, oldest sample in bit 0: bit 4k+p is
// sample k of phase p. One clk40 cycle later the lowest bit position j with bit j = 0 and
// bit j+1 = 1 is registered as the TDC value, with valid set; for j = 31 the bit after the
// word is the oldest 0-degree sample of the next period. No transition gives value 0 with
// valid low.
//
// All of this (phases, registers, the edges that move them, the bit order, the priority
// from bit 0 upward) follows the design. The generic array-and-loop form is this design's
// own.
//
// Interface: rst_n clears every register asynchronously. chan and valid change on the
// rising edge of clk40. clk80 must rise with the falling edge of clk40, and clk_0 / clk_90
// must be 8x clk40 at 0 and 90 degrees.
//
// Circuit note: registers here are clocked on both edges of two clocks and on clk40 and
// clk80; this is the point of the design, a multi-phase sampling TDC.
module tdc
  import irradiation_pkg::*;
(
  input  logic       clk_0,   // 320 MHz, 0 degrees
  input  logic       clk_90,  // 320 MHz, 90 degrees
  input  logic       clk80,   // 80 MHz
  input  logic       clk40,   // 40 MHz reference
  input  logic       rst_n,
  input  logic       hit,
  output tdc_value_t chan,    // bin of the first rising edge of hit
  output logic       valid,   // a rising edge was found
  output logic [TDC_BINS-1:0] window  // the 32 samples of one period, oldest in bit 0
);

  // phase index p: 0 = clk_0 rising, 1 = clk_90 rising, 2 = clk_0 falling, 3 = clk_90 falling
  // Each phase has its own sample register (newest sample in the top bit) and hold register.
  logic [TDC_DEPTH-1:0] shreg0, shreg1, shreg2, shreg3;
  logic [TDC_DEPTH-1:0] hold0, hold1, hold2, hold3;
  logic [TDC_PHASES-1:0][TDC_DEPTH-1:0] hold;

  // ---- sampling: each phase shifts toward bit 0, new sample in the top bit
  always_ff @(posedge clk_0 or negedge rst_n)
    if (!rst_n) shreg0 <= '0;
    else        shreg0 <= {hit, shreg0[TDC_DEPTH-1:1]};

  always_ff @(posedge clk_90 or negedge rst_n)
    if (!rst_n) shreg1 <= '0;
    else        shreg1 <= {hit, shreg1[TDC_DEPTH-1:1]};

  always_ff @(negedge clk_0 or negedge rst_n)
    if (!rst_n) shreg2 <= '0;
    else        shreg2 <= {hit, shreg2[TDC_DEPTH-1:1]};

  always_ff @(negedge clk_90 or negedge rst_n)
    if (!rst_n) shreg3 <= '0;
    else        shreg3 <= {hit, shreg3[TDC_DEPTH-1:1]};

  // ---- hold: rising-edge phases on falling clk40, falling-edge phases on rising clk80
  always_ff @(negedge clk40 or negedge rst_n)
    if (!rst_n) begin
      hold0 <= '0;
      hold1 <= '0;
    end else begin
      hold0 <= shreg0;
      hold1 <= shreg1;
    end

  always_ff @(posedge clk80 or negedge rst_n)
    if (!rst_n) begin
      hold2 <= '0;
      hold3 <= '0;
    end else begin
      hold2 <= shreg2;
      hold3 <= shreg3;
    end

  assign hold = {hold3, hold2, hold1, hold0};

  // ---- interleave into one time-ordered word on rising clk40
  always_ff @(posedge clk40 or negedge rst_n)
    if (!rst_n) window <= '0;
    else
      for (int k = 0; k < TDC_DEPTH; k++)
        for (int p = 0; p < TDC_PHASES; p++)
          window[TDC_PHASES*k + p] <= hold[p][k];

  // ---- priority encoder: first 0 -> 1 transition from bit 0 upward
  logic [TDC_BINS:0] ext;
  tdc_value_t        first_bin;
  logic              found;

  always_comb begin
    ext       = {hold[0][0], window};
    first_bin = '0;
    found     = 1'b0;
    for (int j = TDC_BINS - 1; j >= 0; j--)
      if (!ext[j] && ext[j+1]) begin
        first_bin = tdc_value_t'(j);
        found     = 1'b1;
      end
  end

  always_ff @(posedge clk40 or negedge rst_n)
    if (!rst_n) begin
      chan  <= '0;
      valid <= 1'b0;
    end else begin
      chan  <= first_bin;
      valid <= found;
    end

endmodule
