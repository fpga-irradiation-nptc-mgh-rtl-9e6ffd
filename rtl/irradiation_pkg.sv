// irradiation_pkg: constants shared by the blocks of the FPGA irradiation test design.
//
// The SEU core section counts for 2^TRIGGER_BIT cycles of its clock; with the trigger on
// bit 33 a run lasts 2^33 / 40 MHz = 215 s, about 3.5 minutes. The PLL-test TDC splits one
// 25 ns period of the 40 MHz clock into 32 bins of 0.78 ns, taken with both edges of a
// 0 degree and a 90 degree 320 MHz clock; a TDC value is therefore 5 bits wide.
// The bin count, the sampling clocks and the trigger bit follow the design this RTL
// implements; the counter width of the PLL-test counters is this design's own choice.
package irradiation_pkg;

  // SEU core section
  localparam int unsigned TRIGGER_BIT_DEF = 33;    // data counter bit that ends a run
  localparam int unsigned CHAIN_DEPTH_DEF = 1024;  // flip-flops in the shift register chain

  // PLL-test TDC
  localparam int unsigned TDC_PHASES = 4;          // 0, 90 degree, rising and falling edges
  localparam int unsigned TDC_DEPTH  = 8;          // 320 MHz samples per 40 MHz period
  localparam int unsigned TDC_BINS   = TDC_PHASES * TDC_DEPTH;  // 32 bins of 0.78 ns
  localparam int unsigned TDC_W      = $clog2(TDC_BINS);        // 5-bit TDC value

  typedef logic [TDC_W-1:0] tdc_value_t;

  // PLL-test counters (width of the total and result counters)
  localparam int unsigned PLL_CNT_W_DEF = 34;

endpackage
