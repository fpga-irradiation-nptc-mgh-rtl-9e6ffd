// seu_core: the core section of the irradiation test framework for single event upsets.
//
// A data counter runs from reset; its LSB, a 0101... pattern, is shifted through a long
// chain of flip-flops, the part placed under the beam. Three independent result counters
// count the ones that leave the end of the chain, and a triple voter combines them into the
// result that is read out. When the data counter's trigger bit sets, after 2^TRIGGER_BIT
// cycles (about 3.5 minutes at 40 MHz for bit 33), the result counters stop and done rises;
// the counts then hold until reset. Without upsets the voted result equals the number of
// ones the counter LSB put into the chain up to DEPTH cycles before the trigger;
// every upset in the chain shows as a departure from that number.
//
// The clock is the PLL output whose frequency the host selects (40, 80, 160 or 240 MHz);
// the PLL is outside this module. The structure (data counter, chain, three result
// counters, voter, trigger bit) follows the design. Counting ones at the chain output,
// stopping at the trigger and the default chain length are this design's own choices.
//
// Timing: everything on the rising edge of clk with an asynchronous active-low reset.
module seu_core #(
  parameter int unsigned TRIGGER_BIT = irradiation_pkg::TRIGGER_BIT_DEF,
  parameter int unsigned DEPTH       = irradiation_pkg::CHAIN_DEPTH_DEF
) (
  input  logic                 clk,
  input  logic                 rst_n,
  output logic [TRIGGER_BIT:0] data_count,  // data counter, for readout
  output logic [TRIGGER_BIT:0] result,      // voted result count
  output logic [2:0][TRIGGER_BIT:0] result_copies, // the three copies, for readout
  output logic                 mismatch,    // the three copies differ
  output logic                 done         // trigger bit: run finished
);

  logic data, chain_out;

  data_counter #(.TRIGGER_BIT(TRIGGER_BIT)) u_data_ctr (
    .clk, .rst_n, .count(data_count), .data, .trigger(done)
  );

  shift_register_chain #(.DEPTH(DEPTH)) u_chain (
    .clk, .rst_n, .din(data), .dout(chain_out)
  );

  for (genvar i = 0; i < 3; i++) begin : g_result
    result_counter #(.WIDTH(TRIGGER_BIT + 1)) u_result_ctr (
      .clk, .rst_n, .en(!done), .hit(chain_out), .count(result_copies[i])
    );
  end

  tvs #(.WIDTH(TRIGGER_BIT + 1)) u_tvs (
    .a(result_copies[0]), .b(result_copies[1]), .c(result_copies[2]),
    .voted(result), .mismatch
  );

endmodule
