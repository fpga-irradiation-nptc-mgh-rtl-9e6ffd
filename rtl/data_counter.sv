// data_counter: source of test data and run length for the SEU core section.
//
// A binary up-counter of TRIGGER_BIT+1 bits, cleared by the asynchronous active-low reset.
// Its LSB toggles every cycle and is the data shifted into the shift register chain; its
// MSB is the trigger bit. When the trigger bit sets, after 2^TRIGGER_BIT clock cycles, the
// counter stops, so the trigger stays high until the next reset and marks the end of the run
// (about 3.5 minutes at 40 MHz with the default bit 33). Using the LSB as data and the MSB
// as trigger follows the design; stopping the counter at the trigger is this design's own
// choice.
//
// Timing: count, data and trigger are registered outputs; the first cycle after reset
// drives data = 0, and trigger rises 2^TRIGGER_BIT rising edges after reset is released.
module data_counter #(
  parameter int unsigned TRIGGER_BIT = irradiation_pkg::TRIGGER_BIT_DEF
) (
  input  logic                 clk,
  input  logic                 rst_n,
  output logic [TRIGGER_BIT:0] count,    // whole counter, for readout
  output logic                 data,     // LSB: data into the shift register chain
  output logic                 trigger   // MSB: run finished
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 count <= '0;
    else if (!count[TRIGGER_BIT]) count <= count + 1'b1;
  end

  assign data    = count[0];
  assign trigger = count[TRIGGER_BIT];

endmodule
