// result_counter: one copy of a triplicated result counter.
//
// Counts the rising clock edges at which both en and hit are high; cleared by the
// asynchronous active-low reset, and wrapping at 2^WIDTH. The design keeps three such
// counters per result ("Result CTR x3", "Total CTR x3") and votes between them; this module
// is one copy. What the counters count (cycles in which their input bit is high) and their
// width are this design's own reading of the design.
//
// Timing: count is registered; it shows an accepted cycle one edge later.
module result_counter #(
  parameter int unsigned WIDTH = irradiation_pkg::TRIGGER_BIT_DEF + 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,     // counting window (run in progress)
  input  logic             hit,    // bit to be counted
  output logic [WIDTH-1:0] count
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        count <= '0;
    else if (en && hit) count <= count + 1'b1;
  end

endmodule
