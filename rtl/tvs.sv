// tvs: triple voting of three copies of a counter.
//
// Each output bit is the 2-of-3 majority of the same bit in the three copies, so an upset in
// any one copy is outvoted. mismatch is high whenever the copies are not all equal, which
// tells the readout that one copy has been hit even though the voted value is still right.
// Triple voting of three result counters follows the design; bitwise majority and the
// mismatch flag are this design's own choice of how to vote.
//
// Timing: purely combinational.
module tvs #(
  parameter int unsigned WIDTH = irradiation_pkg::TRIGGER_BIT_DEF + 1
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] c,
  output logic [WIDTH-1:0] voted,
  output logic             mismatch
);

  always_comb begin
    voted    = (a & b) | (a & c) | (b & c);
    mismatch = (a != b) || (a != c);
  end

endmodule
