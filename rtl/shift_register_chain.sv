// shift_register_chain: the flip-flop chain exposed to the beam in the SEU core section.
//
// DEPTH flip-flops in series, all cleared by the asynchronous active-low reset. Each rising
// clock edge moves every bit one stage on and takes din into stage 0; dout is the last stage.
// A single event upset in any stage changes the bit stream seen at dout, which the result
// counters behind the chain turn into a changed count. The chain itself follows the design;
// its length is not fixed there and DEPTH = 1024 is this design's own choice.
//
// Timing: dout(t) = din(t - DEPTH) for an unperturbed chain, i.e. DEPTH cycles of latency.
module shift_register_chain #(
  parameter int unsigned DEPTH = irradiation_pkg::CHAIN_DEPTH_DEF
) (
  input  logic clk,
  input  logic rst_n,
  input  logic din,
  output logic dout
);

  logic [DEPTH-1:0] stage;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) stage <= '0;
    else        stage <= {stage[DEPTH-2:0], din};
  end

  assign dout = stage[DEPTH-1];

endmodule
