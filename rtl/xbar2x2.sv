// xbar2x2: the 2x2 crossbar switch of the concentrator's first stage.
//
// Two inputs reach two outputs either straight (swap = 0: a -> y0,
// b -> y1) or crossed (swap = 1: a -> y1, b -> y0). As in the networks it
// is used in, the switch is made of exactly two 2:1 multiplexers that share
// one configuration bit. The same cell serves the mirrored output-side
// network, where its inputs are the two half-networks and its outputs two
// sink pins. Purely combinational: one multiplexer delay from any input to
// any output. W is the width of one routed signal (1 for a single wire).
module xbar2x2 #(
  parameter int unsigned W = 1
) (
  input  logic         swap,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y0,
  output logic [W-1:0] y1
);

  always_comb begin
    y0 = swap ? b : a;
    y1 = swap ? a : b;
  end

endmodule
