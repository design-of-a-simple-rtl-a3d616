// wired_and: pull-up resistor and shared output node of the voter.
//
// All open-drain gates of the voter connect their outputs to one node, which
// a resistor pulls up to the supply. The node is low as soon as any gate sinks
// it, and high only when none does, so the node is the AND of the individual
// NAND outputs (wired logic). The structure is the document's. Here the
// resolution is written as a NOR of the gates' pull-down requests, the
// two-state equivalent of the resistor and the shared wire. The resistor's
// value affects only the rise time (the 0 to 1 edge is slower than the 1 to 0
// edge), and that analog behaviour is not modelled.
//
// Interface: pull_down[M] (one per open-drain gate), v (node level).
// Timing: purely combinational.
module wired_and #(
  parameter int unsigned M = 3
) (
  input  logic [M-1:0] pull_down,
  output logic         v
);

  assign v = ~|pull_down;

endmodule
