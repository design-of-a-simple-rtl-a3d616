// in_inverter: one input inverter of the fault-tolerant voter.
//
// Every module output that enters the voter first passes through an inverter,
// whose output drives the gates of the pull-down transistors in the open-drain
// NAND gates. That inverter stage is the document's. The fault input is this
// design's fault-injection model: with `fault` = INV_OK the output is ~a, and
// INV_STUCK0 / INV_STUCK1 hold it at 0 / 1.
//
// Interface: a (module output), fault (injected fault mode), y (inverted).
// Timing: purely combinational.
module in_inverter
  import voter_pkg::*;
(
  input  logic       a,
  input  inv_fault_e fault,
  output logic       y
);

  always_comb begin
    unique case (fault)
      INV_STUCK0: y = 1'b0;
      INV_STUCK1: y = 1'b1;
      default:    y = ~a;
    endcase
  end

endmodule
