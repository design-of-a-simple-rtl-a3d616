// od_nand: open-drain CMOS NAND gate with K series n-channel transistors.
//
// The gate has no p-channel pull-up. K n-channel transistors sit in series
// between the output node and ground, so the output is pulled low only when
// every gate input is high. Otherwise it floats and an external pull-up
// resistor sets the level. The document gives this structure with K = 2 for
// the triple-redundant voter and K = n+1 for the (2n+1)-input voter.
//
// A floating output cannot be represented in two-state logic, so the module
// reports whether the gate *sinks* the shared node: pull_down = 1 means the
// series chain conducts. The wired_and module resolves the node.
//
// Each transistor has a fault input (fault-injection model, this design's
// choice). TR_OPEN removes the device's conduction. TR_SHORT makes it
// conduct whatever its gate. With all faults TR_OK the gate is an ordinary
// open-drain NAND. Index 0 is the transistor at the output node and index K-1
// the one at ground; the order does not change the logic.
//
// Interface: in[K] (transistor gates), fault[K], pull_down.
// Timing: purely combinational.
module od_nand
  import voter_pkg::*;
#(
  parameter int unsigned K = 2
) (
  input  logic [K-1:0] in,
  input  tr_fault_e    fault [K],
  output logic         pull_down
);

  logic [K-1:0] conducts;

  always_comb begin
    for (int unsigned i = 0; i < K; i++) begin
      unique case (fault[i])
        TR_OPEN:  conducts[i] = 1'b0;
        TR_SHORT: conducts[i] = 1'b1;
        default:  conducts[i] = in[i];
      endcase
    end
    // Series chain: current flows only if every device conducts.
    pull_down = &conducts;
  end

endmodule
