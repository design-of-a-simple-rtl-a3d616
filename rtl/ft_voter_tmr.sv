// ft_voter_tmr: fault-tolerant majority voter for triple modular redundancy.
//
// The voter takes the outputs a, b, c of three redundant modules and drives
// their majority on v. It has no final gate that would be a single point of
// failure. Each input is inverted. Three open-drain NAND gates, one per pair
// of inputs (a,b), (a,c), (b,c), each sink a shared node that a resistor
// pulls up. A gate sinks the node when both of its inputs are 0, so
//   v = (a | b) & (a | c) & (b | c) = majority(a, b, c).
// The circuit is 3 inverters (6 transistors), 6 series n-channel pull-down
// transistors and one resistor. The structure, the pairing of the inputs and
// the order of the transistors in each gate follow the document.
//
// Why it masks a fault in itself: while the three modules agree, both
// transistors of a gate see equal gate levels. Then one transistor stuck on is
// blocked by its series partner, and one stuck open is backed up by the other
// two gates. A failed inverter is like a fault in the two transistors it
// drives, which sit in different gates. So with a, b and c equal, any single
// faulty inverter or transistor leaves v correct. Two failed transistors in
// the same gate defeat it.
//
// Fault injection (this design's choice, tie to *_OK in use):
//   inv_fault[i]    : inverter of input i (0 = a, 1 = b, 2 = c)
//   tr_fault[g][t]  : transistor t (0 = at the output node, 1 = at ground)
//                     of gate g (0 = (a,b), 1 = (a,c), 2 = (b,c)); transistor
//                     0 is driven by the first input of the pair.
// Timing: purely combinational.
module ft_voter_tmr
  import voter_pkg::*;
(
  input  logic       a,
  input  logic       b,
  input  logic       c,
  input  inv_fault_e inv_fault [3],
  input  tr_fault_e  tr_fault  [3][2],
  output logic       v
);

  logic       a_n, b_n, c_n;   // inverted module outputs
  logic [2:0] pull_down;       // one per open-drain gate

  in_inverter u_inv_a (.a(a), .fault(inv_fault[0]), .y(a_n));
  in_inverter u_inv_b (.a(b), .fault(inv_fault[1]), .y(b_n));
  in_inverter u_inv_c (.a(c), .fault(inv_fault[2]), .y(c_n));

  od_nand #(.K(2)) u_nand_ab (.in({b_n, a_n}), .fault(tr_fault[0]), .pull_down(pull_down[0]));
  od_nand #(.K(2)) u_nand_ac (.in({c_n, a_n}), .fault(tr_fault[1]), .pull_down(pull_down[1]));
  od_nand #(.K(2)) u_nand_bc (.in({c_n, b_n}), .fault(tr_fault[2]), .pull_down(pull_down[2]));

  wired_and #(.M(3)) u_node (.pull_down(pull_down), .v(v));

endmodule
