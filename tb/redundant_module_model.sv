// redundant_module_model: behavioural stand-in for one redundant circuit.
//
// A modular-redundancy system runs several identical copies of a circuit on
// the same input. This model is one copy. Its function, y = ~(x ^ (x << 1)),
// is an arbitrary example that gives 0s and 1s on every bit. It can be made
// faulty: kind 1 inverts the bits in fault_mask, kind 2 forces them to 0,
// kind 3 forces them to 1, and kind 0 leaves the output correct.
// Combinational; testbench use only.
module redundant_module_model #(
  parameter int unsigned WIDTH = 1
) (
  input  logic [WIDTH-1:0] x,
  input  logic [1:0]       fault_kind,
  input  logic [WIDTH-1:0] fault_mask,
  output logic [WIDTH-1:0] y
);
  logic [WIDTH-1:0] good;

  always_comb begin
    good = ~(x ^ (x << 1));
    unique case (fault_kind)
      2'd1:    y = good ^ fault_mask;
      2'd2:    y = good & ~fault_mask;
      2'd3:    y = good | fault_mask;
      default: y = good;
    endcase
  end
endmodule
