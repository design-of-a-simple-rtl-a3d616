// ft_voter_nmr: fault-tolerant majority voter for N-modular redundancy.
//
// The extension of the triple-redundant voter to N = 2n+1 inputs. Every input
// is inverted. There is one open-drain NAND gate with n+1 series n-channel
// transistors for every (n+1)-element subset of the inputs, C(2n+1, n+1)
// gates in all. All gates sink one shared, pulled-up node. A gate sinks the
// node when all n+1 of its inputs are 0. So the node is low exactly when at
// least n+1 inputs are 0, and v is the majority of the N inputs. The gate
// count, the gate width and the shared node follow the document. With N = 3
// this is the same circuit as ft_voter_tmr.
//
// Fault tolerance: while the modules agree, a gate whose n+1 transistors see
// equal levels still blocks with n of them stuck on. An open transistor only
// removes its own gate, and the remaining gates still cover every input
// pattern with n+1 zeros.
//
// Gate numbering (this design's choice): the gates take the (n+1)-bit subsets
// of the inputs in increasing order of the subset's bit mask (input 0 = bit 0).
// Transistor t of a gate is driven by the t-th lowest input of its subset,
// and transistor 0 sits at the output node. For N = 3 this gives the gates
// (0,1), (0,2), (1,2), the order ft_voter_tmr uses.
//
// Fault injection (this design's choice, tie to *_OK in use):
//   inv_fault[i]   : inverter of input i
//   tr_fault[g][t] : transistor t of gate g
// Interface: d[N] (module outputs), v (voted output).
// Timing: purely combinational.
module ft_voter_nmr
  import voter_pkg::*;
#(
  parameter  int unsigned N = 5,                       // number of modules, odd, >= 3
  localparam int unsigned K = N / 2 + 1,               // inputs per gate (n+1)
  localparam int unsigned G = n_choose_k(N, N / 2 + 1) // number of gates
) (
  input  logic [N-1:0] d,
  input  inv_fault_e   inv_fault [N],
  input  tr_fault_e    tr_fault  [G][K],
  output logic         v
);

  initial begin
    assert (N % 2 == 1 && N >= 3)
      else $error("ft_voter_nmr: N must be odd and at least 3");
  end

  // Input index driving transistor t of gate g.
  function automatic int unsigned member(int unsigned g, int unsigned t);
    int unsigned gate_idx;
    int unsigned bit_idx;
    gate_idx = 0;
    for (int unsigned mask = 0; mask < (1 << N); mask++) begin
      if ($countones(mask) == K) begin
        if (gate_idx == g) begin
          bit_idx = 0;
          for (int unsigned i = 0; i < N; i++) begin
            if (mask[i]) begin
              if (bit_idx == t) return i;
              bit_idx++;
            end
          end
        end
        gate_idx++;
      end
    end
    return 0;
  endfunction

  logic [N-1:0] d_n;        // inverted module outputs
  logic [G-1:0] pull_down;  // one per open-drain gate

  for (genvar i = 0; i < N; i++) begin : g_inv
    in_inverter u_inv (.a(d[i]), .fault(inv_fault[i]), .y(d_n[i]));
  end

  for (genvar g = 0; g < G; g++) begin : g_gate
    logic [K-1:0] gate_in;
    for (genvar t = 0; t < K; t++) begin : g_tr
      assign gate_in[t] = d_n[member(g, t)];
    end
    od_nand #(.K(K)) u_nand (.in(gate_in), .fault(tr_fault[g]), .pull_down(pull_down[g]));
  end

  wired_and #(.M(G)) u_node (.pull_down(pull_down), .v(v));

endmodule
