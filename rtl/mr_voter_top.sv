// mr_voter_top: voting stage of a modular-redundancy system, WIDTH bits wide.
//
// Redundant copies of a digital circuit receive the same input. Their outputs
// are voted bit by bit, and each bit's majority is the system output. The
// redundant circuits are the user's and are not part of this module: their
// outputs enter through the ports. The top holds the two voters the document
// describes, side by side with separate ports:
//   - a triple modular redundancy (TMR) stage: WIDTH ft_voter_tmr instances,
//     one per output bit, voting modules a, b, c;
//   - an N-modular redundancy (NMR) stage: WIDTH ft_voter_nmr instances with
//     N_NMR inputs each, voting modules d[0] .. d[N_NMR-1].
// Voting a multi-bit result as independent single-bit voters is this design's
// reading of the document's remark that the voter suits outputs wider than one
// bit. The default WIDTH = 1 is the single-bit system of the TMR diagram. The
// default N_NMR = 5 is the smallest size the document gives for NMR.
//
// Fault-injection inputs reach every inverter and pull-down transistor of
// every voter bit (see ft_voter_tmr / ft_voter_nmr). Tie them to INV_OK and
// TR_OK in use.
// Timing: purely combinational; no clock and no reset.
module mr_voter_top
  import voter_pkg::*;
#(
  parameter  int unsigned WIDTH = 1,                           // voted bits
  parameter  int unsigned N_NMR = 5,                           // modules of the NMR stage
  localparam int unsigned K_NMR = N_NMR / 2 + 1,               // inputs per NMR gate
  localparam int unsigned G_NMR = n_choose_k(N_NMR, N_NMR / 2 + 1) // NMR gates per bit
) (
  // TMR stage
  input  logic [WIDTH-1:0] tmr_a,
  input  logic [WIDTH-1:0] tmr_b,
  input  logic [WIDTH-1:0] tmr_c,
  input  inv_fault_e       tmr_inv_fault [WIDTH][3],
  input  tr_fault_e        tmr_tr_fault  [WIDTH][3][2],
  output logic [WIDTH-1:0] tmr_v,
  // NMR stage
  input  logic [WIDTH-1:0] nmr_d         [N_NMR],
  input  inv_fault_e       nmr_inv_fault [WIDTH][N_NMR],
  input  tr_fault_e        nmr_tr_fault  [WIDTH][G_NMR][K_NMR],
  output logic [WIDTH-1:0] nmr_v
);

  for (genvar w = 0; w < WIDTH; w++) begin : g_bit
    logic [N_NMR-1:0] nmr_bit;

    ft_voter_tmr u_tmr (
      .a        (tmr_a[w]),
      .b        (tmr_b[w]),
      .c        (tmr_c[w]),
      .inv_fault(tmr_inv_fault[w]),
      .tr_fault (tmr_tr_fault[w]),
      .v        (tmr_v[w])
    );

    for (genvar m = 0; m < N_NMR; m++) begin : g_mod
      assign nmr_bit[m] = nmr_d[m][w];
    end

    ft_voter_nmr #(.N(N_NMR)) u_nmr (
      .d        (nmr_bit),
      .inv_fault(nmr_inv_fault[w]),
      .tr_fault (nmr_tr_fault[w]),
      .v        (nmr_v[w])
    );
  end

endmodule
