// tb_mr_voter_top_wide: end-to-end test of mr_voter_top voting 8-bit words
// with a triple voter and a 7-input voter per bit.
//
// mr_top_check feeds both stages from behavioural redundant modules and runs
// fault-free operation, module faults, single voter faults, n faults in one
// gate of the 7-input voter and faults beyond the tolerance. It checks every
// result against the fault-free module function. The voter is combinational;
// each operation is checked one time unit after it is applied.
module tb_mr_voter_top_wide;
  import voter_pkg::*;

  localparam int unsigned WIDTH = 8;
  localparam int unsigned N_NMR = 7;

  logic [WIDTH-1:0] tmr_a, tmr_b, tmr_c, tmr_v, nmr_v;
  inv_fault_e       tmr_inv_fault [WIDTH][3];
  tr_fault_e        tmr_tr_fault  [WIDTH][3][2];
  logic [WIDTH-1:0] nmr_d         [N_NMR];
  inv_fault_e       nmr_inv_fault [WIDTH][N_NMR];
  tr_fault_e        nmr_tr_fault  [WIDTH][n_choose_k(N_NMR, N_NMR / 2 + 1)][N_NMR / 2 + 1];
  logic             done;
  int               checks, failures;

  mr_voter_top #(.WIDTH(WIDTH), .N_NMR(N_NMR)) dut (.*);

  mr_top_check #(.WIDTH(WIDTH), .N_NMR(N_NMR)) u_check (.*);

  initial begin : watchdog
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    #1;  // let the checker clear done first
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
