// voter_pkg: types shared by the fault-tolerant voter modules.
//
// The voter is described at transistor level, so its modules carry
// fault-injection inputs that let a testbench break single devices and check
// which faults the structure masks. These types name the fault modes. In a
// working circuit every fault input is tied to its *_OK value, and synthesis
// removes the injection logic.
//
// Fault classes are this design's choice. A transistor either works, never
// conducts (stuck open: open drain, broken source) or always conducts (stuck
// on: gate bridged to the supply, short channel). An inverter output is either
// correct or stuck at 0 or 1. Counting a failed inverter as a failure of the
// two transistors it drives follows the voter's own reliability argument.
package voter_pkg;

  // Fault mode of one n-channel pull-down transistor.
  typedef enum logic [1:0] {
    TR_OK    = 2'd0,  // conducts exactly when its gate is high
    TR_OPEN  = 2'd1,  // never conducts
    TR_SHORT = 2'd2   // always conducts
  } tr_fault_e;

  // Fault mode of one input inverter.
  typedef enum logic [1:0] {
    INV_OK     = 2'd0,  // output is the complement of the input
    INV_STUCK0 = 2'd1,  // output held low
    INV_STUCK1 = 2'd2   // output held high
  } inv_fault_e;

  // Number of k-element subsets of an n-element set (binomial coefficient).
  function automatic int unsigned n_choose_k(int unsigned n, int unsigned k);
    int unsigned r;
    if (k > n) return 0;
    r = 1;
    for (int unsigned i = 1; i <= k; i++) r = r * (n - k + i) / i;
    return r;
  endfunction

endpackage
