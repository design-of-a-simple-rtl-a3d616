// tb_voter_reliability: reliability of the fault-tolerant triple voter
// against normalized time, compared with the classical four-NAND voter.
//
// Every pull-down transistor fails with probability q = 1 - exp(-lambda*t),
// stuck open or stuck on with equal chance. An inverter holds two
// transistors and fails with probability 1 - (1-q)^2, its output stuck at 0
// or 1 with equal chance. Those probabilities are this test's fault model.
// The test applies all 3^9 fault configurations to ft_voter_tmr. A
// configuration counts as working when the voter gives the right output for
// both agreeing input patterns (all 0, all 1). The voter's reliability is the
// summed probability of the working configurations. The classical voter
// fails if any of its 16 transistors fails, so its reliability is taken as
// (1 - 4*lambda*t)^4.
// Checks: the fault-tolerant voter beats the classical one at every point of
// lambda*t = 0.001 .. 0.05, and its unreliability has no first-order term
// ((1 - R) / (lambda*t) stays small as lambda*t shrinks, whereas the
// classical voter's tends to 16). It also prints the reliability of a whole
// TMR system, R_V * (3 R_M^2 - 2 R_M^3) with modules of reliability
// R_M = exp(-lambda*t), for either voter, and checks that the fault-tolerant
// voter gives the more reliable system.
module tb_voter_reliability;
  import voter_pkg::*;

  localparam int unsigned NCFG = 3 ** 9;
  localparam int          NPTS = 7;

  logic       a, b, c, v;
  inv_fault_e inv_fault [3];
  tr_fault_e  tr_fault  [3][2];
  bit         works [NCFG];
  int         checks = 0, failures = 0;
  real        lt_pts [NPTS] = '{0.001, 0.005, 0.01, 0.02, 0.03, 0.04, 0.05};

  ft_voter_tmr dut (.a, .b, .c, .inv_fault, .tr_fault, .v);

  function automatic int unsigned digit(int unsigned code, int unsigned k);
    return (code / (3 ** k)) % 3;
  endfunction

  initial begin : watchdog
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int n_working;
    n_working = 0;
    for (int unsigned code = 0; code < NCFG; code++) begin
      for (int i = 0; i < 3; i++) inv_fault[i] = inv_fault_e'(digit(code, i));
      for (int g = 0; g < 3; g++)
        for (int t = 0; t < 2; t++) tr_fault[g][t] = tr_fault_e'(digit(code, 3 + 2 * g + t));
      works[code] = 1'b1;
      for (int e = 0; e < 2; e++) begin
        {c, b, a} = e[0] ? 3'b111 : 3'b000;
        #1;
        if (v !== e[0]) works[code] = 1'b0;
      end
      if (works[code]) n_working++;
    end
    $display("working fault configurations: %0d of %0d", n_working, NCFG);

    $display("  lambda*t   R_classic   R_fault_tolerant   (1-R_ft)/(lambda*t)   R_system_classic   R_system_ft");
    for (int k = 0; k < NPTS; k++) begin
      automatic real lt    = lt_pts[k];
      automatic real q     = 1.0 - $exp(-lt);
      automatic real q_inv = 1.0 - (1.0 - q) * (1.0 - q);
      automatic real r_cl  = (1.0 - 4.0 * lt) ** 4;
      automatic real r_ft  = 0.0;
      automatic real r_m, r_tmr;
      for (int unsigned code = 0; code < NCFG; code++) begin
        if (works[code]) begin
          automatic real pr = 1.0;
          for (int s = 0; s < 9; s++) begin
            automatic real pf = (s < 3) ? q_inv : q;
            pr *= (digit(code, s) == 0) ? (1.0 - pf) : (pf / 2.0);
          end
          r_ft += pr;
        end
      end
      r_m   = $exp(-lt);
      r_tmr = 3.0 * r_m * r_m - 2.0 * r_m * r_m * r_m;
      $display("  %8.3f   %9.4f   %16.6f   %8.4f            %9.4f          %9.4f",
               lt, r_cl, r_ft, (1.0 - r_ft) / lt, r_cl * r_tmr, r_ft * r_tmr);
      checks++;
      if (!(r_ft * r_tmr > r_cl * r_tmr)) begin
        failures++;
        $display("FAIL system reliability not improved at lambda*t=%f", lt);
      end
      checks++;
      if (!(r_ft > r_cl)) begin
        failures++;
        $display("FAIL fault-tolerant voter not more reliable at lambda*t=%f", lt);
      end
      if (lt < 0.0015) begin
        checks++;
        if ((1.0 - r_ft) / lt > 0.05) begin
          failures++;
          $display("FAIL first-order unreliability term present: %f", (1.0 - r_ft) / lt);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
