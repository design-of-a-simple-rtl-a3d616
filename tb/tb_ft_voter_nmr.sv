// tb_ft_voter_nmr: self-checking test of the N-input fault-tolerant voter.
//
// Runs nmr_voter_check on the default 5-input voter and on 3- and 7-input
// versions. It checks fault-free voting, single faults, the masking of n
// faulty transistors in one gate and of n faulty inverters while all modules
// agree, and that a gate with all n+1 transistors stuck on breaks the voter.
// Fails if any check fails or if a masking or breaking case never occurred.
module tb_ft_voter_nmr;

  logic done3, done5, done7;
  int   checks3, checks5, checks7, fail3, fail5, fail7;
  int   masked3, masked5, masked7, broken3, broken5, broken7;
  int   checks = 0, failures = 0;

  nmr_voter_check #(.N(5)) u5 (.done(done5), .checks(checks5), .failures(fail5), .masked(masked5), .broken(broken5));
  nmr_voter_check #(.N(3)) u3 (.done(done3), .checks(checks3), .failures(fail3), .masked(masked3), .broken(broken3));
  nmr_voter_check #(.N(7)) u7 (.done(done7), .checks(checks7), .failures(fail7), .masked(masked7), .broken(broken7));

  initial begin : watchdog
    #5000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    #1;  // let the checkers clear done first
    wait (done3 && done5 && done7);
    checks   = checks3 + checks5 + checks7;
    failures = fail3 + fail5 + fail7;
    $display("N=3: checks=%0d masked=%0d broken=%0d", checks3, masked3, broken3);
    $display("N=5: checks=%0d masked=%0d broken=%0d", checks5, masked5, broken5);
    $display("N=7: checks=%0d masked=%0d broken=%0d", checks7, masked7, broken7);
    // every gate of each voter must break when fully shorted: 3, 10, 35 gates
    checks += 3;
    if (broken3 != 3)  failures++;
    if (broken5 != 10) failures++;
    if (broken7 != 35) failures++;
    checks += 3;
    if (masked3 == 0) failures++;
    if (masked5 == 0) failures++;
    if (masked7 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
