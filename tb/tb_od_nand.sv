// tb_od_nand: self-checking test of the open-drain NAND gate.
//
// For a 2-input gate (triple voter) and a 3-input gate (5-input voter) it
// applies every input pattern under every combination of per-transistor
// faults. The expected result counts blocking transistors: one that is stuck
// open, or fault-free with a low gate. The chain sinks the node exactly when
// none blocks. Combinational; each case is checked after 1 ns.
module tb_od_nand;
  import voter_pkg::*;

  logic [1:0] in2;
  logic [2:0] in3;
  tr_fault_e  f2 [2];
  tr_fault_e  f3 [3];
  logic       pd2, pd3;
  int         checks = 0, failures = 0;

  od_nand #(.K(2)) dut2 (.in(in2), .fault(f2), .pull_down(pd2));
  od_nand #(.K(3)) dut3 (.in(in3), .fault(f3), .pull_down(pd3));

  function automatic logic expect_pd(int k, int unsigned in, int unsigned code);
    int blocking = 0;
    for (int i = 0; i < k; i++) begin
      int unsigned mode = (code / (3 ** i)) % 3;  // 0 ok, 1 open, 2 short
      if (mode == 1 || (mode == 0 && !in[i])) blocking++;
    end
    return blocking == 0;
  endfunction

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int unsigned code = 0; code < 27; code++) begin
      for (int unsigned p = 0; p < 8; p++) begin
        for (int i = 0; i < 3; i++) f3[i] = tr_fault_e'((code / (3 ** i)) % 3);
        for (int i = 0; i < 2; i++) f2[i] = tr_fault_e'((code / (3 ** i)) % 3);
        in3 = p[2:0];
        in2 = p[1:0];
        #1;
        checks++;
        if (pd3 !== expect_pd(3, p, code)) begin
          failures++;
          $display("FAIL K=3 in=%b fault code=%0d pull_down=%b", in3, code, pd3);
        end
        if (code < 9 && p < 4) begin
          checks++;
          if (pd2 !== expect_pd(2, p, code)) begin
            failures++;
            $display("FAIL K=2 in=%b fault code=%0d pull_down=%b", in2, code, pd2);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
