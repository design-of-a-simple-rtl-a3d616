// tb_ft_voter_tmr: self-checking test of the fault-tolerant triple voter.
//
// Three parts:
//  1. Fault-free voting: all 8 input patterns give the majority of a, b, c.
//  2. Exhaustive fault campaign: every combination of fault modes of the 3
//     inverters and 6 pull-down transistors (3^9 = 19683 configurations),
//     each under all 8 input patterns, is compared with a switch-level
//     reference written here. The reference inverts the inputs, forms the
//     series chains of gates (a,b), (a,c), (b,c) and pulls the node low if
//     any chain conducts.
//  3. The tolerance rules the voter is built for. With the three inputs equal,
//     every configuration with at least one faulty component must still give
//     the majority. Two stuck-on transistors in one gate must make it fail
//     with all inputs high. The test counts how often each case occurs.
// The voter is combinational: each case is checked one time unit after it is
// applied.
module tb_ft_voter_tmr;
  import voter_pkg::*;

  logic       a, b, c, v;
  inv_fault_e inv_fault [3];
  tr_fault_e  tr_fault  [3][2];
  int         checks = 0, failures = 0;
  int         single_masked = 0, double_broken = 0, same_gate_short_broken = 0;

  ft_voter_tmr dut (.a, .b, .c, .inv_fault, .tr_fault, .v);

  // Fault mode of component k (0..2 inverters, 3 + 2g + t transistors).
  function automatic int unsigned digit(int unsigned code, int unsigned k);
    return (code / (3 ** k)) % 3;
  endfunction

  // Switch-level reference of the faulty voter.
  function automatic logic ref_v(int unsigned code, logic [2:0] in);
    logic [2:0] gate_lvl;
    int         pair [3][2] = '{'{0, 1}, '{0, 2}, '{1, 2}};
    logic       node_low = 1'b0;
    for (int i = 0; i < 3; i++)
      gate_lvl[i] = (digit(code, i) == 1) ? 1'b0 : (digit(code, i) == 2) ? 1'b1 : !in[i];
    for (int g = 0; g < 3; g++) begin
      logic chain = 1'b1;
      for (int t = 0; t < 2; t++) begin
        int unsigned m = digit(code, 3 + 2 * g + t);
        logic on = (m == 2) ? 1'b1 : (m == 1) ? 1'b0 : gate_lvl[pair[g][t]];
        chain &= on;
      end
      node_low |= chain;
    end
    return !node_low;
  endfunction

  function automatic int n_faulty(int unsigned code);
    int n = 0;
    for (int k = 0; k < 9; k++) if (digit(code, k) != 0) n++;
    return n;
  endfunction

  task automatic apply(int unsigned code, logic [2:0] in);
    for (int i = 0; i < 3; i++) inv_fault[i] = inv_fault_e'(digit(code, i));
    for (int g = 0; g < 3; g++)
      for (int t = 0; t < 2; t++) tr_fault[g][t] = tr_fault_e'(digit(code, 3 + 2 * g + t));
    {c, b, a} = in;
    #1;
  endtask

  task automatic check(logic expected, string what, int unsigned code, logic [2:0] in);
    checks++;
    if (v !== expected) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s: fault code=%0d cba=%b v=%b expected=%b", what, code, in, v, expected);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // 1. fault-free majority
    for (int p = 0; p < 8; p++) begin
      automatic logic [2:0] in = p[2:0];
      apply(0, in);
      check((in[0] & in[1]) | (in[0] & in[2]) | (in[1] & in[2]), "majority", 0, in);
    end

    // 2. + 3. exhaustive fault campaign
    for (int unsigned code = 0; code < 3 ** 9; code++) begin
      automatic int nf = n_faulty(code);
      for (int p = 0; p < 8; p++) begin
        automatic logic [2:0] in = p[2:0];
        apply(code, in);
        check(ref_v(code, in), "reference", code, in);
        if (in == 3'b000 || in == 3'b111) begin
          if (nf == 1) begin
            check(in[0], "single fault masked", code, in);
            if (v === in[0]) single_masked++;
          end
          if (nf == 2 && v !== in[0]) double_broken++;
        end
      end
    end

    // Two stuck-on transistors in one gate, all inputs high: the node is
    // sunk although no module asks for 0.
    for (int g = 0; g < 3; g++) begin
      automatic int unsigned code = 2 * (3 ** (3 + 2 * g)) + 2 * (3 ** (4 + 2 * g));
      apply(code, 3'b111);
      check(1'b0, "same-gate double short breaks voter", code, 3'b111);
      if (v === 1'b0) same_gate_short_broken++;
    end

    $display("single faults masked with agreeing inputs: %0d (of 36)", single_masked);
    $display("double-fault cases that break the voter:   %0d", double_broken);
    $display("same-gate double shorts that break it:     %0d", same_gate_short_broken);
    checks++;
    if (single_masked != 36 || double_broken == 0 || same_gate_short_broken != 3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
