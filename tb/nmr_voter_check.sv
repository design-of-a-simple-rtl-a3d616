// nmr_voter_check: test driver for one ft_voter_nmr of N inputs.
//
// Used by tb_ft_voter_nmr for several N. It runs, in order:
//  a) fault-free voting over all 2^N input patterns against the majority;
//  b) every single inverter or transistor fault, in both modes, under all
//     input patterns, against a switch-level reference written here;
//  c) every choice of n = (N-1)/2 faulty transistors in one gate, all
//     stuck-open/stuck-on combinations, with all inputs equal: must vote
//     correctly;
//  d) every choice of n faulty inverters, all stuck-0/stuck-1 combinations,
//     with all inputs equal: must vote correctly;
//  e) all n+1 transistors of one gate stuck on, inputs all high: the voter
//     must fail (output 0), the limit of the structure;
//  f) random multi-fault configurations and inputs against the reference.
// The reference numbers the gates as the voter does: (n+1)-subsets of the
// inputs in increasing bit-mask order, lowest input on transistor 0.
// Results are returned on the ports once `done` rises.
module nmr_voter_check
  import voter_pkg::*;
#(
  parameter int unsigned N = 5
) (
  output logic done,
  output int   checks,
  output int   failures,
  output int   masked,     // fault cases with agreeing inputs voted correctly
  output int   broken      // case e) failures observed, as expected
);
  localparam int unsigned K = N / 2 + 1;
  localparam int unsigned NN = N / 2;
  localparam int unsigned G = n_choose_k(N, K);

  logic [N-1:0] d;
  logic         v;
  inv_fault_e   inv_fault [N];
  tr_fault_e    tr_fault  [G][K];

  ft_voter_nmr #(.N(N)) dut (.d, .inv_fault, .tr_fault, .v);

  int unsigned members [G][K];

  function automatic logic majority(logic [N-1:0] x);
    return $countones(x) > NN;
  endfunction

  function automatic logic ref_v(logic [N-1:0] x);
    logic [N-1:0] lvl;
    logic         low = 1'b0;
    for (int i = 0; i < N; i++)
      lvl[i] = (inv_fault[i] == INV_STUCK0) ? 1'b0 : (inv_fault[i] == INV_STUCK1) ? 1'b1 : !x[i];
    for (int g = 0; g < G; g++) begin
      logic chain = 1'b1;
      for (int t = 0; t < K; t++)
        chain &= (tr_fault[g][t] == TR_SHORT) ? 1'b1 :
                 (tr_fault[g][t] == TR_OPEN)  ? 1'b0 : lvl[members[g][t]];
      low |= chain;
    end
    return !low;
  endfunction

  task automatic clear_faults();
    foreach (inv_fault[i]) inv_fault[i] = INV_OK;
    foreach (tr_fault[g, t]) tr_fault[g][t] = TR_OK;
  endtask

  task automatic check(logic expected, string what);
    checks++;
    if (v !== expected) begin
      failures++;
      if (failures < 20) $display("FAIL N=%0d %s: d=%b v=%b expected=%b", N, what, d, v, expected);
    end
  endtask

  // Apply both agreeing input patterns and require the majority.
  task automatic check_agreeing(string what);
    for (int e = 0; e < 2; e++) begin
      d = e[0] ? '1 : '0;
      #1;
      check(e[0], what);
      if (v === e[0]) masked++;
    end
  endtask

  task automatic check_all_inputs(string what);
    for (int p = 0; p < (1 << N); p++) begin
      d = p[N-1:0];
      #1;
      check(ref_v(d), what);
    end
  endtask

  initial begin
    int g_idx;
    done = 0; checks = 0; failures = 0; masked = 0; broken = 0;

    g_idx = 0;
    for (int mask = 0; mask < (1 << N); mask++) begin
      if ($countones(mask) == K) begin
        automatic int t = 0;
        for (int i = 0; i < N; i++) if (mask[i]) begin members[g_idx][t] = i; t++; end
        g_idx++;
      end
    end
    if (g_idx != G) begin
      failures++;
      $display("FAIL N=%0d: %0d gate subsets, expected %0d", N, g_idx, G);
    end

    // a)
    clear_faults();
    for (int p = 0; p < (1 << N); p++) begin
      d = p[N-1:0];
      #1;
      check(majority(d), "fault-free majority");
    end

    // b)
    for (int i = 0; i < N; i++)
      for (int m = 1; m < 3; m++) begin
        clear_faults();
        inv_fault[i] = inv_fault_e'(m);
        check_all_inputs("single inverter fault");
        check_agreeing("single inverter fault masked");
      end
    for (int g = 0; g < G; g++)
      for (int t = 0; t < K; t++)
        for (int m = 1; m < 3; m++) begin
          clear_faults();
          tr_fault[g][t] = tr_fault_e'(m);
          check_all_inputs("single transistor fault");
          check_agreeing("single transistor fault masked");
        end

    // c)
    for (int g = 0; g < G; g++)
      for (int sel = 0; sel < (1 << K); sel++)
        if ($countones(sel) == NN)
          for (int modes = 0; modes < (1 << NN); modes++) begin
            automatic int j = 0;
            clear_faults();
            for (int t = 0; t < K; t++) if (sel[t]) begin
              tr_fault[g][t] = modes[j] ? TR_SHORT : TR_OPEN;
              j++;
            end
            check_agreeing("n faulty transistors in one gate masked");
          end

    // d)
    for (int sel = 0; sel < (1 << N); sel++)
      if ($countones(sel) == NN)
        for (int modes = 0; modes < (1 << NN); modes++) begin
          automatic int j = 0;
          clear_faults();
          for (int i = 0; i < N; i++) if (sel[i]) begin
            inv_fault[i] = modes[j] ? INV_STUCK1 : INV_STUCK0;
            j++;
          end
          check_agreeing("n faulty inverters masked");
        end

    // e)
    for (int g = 0; g < G; g++) begin
      clear_faults();
      for (int t = 0; t < K; t++) tr_fault[g][t] = TR_SHORT;
      d = '1;
      #1;
      check(1'b0, "whole gate shorted breaks voter");
      if (v === 1'b0) broken++;
    end

    // f)
    for (int r = 0; r < 2000; r++) begin
      clear_faults();
      for (int i = 0; i < N; i++) if ($urandom_range(0, 9) == 0) inv_fault[i] = inv_fault_e'($urandom_range(1, 2));
      for (int g = 0; g < G; g++)
        for (int t = 0; t < K; t++)
          if ($urandom_range(0, 9) == 0) tr_fault[g][t] = tr_fault_e'($urandom_range(1, 2));
      d = N'($urandom);
      #1;
      check(ref_v(d), "random faults vs reference");
    end

    done = 1;
  end
endmodule
