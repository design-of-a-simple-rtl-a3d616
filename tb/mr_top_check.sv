// mr_top_check: end-to-end stimulus and checker for mr_voter_top.
//
// Drives a top of the given WIDTH and N_NMR through its ports. The system
// input x goes to three redundant_module_model copies that feed the TMR stage
// and N_NMR copies that feed the NMR stage, as in a modular-redundancy system.
// The expected system output is the fault-free module function computed here.
// Each operation is one random input word under one scenario:
//   0 no fault anywhere;
//   1 module faults: one TMR module and up to n NMR modules give wrong words;
//   2 one faulty inverter or transistor in a TMR voter bit and in an NMR
//     voter bit, modules correct;
//   3 n faulty transistors in one gate of an NMR voter bit, modules correct;
//   4 beyond the tolerance: both transistors of a TMR gate, and all n+1 of an
//     NMR gate, stuck on in a bit whose correct value is 1. That bit must read
//     0 and every other bit stays correct.
// Each scenario is counted. One that never ran counts as a failure. Results
// appear on the ports when `done` rises.
module mr_top_check
  import voter_pkg::*;
#(
  parameter int unsigned WIDTH = 1,
  parameter int unsigned N_NMR = 5,
  parameter int unsigned OPS   = 4000
) (
  output logic [WIDTH-1:0] tmr_a,
  output logic [WIDTH-1:0] tmr_b,
  output logic [WIDTH-1:0] tmr_c,
  output inv_fault_e       tmr_inv_fault [WIDTH][3],
  output tr_fault_e        tmr_tr_fault  [WIDTH][3][2],
  input  logic [WIDTH-1:0] tmr_v,
  output logic [WIDTH-1:0] nmr_d         [N_NMR],
  output inv_fault_e       nmr_inv_fault [WIDTH][N_NMR],
  output tr_fault_e        nmr_tr_fault  [WIDTH][n_choose_k(N_NMR, N_NMR / 2 + 1)][N_NMR / 2 + 1],
  input  logic [WIDTH-1:0] nmr_v,
  output logic             done,
  output int               checks,
  output int               failures
);
  localparam int unsigned K  = N_NMR / 2 + 1;
  localparam int unsigned NN = N_NMR / 2;
  localparam int unsigned G  = n_choose_k(N_NMR, K);
  localparam int unsigned NSCEN = 5;

  logic [WIDTH-1:0] x;
  logic [1:0]       kind [3 + N_NMR];
  logic [WIDTH-1:0] mask [3 + N_NMR];
  logic [WIDTH-1:0] y    [3 + N_NMR];
  int               seen [NSCEN];

  for (genvar m = 0; m < 3 + N_NMR; m++) begin : g_mod
    redundant_module_model #(.WIDTH(WIDTH)) u_mod (
      .x(x), .fault_kind(kind[m]), .fault_mask(mask[m]), .y(y[m]));
  end
  assign tmr_a = y[0];
  assign tmr_b = y[1];
  assign tmr_c = y[2];
  for (genvar m = 0; m < N_NMR; m++) begin : g_nmr_in
    assign nmr_d[m] = y[3 + m];
  end

  function automatic logic [WIDTH-1:0] golden(logic [WIDTH-1:0] in);
    logic [WIDTH-1:0] r;
    for (int i = 0; i < WIDTH; i++) r[i] = !(in[i] ^ ((i > 0) ? in[i-1] : 1'b0));
    return r;
  endfunction

  function automatic logic [WIDTH-1:0] rand_word();
    logic [WIDTH-1:0] r;
    for (int i = 0; i < WIDTH; i++) r[i] = 1'($urandom);
    return r;
  endfunction

  task automatic clear_all();
    foreach (kind[m]) begin kind[m] = 2'd0; mask[m] = '0; end
    foreach (tmr_inv_fault[w, i]) tmr_inv_fault[w][i] = INV_OK;
    foreach (tmr_tr_fault[w, g, t]) tmr_tr_fault[w][g][t] = TR_OK;
    foreach (nmr_inv_fault[w, i]) nmr_inv_fault[w][i] = INV_OK;
    foreach (nmr_tr_fault[w, g, t]) nmr_tr_fault[w][g][t] = TR_OK;
  endtask

  task automatic break_module(int m);
    kind[m] = 2'($urandom_range(1, 3));
    mask[m] = rand_word();
    if (mask[m] == '0) mask[m][0] = 1'b1;
  endtask

  task automatic compare(logic [WIDTH-1:0] exp_tmr, logic [WIDTH-1:0] exp_nmr, int s);
    checks += 2;
    if (tmr_v !== exp_tmr) begin
      failures++;
      if (failures < 20) $display("FAIL scenario %0d TMR: x=%h v=%h expected=%h", s, x, tmr_v, exp_tmr);
    end
    if (nmr_v !== exp_nmr) begin
      failures++;
      if (failures < 20) $display("FAIL scenario %0d NMR: x=%h v=%h expected=%h", s, x, nmr_v, exp_nmr);
    end
  endtask

  initial begin
    done = 0; checks = 0; failures = 0;
    foreach (seen[s]) seen[s] = 0;
    for (int op = 0; op < OPS; op++) begin
      automatic int s = op % NSCEN;
      automatic logic [WIDTH-1:0] exp_tmr, exp_nmr;
      automatic int w = $urandom_range(0, WIDTH - 1);
      clear_all();
      x = rand_word();
      if (s == 4) begin
        // pick a bit whose correct value is 1
        while (golden(x) == '0) x = rand_word();
        while (!golden(x)[w]) w = $urandom_range(0, WIDTH - 1);
      end
      exp_tmr = golden(x);
      exp_nmr = golden(x);
      unique case (s)
        1: begin
          automatic int nbad = $urandom_range(1, NN);
          break_module($urandom_range(0, 2));
          for (int k = 0; k < nbad; k++) break_module(3 + $urandom_range(0, N_NMR - 1));
          // a module chosen twice still counts once, so at most n are wrong
        end
        2: begin
          if ($urandom_range(0, 2) == 0)
            tmr_inv_fault[w][$urandom_range(0, 2)] = inv_fault_e'($urandom_range(1, 2));
          else
            tmr_tr_fault[w][$urandom_range(0, 2)][$urandom_range(0, 1)] = tr_fault_e'($urandom_range(1, 2));
          if ($urandom_range(0, 2) == 0)
            nmr_inv_fault[w][$urandom_range(0, N_NMR - 1)] = inv_fault_e'($urandom_range(1, 2));
          else
            nmr_tr_fault[w][$urandom_range(0, G - 1)][$urandom_range(0, K - 1)] = tr_fault_e'($urandom_range(1, 2));
        end
        3: begin
          automatic int g = $urandom_range(0, G - 1);
          automatic int skip = $urandom_range(0, K - 1);
          for (int t = 0; t < K; t++)
            if (t != skip) nmr_tr_fault[w][g][t] = tr_fault_e'($urandom_range(1, 2));
        end
        4: begin
          automatic int g3 = $urandom_range(0, 2);
          automatic int g = $urandom_range(0, G - 1);
          tmr_tr_fault[w][g3][0] = TR_SHORT;
          tmr_tr_fault[w][g3][1] = TR_SHORT;
          for (int t = 0; t < K; t++) nmr_tr_fault[w][g][t] = TR_SHORT;
          exp_tmr[w] = 1'b0;
          exp_nmr[w] = 1'b0;
        end
        default: ;
      endcase
      #1;
      compare(exp_tmr, exp_nmr, s);
      seen[s]++;
    end
    $display("operations per scenario: no fault %0d, module faults %0d, single voter fault %0d, n faults in one NMR gate %0d, beyond tolerance %0d",
             seen[0], seen[1], seen[2], seen[3], seen[4]);
    foreach (seen[s]) begin
      checks++;
      if (seen[s] == 0) begin
        failures++;
        $display("FAIL scenario %0d never ran", s);
      end
    end
    done = 1;
  end
endmodule
