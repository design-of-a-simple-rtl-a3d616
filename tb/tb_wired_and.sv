// tb_wired_and: self-checking test of the pulled-up wired node.
//
// Applies every pull-down pattern of a 3-gate node (the triple voter) and of a
// 10-gate node (the 5-input voter) and checks that the node is high exactly
// when no gate sinks it. Combinational; each pattern is checked after 1 ns.
module tb_wired_and;

  logic [2:0] pd3;
  logic [9:0] pd10;
  logic       v3, v10;
  int         checks = 0, failures = 0;

  wired_and #(.M(3))  dut3  (.pull_down(pd3),  .v(v3));
  wired_and #(.M(10)) dut10 (.pull_down(pd10), .v(v10));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 1024; p++) begin
      pd3  = p[2:0];
      pd10 = p[9:0];
      #1;
      checks += 2;
      if (v3 !== (pd3 == 3'b000)) begin
        failures++;
        $display("FAIL M=3 pull_down=%b v=%b", pd3, v3);
      end
      if (v10 !== (pd10 == 10'd0)) begin
        failures++;
        $display("FAIL M=10 pull_down=%b v=%b", pd10, v10);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
