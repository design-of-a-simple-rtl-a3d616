// tb_in_inverter: self-checking test of the voter's input inverter.
//
// Drives both input levels under each fault mode and compares the output
// with the expected level: ~a without a fault, 0 or 1 when stuck. The block
// is combinational; each stimulus is checked 1 ns after it is applied.
module tb_in_inverter;
  import voter_pkg::*;

  logic       a, y;
  inv_fault_e fault;
  int         checks = 0, failures = 0;

  in_inverter dut (.a(a), .fault(fault), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic expected;
    for (int f = 0; f < 3; f++) begin
      for (int i = 0; i < 2; i++) begin
        fault = inv_fault_e'(f);
        a     = i[0];
        #1;
        expected = (f == 1) ? 1'b0 : (f == 2) ? 1'b1 : !i[0];
        checks++;
        if (y !== expected) begin
          failures++;
          $display("FAIL fault=%0d a=%0b y=%0b expected=%0b", f, a, y, expected);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
