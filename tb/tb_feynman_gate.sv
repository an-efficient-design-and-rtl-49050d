// Exhaustive self-checking testbench for feynman_gate.
// Applies all four input pairs, compares p and q with a = copy and
// q = a XOR b worked out here, and also checks that applying the gate twice
// returns the original pair (the gate is its own inverse).
`timescale 1ns/1ps
module tb_feynman_gate;
  logic a, b, p, q, p2, q2;
  int checks = 0, failures = 0;

  feynman_gate dut  (.a(a), .b(b), .p(p), .q(q));
  feynman_gate dut2 (.a(p), .b(q), .p(p2), .q(q2));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if (p !== a || q !== (a != b)) begin
        failures++;
        $display("FAIL a=%b b=%b -> p=%b q=%b", a, b, p, q);
      end
      checks++;
      if ({p2, q2} !== {a, b}) begin
        failures++;
        $display("FAIL inverse a=%b b=%b -> %b%b", a, b, p2, q2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
