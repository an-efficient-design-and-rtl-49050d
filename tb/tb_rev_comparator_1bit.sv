// Exhaustive self-checking testbench for rev_comparator_1bit.
// For all four input pairs it compares aeb, agb and alb with a == b, a > b
// and a < b computed here, checks that exactly one of them is high, and
// checks the garbage line g1 (a copy of a). It counts how often each of the
// three outcomes occurred and fails if one never did.
`timescale 1ns/1ps
module tb_rev_comparator_1bit;
  logic a, b, aeb, agb, alb, g1;
  int checks = 0, failures = 0;
  int n_eq = 0, n_gt = 0, n_lt = 0;

  rev_comparator_1bit dut (.a(a), .b(b), .aeb(aeb), .agb(agb), .alb(alb), .g1(g1));

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
      if (aeb !== (a == b) || agb !== (a > b) || alb !== (a < b)) begin
        failures++;
        $display("FAIL a=%b b=%b -> aeb=%b agb=%b alb=%b", a, b, aeb, agb, alb);
      end
      checks++;
      if ($countones({aeb, agb, alb}) != 1) begin
        failures++;
        $display("FAIL not one-hot a=%b b=%b", a, b);
      end
      checks++;
      if (g1 !== a) begin
        failures++;
        $display("FAIL g1=%b a=%b", g1, a);
      end
      n_eq += int'(aeb);
      n_gt += int'(agb);
      n_lt += int'(alb);
    end
    checks++;
    if (n_eq != 2 || n_gt != 1 || n_lt != 1) begin
      failures++;
      $display("FAIL outcome counts eq=%0d gt=%0d lt=%0d", n_eq, n_gt, n_lt);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
