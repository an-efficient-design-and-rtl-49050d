// Exhaustive self-checking testbench for peres_gate.
// Drives all eight inputs, compares with the Peres mapping written out as a
// table here, and checks that the eight outputs are all distinct (the gate
// is a permutation of its inputs, i.e. reversible).
`timescale 1ns/1ps
module tb_peres_gate;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;
  // expected {p,q,r} for input {a,b,c} = 0..7
  logic [2:0] expect_tab [8] = '{3'b000, 3'b001, 3'b010, 3'b011,
                                 3'b110, 3'b111, 3'b101, 3'b100};
  logic [7:0] seen;

  peres_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if ({p, q, r} !== expect_tab[v]) begin
        failures++;
        $display("FAIL in=%03b out=%b%b%b expected %03b", v[2:0], p, q, r, expect_tab[v]);
      end
      seen[{p, q, r}] = 1'b1;
    end
    checks++;
    if (seen !== 8'hFF) begin
      failures++;
      $display("FAIL mapping not one-to-one: %b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
