// Exhaustive self-checking testbench for mfg_gate.
// Drives all eight inputs and compares with a controlled swap written out as
// a table here: when the first input is 1 the other two trade places. Also
// checks that the mapping is one-to-one and that the gate undoes itself.
`timescale 1ns/1ps
module tb_mfg_gate;
  logic a, b, c, p, q, r, p2, q2, r2;
  int checks = 0, failures = 0;
  // expected {p,q,r} for input {a,b,c} = 0..7
  logic [2:0] expect_tab [8] = '{3'b000, 3'b001, 3'b010, 3'b011,
                                 3'b100, 3'b110, 3'b101, 3'b111};
  logic [7:0] seen;

  mfg_gate dut  (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));
  mfg_gate dut2 (.a(p), .b(q), .c(r), .p(p2), .q(q2), .r(r2));

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
      checks++;
      if ({p2, q2, r2} !== 3'(v)) begin
        failures++;
        $display("FAIL inverse in=%03b -> %b%b%b", v[2:0], p2, q2, r2);
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
