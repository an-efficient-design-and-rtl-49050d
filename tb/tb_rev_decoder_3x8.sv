// Exhaustive self-checking testbench for rev_decoder_3x8.
// For every 3-bit input {a,b,c} it checks that the named output for that
// value (p = 000 ... z = 111) is the only one high, and that the garbage
// lines carry the copies of b and c. The expected one-hot word is built
// here with a shift, independently of the gate tree.
`timescale 1ns/1ps
module tb_rev_decoder_3x8;
  logic a, b, c, p, q, r, s, t, x, y, z;
  logic [5:0] garbage;
  logic [7:0] outs, expected;
  int checks = 0, failures = 0;

  rev_decoder_3x8 dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r), .s(s),
                       .t(t), .x(x), .y(y), .z(z), .garbage(garbage));

  assign outs = {z, y, x, t, s, r, q, p};

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      expected = 8'b1 << v;
      #1;
      checks++;
      if (outs !== expected) begin
        failures++;
        $display("FAIL in=%03b out=%08b expected %08b", v[2:0], outs, expected);
      end
      checks++;
      if (garbage !== {c, c, c, c, b, b}) begin
        failures++;
        $display("FAIL in=%03b garbage=%06b", v[2:0], garbage);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
