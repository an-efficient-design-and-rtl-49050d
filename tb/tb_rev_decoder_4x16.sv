// Exhaustive self-checking testbench for rev_decoder_4x16.
// For every 4-bit input it checks out against a one-hot word built here with
// a shift, and checks the garbage lines (copies of b, c and d).
`timescale 1ns/1ps
module tb_rev_decoder_4x16;
  logic a, b, c, d;
  logic [15:0] out, expected;
  logic [13:0] garbage;
  int checks = 0, failures = 0;

  rev_decoder_4x16 dut (.a(a), .b(b), .c(c), .d(d), .out(out), .garbage(garbage));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {a, b, c, d} = 4'(v);
      expected = 16'b1 << v;
      #1;
      checks++;
      if (out !== expected) begin
        failures++;
        $display("FAIL in=%04b out=%016b expected %016b", v[3:0], out, expected);
      end
      checks++;
      if (garbage !== {{8{d}}, {4{c}}, b, b}) begin
        failures++;
        $display("FAIL in=%04b garbage=%014b", v[3:0], garbage);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
