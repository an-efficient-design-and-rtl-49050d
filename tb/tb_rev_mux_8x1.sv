// Self-checking testbench for rev_mux_8x1.
// For every select value {s2,s1,s0} it applies one-hot data words (so a
// wrong selection is always visible), their complements and random words,
// and compares z with data[{s2,s1,s0}] worked out here. It also checks that
// the seven gates together keep every data bit: the eight data inputs appear
// once each among z and the unselected-data garbage lines.
`timescale 1ns/1ps
module tb_rev_mux_8x1;
  logic [7:0] data;
  logic [2:0] sel;
  logic z;
  logic [13:0] garbage;
  logic [7:0] kept;
  int checks = 0, failures = 0;

  rev_mux_8x1 dut (
    .a(data[0]), .b(data[1]), .c(data[2]), .d(data[3]),
    .e(data[4]), .f(data[5]), .g(data[6]), .h(data[7]),
    .s0(sel[0]), .s1(sel[1]), .s2(sel[2]),
    .z(z), .garbage(garbage)
  );

  task automatic apply(input logic [2:0] s, input logic [7:0] dv);
    sel = s;
    data = dv;
    #1;
    checks++;
    if (z !== dv[s]) begin
      failures++;
      $display("FAIL sel=%0d data=%08b z=%b expected %b", s, dv, z, dv[s]);
    end
    // control copies: G1,G3,G5,G7 = s0; G9,G11 = s1; G13 = s2
    checks++;
    if ({garbage[0], garbage[2], garbage[4], garbage[6]} !== {4{s[0]}} ||
        {garbage[8], garbage[10]} !== {2{s[1]}} || garbage[12] !== s[2]) begin
      failures++;
      $display("FAIL sel=%0d control garbage=%014b", s, garbage);
    end
    // data conservation: count of ones among z and the unselected lines
    kept = {z, garbage[1], garbage[3], garbage[5], garbage[7],
            garbage[9], garbage[11], garbage[13]};
    checks++;
    if ($countones(kept) != $countones(dv)) begin
      failures++;
      $display("FAIL sel=%0d data=%08b ones not conserved", s, dv);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 8; s++) begin
      for (int i = 0; i < 8; i++) begin
        apply(3'(s), 8'b1 << i);
        apply(3'(s), ~(8'b1 << i));
      end
      for (int k = 0; k < 16; k++) apply(3'(s), 8'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
