// End-to-end self-checking testbench for rev_combinational_top, run with the
// top at its defaults.
//
// Sweeps every input of all four circuits together in one loop of 2048
// steps: the loop counter drives the comparator bits, the 3-bit and 4-bit
// decoder inputs and the multiplexer select, and a random data word feeds
// the multiplexer. Outputs are compared with plain behavioural references
// written here (relational operators, shifts, bit select). It counts how
// often each outcome occurs (each comparator result, each decoder line, each
// multiplexer input selected) and counts a failure for any that never did.
`timescale 1ns/1ps
module tb_rev_combinational_top;
  logic        cmp_a, cmp_b, cmp_aeb, cmp_agb, cmp_alb, cmp_garbage;
  logic [2:0]  dec3_in;
  logic [7:0]  dec3_y;
  logic [5:0]  dec3_garbage;
  logic [3:0]  dec4_in;
  logic [15:0] dec4_y;
  logic [13:0] dec4_garbage;
  logic [7:0]  mux_d;
  logic [2:0]  mux_sel;
  logic        mux_z;
  logic [13:0] mux_garbage;

  int checks = 0, failures = 0;
  int n_eq = 0, n_gt = 0, n_lt = 0;
  int n_dec3 [8];
  int n_dec4 [16];
  int n_mux  [8];

  rev_combinational_top dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (n_dec3[i]) n_dec3[i] = 0;
    foreach (n_dec4[i]) n_dec4[i] = 0;
    foreach (n_mux[i])  n_mux[i]  = 0;

    for (int step = 0; step < 2048; step++) begin
      logic [10:0] v;
      v = 11'(step);
      {cmp_b, cmp_a} = v[1:0];
      dec3_in = v[4:2];
      dec4_in = v[3:0] ^ v[7:4];
      mux_sel = v[10:8];
      mux_d   = 8'($urandom);
      #1;

      // comparator
      checks++;
      if ({cmp_aeb, cmp_agb, cmp_alb} !== {cmp_a == cmp_b, cmp_a > cmp_b, cmp_a < cmp_b}) begin
        failures++;
        $display("FAIL cmp a=%b b=%b -> %b%b%b", cmp_a, cmp_b, cmp_aeb, cmp_agb, cmp_alb);
      end
      n_eq += int'(cmp_aeb);
      n_gt += int'(cmp_agb);
      n_lt += int'(cmp_alb);

      // 3-to-8 decoder
      checks++;
      if (dec3_y !== (8'b1 << dec3_in)) begin
        failures++;
        $display("FAIL dec3 in=%0d y=%08b", dec3_in, dec3_y);
      end
      for (int i = 0; i < 8; i++) n_dec3[i] += int'(dec3_y[i]);

      // 4-to-16 decoder
      checks++;
      if (dec4_y !== (16'b1 << dec4_in)) begin
        failures++;
        $display("FAIL dec4 in=%0d y=%016b", dec4_in, dec4_y);
      end
      for (int i = 0; i < 16; i++) n_dec4[i] += int'(dec4_y[i]);

      // 8-to-1 multiplexer: check it twice, with the data word and its
      // complement, so the selected bit is seen both at 0 and at 1
      checks++;
      if (mux_z !== mux_d[mux_sel]) begin
        failures++;
        $display("FAIL mux sel=%0d d=%08b z=%b", mux_sel, mux_d, mux_z);
      end
      mux_d = ~mux_d;
      #1;
      checks++;
      if (mux_z !== mux_d[mux_sel]) begin
        failures++;
        $display("FAIL mux sel=%0d d=%08b z=%b", mux_sel, mux_d, mux_z);
      end
      n_mux[mux_sel]++;
    end

    // every outcome must have happened
    checks++;
    if (n_eq == 0 || n_gt == 0 || n_lt == 0) begin
      failures++;
      $display("FAIL comparator outcome never seen: eq=%0d gt=%0d lt=%0d", n_eq, n_gt, n_lt);
    end
    foreach (n_dec3[i]) begin
      checks++;
      if (n_dec3[i] == 0) begin failures++; $display("FAIL dec3 line %0d never raised", i); end
    end
    foreach (n_dec4[i]) begin
      checks++;
      if (n_dec4[i] == 0) begin failures++; $display("FAIL dec4 line %0d never raised", i); end
    end
    foreach (n_mux[i]) begin
      checks++;
      if (n_mux[i] == 0) begin failures++; $display("FAIL mux input %0d never selected", i); end
    end
    $display("comparator: eq=%0d gt=%0d lt=%0d", n_eq, n_gt, n_lt);
    $display("dec3 line 0 raised %0d times, dec4 line 15 raised %0d times, mux input 7 selected %0d times",
             n_dec3[0], n_dec4[15], n_mux[7]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
