// 3-to-8 reversible decoder.
//
// Raises the one output whose index is the 3-bit input {a, b, c} (a is the
// most significant bit): p for 000, q for 001, r for 010, s for 011, t for
// 100, x for 101, y for 110 and z for 111. The circuit is a binary tree of
// reversible gates, quantum cost 1 + 6*4 = 25, seven constant inputs:
//
//   level 1  a Feynman gate with its target at 1 gives a and ~a;
//   level 2  two MFG gates controlled by b split a into a&b, a&~b and ~a
//            into ~a&b, ~a&~b (the second MFG takes its b from the first);
//   level 3  four MFG gates controlled by c split each of those four terms
//            into its c and ~c halves, giving the eight minterms.
//
// Every MFG has its middle input at 0 and returns control, control & term
// and ~control & term (see mfg_gate). The pass-through control lines are the
// garbage outputs: the two b copies of level 2 and the four c copies of
// level 3, garbage = {c4, c3, c2, c1, b2, b1}. The first b copy also feeds
// the second level-2 gate.
//
// Purely combinational, no clock. The gate types, their count, the constant
// inputs and the level structure follow the published circuit; the order in
// which the four level-2 terms reach the level-3 gates is this design's
// choice and has no effect on the outputs.
module rev_decoder_3x8 (
  input  logic       a,  // most significant select bit
  input  logic       b,
  input  logic       c,  // least significant select bit
  output logic       p,  // 000
  output logic       q,  // 001
  output logic       r,  // 010
  output logic       s,  // 011
  output logic       t,  // 100
  output logic       x,  // 101
  output logic       y,  // 110
  output logic       z,  // 111
  output logic [5:0] garbage
);
  logic a_cp, a_n;                 // level 1
  logic b1, b2;                    // control copies of level 2
  logic ab, ab_n, anb, anb_n;      // a&b, a&~b, ~a&b, ~a&~b

  feynman_gate u_fg (.a(a), .b(1'b1), .p(a_cp), .q(a_n));

  mfg_gate u_mfg_b1 (.a(b),  .b(1'b0), .c(a_cp), .p(b1), .q(ab),  .r(ab_n));
  mfg_gate u_mfg_b2 (.a(b1), .b(1'b0), .c(a_n),  .p(b2), .q(anb), .r(anb_n));

  logic c1, c2, c3, c4;
  mfg_gate u_mfg_c1 (.a(c), .b(1'b0), .c(ab),    .p(c1), .q(z), .r(y));
  mfg_gate u_mfg_c2 (.a(c), .b(1'b0), .c(ab_n),  .p(c2), .q(x), .r(t));
  mfg_gate u_mfg_c3 (.a(c), .b(1'b0), .c(anb),   .p(c3), .q(s), .r(r));
  mfg_gate u_mfg_c4 (.a(c), .b(1'b0), .c(anb_n), .p(c4), .q(q), .r(p));

  assign garbage = {c4, c3, c2, c1, b2, b1};
endmodule
