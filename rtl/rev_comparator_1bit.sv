// 1-bit reversible magnitude comparator.
//
// Compares two bits and raises exactly one of aeb (a == b), agb (a > b) and
// alb (a < b). It is built from one NOT, one Peres gate and two Feynman
// (CNOT) gates, quantum cost 4 + 2*1 + 1 = 7:
//
//   1. b is inverted, and a Peres gate takes (a, ~b, 0). Its outputs are
//      a (brought out as the garbage line g1), a ^ ~b (the XNOR of a and b)
//      and a & ~b (a > b).
//   2. A CNOT with its target held at 1 copies the XNOR out as aeb and
//      produces its complement a ^ b on the second line.
//   3. A second CNOT is controlled by a & ~b and targets a ^ b. Its control
//      passes through as agb; its target becomes (a ^ b) ^ (a & ~b) = ~a & b,
//      which is alb.
//
// Purely combinational, no clock. The gate count, the gate order and the
// constant 1 on the first CNOT follow the published circuit. The constant 0
// on the Peres gate's third input is this design's reading of the unlabeled
// line in that circuit (its simulation holds that input at 0), and so is the
// choice of which CNOT input each Peres output drives. For a == b == 1 the
// comparator gives alb = 0, as its name requires.
module rev_comparator_1bit (
  input  logic a,
  input  logic b,
  output logic aeb,  // a == b
  output logic agb,  // a >  b
  output logic alb,  // a <  b
  output logic g1    // garbage output of the Peres gate (copy of a)
);
  logic b_n;        // output of the NOT gate
  logic peres_q;    // a ^ ~b  (XNOR)
  logic peres_r;    // a & ~b  (greater)
  logic neq;        // a ^ b, second line of the first CNOT

  assign b_n = ~b;

  peres_gate u_peres (
    .a(a), .b(b_n), .c(1'b0),
    .p(g1), .q(peres_q), .r(peres_r)
  );

  feynman_gate u_cnot_eq (
    .a(peres_q), .b(1'b1),
    .p(aeb), .q(neq)
  );

  feynman_gate u_cnot_lt (
    .a(peres_r), .b(neq),
    .p(agb), .q(alb)
  );
endmodule
