// MFG gate: the 3-input, 3-output reversible gate that the decoders use to
// split one line into two according to a control bit.
//
//   p = a
//   q = a ? c : b
//   r = a ? b : c
//
// Every MFG in the decoders has its middle input tied to 0, so with the
// control on a and a product term x on c it returns a, a & x and ~a & x:
// the product term is steered to q when the control is 1 and to r when it
// is 0. The design names this gate, gives it a quantum cost of 4 and shows
// those three output roles in its decoder drawing, but never prints its full
// mapping; this module takes the controlled swap (the Fredkin mapping) for
// it, which is reversible and gives exactly those outputs with the middle
// input at 0. Purely combinational.
module mfg_gate (
  input  logic a,  // control
  input  logic b,  // tied to 0 in the decoders
  input  logic c,  // product term to steer
  output logic p,  // = a (garbage in the decoders)
  output logic q,  // = a & c when b = 0
  output logic r   // = ~a & c when b = 0
);
  assign p = a;
  assign q = (a & c) | (~a & b);
  assign r = (~a & c) | (a & b);
endmodule
