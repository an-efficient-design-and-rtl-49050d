// Peres gate: a 3-input, 3-output reversible gate equal to a Toffoli gate
// followed by a CNOT on its first two lines (quantum cost 4).
//
//   p = a
//   q = a ^ b
//   r = (a & b) ^ c
//
// With c tied to 0 it gives the XOR and the AND of a and b at once, which is
// what the 1-bit comparator relies on. Purely combinational. The mapping is
// the standard definition of the gate; the design names it but does not
// print it.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,  // = a
  output logic q,  // = a ^ b
  output logic r   // = (a & b) ^ c
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & b) ^ c;
endmodule
