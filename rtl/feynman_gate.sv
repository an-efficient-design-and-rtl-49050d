// Feynman gate (CNOT): the 2-input, 2-output reversible gate that copies
// its control line and XORs it into its target line.
//
//   p = a          (control passes through)
//   q = a ^ b      (target inverted when the control is 1)
//
// The mapping is its own inverse. Purely combinational; no clock or reset.
// With b tied to 1 the gate makes a copy and a complement of a, which is how
// the decoders use it; with b tied to 0 it is a fan-out (copy) gate. The
// mapping is the standard definition of the gate, which the design names
// (quantum cost 1) but does not spell out.
module feynman_gate (
  input  logic a,  // control
  input  logic b,  // target
  output logic p,  // = a
  output logic q   // = a ^ b
);
  assign p = a;
  assign q = a ^ b;
endmodule
