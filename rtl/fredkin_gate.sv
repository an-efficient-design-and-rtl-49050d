// Fredkin gate: a 3-input, 3-output reversible controlled swap (quantum
// cost 5). The first line is the control; when it is 1 the other two lines
// trade places.
//
//   p = a
//   q = a ? c : b      (a'b + ac)
//   r = a ? b : c      (a'c + ab)
//
// Used as a 2-to-1 selector in the 8x1 multiplexer: the select drives a, the
// two data inputs drive b and c, and q carries the selected one (b when the
// select is 0). Purely combinational. The mapping is the standard one; the
// design names the gate and writes out q (O1 = S0'A + S0B) but not p and r.
module fredkin_gate (
  input  logic a,  // control
  input  logic b,
  input  logic c,
  output logic p,  // = a
  output logic q,  // = b when a = 0, c when a = 1
  output logic r   // = c when a = 0, b when a = 1
);
  assign p = a;
  assign q = a ? c : b;
  assign r = a ? b : c;
endmodule
