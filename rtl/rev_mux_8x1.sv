// 8-to-1 reversible multiplexer.
//
// Passes one of the eight data inputs a..h to z, chosen by the select word
// {s2, s1, s0}: a for 0, b for 1, c for 2, ... h for 7. It is a three-level
// tree of seven Fredkin gates (quantum cost 7*5 = 35). Each Fredkin gate,
// with its select on the control line and two data lines on the other
// inputs, puts the first data line on its middle output when the select is
// 0 and the second when it is 1 (O = S'X + SY):
//
//   level 1  s0 picks within the pairs (a,b) (c,d) (e,f) (g,h): O1..O4
//   level 2  s1 picks between O1/O2 -> O5 and between O3/O4 -> O6
//   level 3  s2 picks between O5 and O6 -> z
//
// The two other outputs of every gate are garbage, G1..G14, brought out as
// garbage[0] = G1 ... garbage[13] = G14 (G(2k-1) is the control copy and
// G(2k) the unselected data line of gate k).
//
// Purely combinational, no clock. The tree, the gate type, the assignment of
// selects to levels and the numbering of the garbage lines follow the
// published circuit and its equations (s0 = 0 gives O1 = a, s1 = 0 gives
// O5 = a, s2 = 0 gives z = a). The published truth table lists s0 as the
// most significant select bit, which contradicts that circuit; this design
// follows the circuit, so s0 is the least significant bit.
module rev_mux_8x1 (
  input  logic        a,
  input  logic        b,
  input  logic        c,
  input  logic        d,
  input  logic        e,
  input  logic        f,
  input  logic        g,
  input  logic        h,
  input  logic        s0,  // least significant select bit
  input  logic        s1,
  input  logic        s2,  // most significant select bit
  output logic        z,
  output logic [13:0] garbage
);
  logic o1, o2, o3, o4, o5, o6;

  fredkin_gate u_f1 (.a(s0), .b(a),  .c(b),  .p(garbage[0]),  .q(o1), .r(garbage[1]));
  fredkin_gate u_f2 (.a(s0), .b(c),  .c(d),  .p(garbage[2]),  .q(o2), .r(garbage[3]));
  fredkin_gate u_f3 (.a(s0), .b(e),  .c(f),  .p(garbage[4]),  .q(o3), .r(garbage[5]));
  fredkin_gate u_f4 (.a(s0), .b(g),  .c(h),  .p(garbage[6]),  .q(o4), .r(garbage[7]));

  fredkin_gate u_f5 (.a(s1), .b(o1), .c(o2), .p(garbage[8]),  .q(o5), .r(garbage[9]));
  fredkin_gate u_f6 (.a(s1), .b(o3), .c(o4), .p(garbage[10]), .q(o6), .r(garbage[11]));

  fredkin_gate u_f7 (.a(s2), .b(o5), .c(o6), .p(garbage[12]), .q(z),  .r(garbage[13]));
endmodule
