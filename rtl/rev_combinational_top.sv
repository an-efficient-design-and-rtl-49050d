// Reversible combinational circuit set.
//
// The four reversible circuits of the design stand side by side, each with
// its own inputs and outputs brought out under its own prefix:
//
//   cmp_   1-bit comparator (Peres + 2 CNOT + NOT, quantum cost 7)
//   dec3_  3-to-8 decoder   (Feynman + 6 MFG, quantum cost 25)
//   dec4_  4-to-16 decoder  (3-to-8 decoder + 8 MFG, quantum cost 57)
//   mux_   8-to-1 multiplexer (7 Fredkin gates, quantum cost 35)
//
// They share no signals. Decoder outputs are packed so that bit i is the
// line for input value i (for the 3-to-8 decoder, dec3_y = {z,y,x,t,s,r,q,p}
// in the naming of its module); multiplexer data input i is mux_d[i]
// (a = mux_d[0] ... h = mux_d[7]) and its select word is mux_sel =
// {s2, s1, s0}. Garbage outputs of every circuit are brought out so that
// nothing is left unconnected. Purely combinational, no clock or reset.
// Which circuits are grouped together follows the design's comparison of
// them; the port packing is this design's own.
module rev_combinational_top (
  // comparator
  input  logic        cmp_a,
  input  logic        cmp_b,
  output logic        cmp_aeb,
  output logic        cmp_agb,
  output logic        cmp_alb,
  output logic        cmp_garbage,
  // 3-to-8 decoder
  input  logic [2:0]  dec3_in,   // {a, b, c}
  output logic [7:0]  dec3_y,
  output logic [5:0]  dec3_garbage,
  // 4-to-16 decoder
  input  logic [3:0]  dec4_in,   // {a, b, c, d}
  output logic [15:0] dec4_y,
  output logic [13:0] dec4_garbage,
  // 8-to-1 multiplexer
  input  logic [7:0]  mux_d,
  input  logic [2:0]  mux_sel,   // {s2, s1, s0}
  output logic        mux_z,
  output logic [13:0] mux_garbage
);
  rev_comparator_1bit u_cmp (
    .a(cmp_a), .b(cmp_b),
    .aeb(cmp_aeb), .agb(cmp_agb), .alb(cmp_alb), .g1(cmp_garbage)
  );

  rev_decoder_3x8 u_dec3 (
    .a(dec3_in[2]), .b(dec3_in[1]), .c(dec3_in[0]),
    .p(dec3_y[0]), .q(dec3_y[1]), .r(dec3_y[2]), .s(dec3_y[3]),
    .t(dec3_y[4]), .x(dec3_y[5]), .y(dec3_y[6]), .z(dec3_y[7]),
    .garbage(dec3_garbage)
  );

  rev_decoder_4x16 u_dec4 (
    .a(dec4_in[3]), .b(dec4_in[2]), .c(dec4_in[1]), .d(dec4_in[0]),
    .out(dec4_y), .garbage(dec4_garbage)
  );

  rev_mux_8x1 u_mux (
    .a(mux_d[0]), .b(mux_d[1]), .c(mux_d[2]), .d(mux_d[3]),
    .e(mux_d[4]), .f(mux_d[5]), .g(mux_d[6]), .h(mux_d[7]),
    .s0(mux_sel[0]), .s1(mux_sel[1]), .s2(mux_sel[2]),
    .z(mux_z), .garbage(mux_garbage)
  );
endmodule
