// 4-to-16 reversible decoder.
//
// Raises out[i] for the 4-bit input value i = {a, b, c, d} (a is the most
// significant bit). It extends the 3-to-8 reversible decoder by one more
// level: the eight minterms of {a, b, c} each enter an MFG gate controlled
// by d, with its middle input at 0, which splits the minterm into its d and
// ~d halves. Quantum cost 25 + 8*4 = 57, the figure the design quotes for
// its 4-to-16 decoder.
//
// Garbage outputs: the six of the 3-to-8 decoder in garbage[5:0] and the
// eight copies of d in garbage[13:6].
//
// Purely combinational, no clock. Only the decoder's function and its cost
// are given; the construction (3-to-8 decoder plus one level of eight MFGs)
// is this design's choice, picked because it reproduces that cost.
module rev_decoder_4x16 (
  input  logic        a,  // most significant select bit
  input  logic        b,
  input  logic        c,
  input  logic        d,  // least significant select bit
  output logic [15:0] out,
  output logic [13:0] garbage
);
  logic [7:0] m;  // minterms of {a, b, c}

  rev_decoder_3x8 u_dec3 (
    .a(a), .b(b), .c(c),
    .p(m[0]), .q(m[1]), .r(m[2]), .s(m[3]),
    .t(m[4]), .x(m[5]), .y(m[6]), .z(m[7]),
    .garbage(garbage[5:0])
  );

  for (genvar i = 0; i < 8; i++) begin : g_split
    mfg_gate u_mfg_d (
      .a(d), .b(1'b0), .c(m[i]),
      .p(garbage[6+i]), .q(out[2*i+1]), .r(out[2*i])
    );
  end
endmodule
