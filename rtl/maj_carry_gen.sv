// maj_carry_gen: majority-gate parallel-prefix carry network of the 8-bit
// adder (the "carry generate block").
//
// How it works. A ripple adder computes c[i+1] = M(a[i], b[i], c[i]). The
// tree here relies on the majority identity
//     M(x, y, M(u, v, w)) = M(M(x, y, u), M(x, y, v), w)
// which lets a group of bit positions be summarised by two majority values
// that no longer depend on the incoming carry. For a pair of bits (i+1, i):
//     M(a[i+1], b[i+1], a[i]) and M(a[i+1], b[i+1], b[i]),
// and the carry out of the pair is M(<first>, <second>, c[i]). Two pair
// summaries combine the same way into a four-bit summary. Gate numbers below
// are the ones of the published gate-level drawing:
//     g1          c2  = M(a1, b1, c1)
//     g3, g2      pair summary of bits 3..2
//     g5, g4      pair summary of bits 5..4
//     g7, g6      pair summary of bits 7..6
//     g8          c4  = M(g3, g2, c2)                 (= m8)
//     g10, g9     four-bit summary of bits 7..4       (= m10, m9)
//     g11         c6  = M(g5, g4, c4)
//     g12         c3  = M(a2, b2, c2)
//     g13         c5  = M(a4, b4, c4)
//     g14         c7  = M(a6, b6, c6)
// The drawing starts at carry c1. This design adds one gate, g0,
// c1 = M(a0, b0, c0), so that the block is a full 8-bit adder with carry-in
// c0 (a design choice; the gate is the ripple-carry equation itself).
// The carry-out c8 = M(m10, m9, m8) is not formed here: it is built by the
// switchable final-carry stage (switch_carry) from m8, m9 and m10.
//
// Interface: a, b (8 bits), c0 in; carry[7:1] out with carry[i] the carry
// into bit i; m8, m9, m10 out. Purely combinational.
module maj_carry_gen (
  input  logic [7:0] a,
  input  logic [7:0] b,
  input  logic       c0,
  output logic [7:1] carry,
  output logic       m8,
  output logic       m9,
  output logic       m10
);

  // Gate outputs, indexed by the gate number of the drawing (g0 added).
  logic [14:0] g;

  // Carry into bit 1 (added stage) and bit 2.
  maj3 u_g0  (.x(a[0]), .y(b[0]), .z(c0),    .m(g[0]));
  maj3 u_g1  (.x(a[1]), .y(b[1]), .z(g[0]),  .m(g[1]));

  // Pair summaries, level 1.
  maj3 u_g2  (.x(a[3]), .y(b[3]), .z(b[2]),  .m(g[2]));
  maj3 u_g3  (.x(a[3]), .y(b[3]), .z(a[2]),  .m(g[3]));
  maj3 u_g4  (.x(a[5]), .y(b[5]), .z(b[4]),  .m(g[4]));
  maj3 u_g5  (.x(a[5]), .y(b[5]), .z(a[4]),  .m(g[5]));
  maj3 u_g6  (.x(a[7]), .y(b[7]), .z(b[6]),  .m(g[6]));
  maj3 u_g7  (.x(a[7]), .y(b[7]), .z(a[6]),  .m(g[7]));

  // Level 2: carry into bit 4 and the four-bit summary of bits 7..4.
  maj3 u_g8  (.x(g[3]), .y(g[2]), .z(g[1]),  .m(g[8]));
  maj3 u_g9  (.x(g[7]), .y(g[6]), .z(g[4]),  .m(g[9]));
  maj3 u_g10 (.x(g[7]), .y(g[6]), .z(g[5]),  .m(g[10]));

  // Remaining carries.
  maj3 u_g11 (.x(g[5]), .y(g[4]), .z(g[8]),  .m(g[11]));
  maj3 u_g12 (.x(a[2]), .y(b[2]), .z(g[1]),  .m(g[12]));
  maj3 u_g13 (.x(a[4]), .y(b[4]), .z(g[8]),  .m(g[13]));
  maj3 u_g14 (.x(a[6]), .y(b[6]), .z(g[11]), .m(g[14]));

  assign carry = {g[14], g[11], g[13], g[8], g[12], g[1], g[0]};
  assign m8    = g[8];
  assign m9    = g[9];
  assign m10   = g[10];

endmodule
