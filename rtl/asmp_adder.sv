// asmp_adder: 8-bit accuracy-switchable majority-logic prefix adder (top).
//
// The adder is built only from three-input majority gates. A prefix tree of
// majority gates (maj_carry_gen) produces the carries into every bit
// position and three final-stage values m8, m9, m10. The carry-out is formed
// in a separate stage (switch_carry) whose multiplexer lets the caller pick
// between the exact carry-out and an approximate one that ignores carries
// propagating from bits 3..0 into bits 7..4. The sum generator
// (maj_sum_gen) then forms all eight sum bits in parallel.
//
// Exact mode (approx = 0): {cout, sum} = a + b + cin.
// Approximate mode (approx = 1): sum is unchanged; cout is the carry out of
// a[7:4] + b[7:4] with a zero carry-in. It is too small by one exactly when
// the lower half produces a carry into bit 4 that the upper half propagates.
//
// In this design only the carry-out is switched; the sum bits always use the
// exact carries (this design's choice, so that the approximation affects a
// single output bit).
//
// Interface: a, b (8 bits), cin, approx in; sum (8 bits), cout out. Purely
// combinational, no clock or reset.
module asmp_adder
  import asmp_pkg::*;
(
  input  logic [ADDER_W-1:0] a,
  input  logic [ADDER_W-1:0] b,
  input  logic               cin,
  input  logic               approx,
  output logic [ADDER_W-1:0] sum,
  output logic               cout
);

  logic [7:1] carry;
  logic       m8, m9, m10;
  logic       c8_exact;

  maj_carry_gen u_carry (
    .a     (a),
    .b     (b),
    .c0    (cin),
    .carry (carry),
    .m8    (m8),
    .m9    (m9),
    .m10   (m10)
  );

  switch_carry u_final (
    .m8       (m8),
    .m9       (m9),
    .m10      (m10),
    .approx   (approx),
    .c8       (cout),
    .c8_exact (c8_exact)
  );

  maj_sum_gen #(.W(ADDER_W)) u_sum (
    .a     (a),
    .b     (b),
    .carry ({c8_exact, carry, cin}),
    .s     (sum)
  );

endmodule
