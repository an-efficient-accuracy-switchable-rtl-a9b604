// maj_sum_gen: sum generate block, all sum bits in parallel from majority
// gates.
//
// For bit i with carry-in c[i] and carry-out c[i+1] = M(a[i], b[i], c[i]),
//     s[i] = M(~c[i+1], M(a[i], b[i], ~c[i+1]), c[i]).
// This equals a[i] ^ b[i] ^ c[i]: when a[i] = b[i] the inner gate returns
// a[i] = c[i+1] and the outer gate returns c[i]; when a[i] != b[i] the inner
// gate returns ~c[i+1] = ~c[i] and the outer gate returns ~c[i]. Each bit
// costs two majority gates and one inverter, and no bit waits for another:
// the delay of the adder is that of the carry network plus two gates.
//
// Interface: a, b (W bits) and carry[W:0] in, carry[i] being the carry into
// bit i and carry[W] the carry-out; s (W bits) out. Combinational.
// W defaults to the adder width of 8.
module maj_sum_gen
  import asmp_pkg::*;
#(
  parameter int unsigned W = ADDER_W
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W:0]   carry,
  output logic [W-1:0] s
);

  logic [W-1:0] cout_n;
  logic [W-1:0] inner;

  for (genvar i = 0; i < W; i++) begin : g_bit
    assign cout_n[i] = ~carry[i+1];
    maj3 u_inner (.x(a[i]),      .y(b[i]),     .z(cout_n[i]), .m(inner[i]));
    maj3 u_outer (.x(cout_n[i]), .y(inner[i]), .z(carry[i]),  .m(s[i]));
  end

endmodule
