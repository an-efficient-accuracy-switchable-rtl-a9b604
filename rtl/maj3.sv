// maj3: three-input majority gate, M(x, y, z).
//
// The output is 1 when at least two of the three inputs are 1, i.e.
// M(x, y, z) = xy + yz + xz. This is the only logic primitive of the prefix
// network: the carry of a full adder is M(a, b, c_in), and every node of the
// carry tree and of the sum stage is one of these gates.
//
// Interface: x, y, z in, m out. Purely combinational, no clock.
module maj3 (
  input  logic x,
  input  logic y,
  input  logic z,
  output logic m
);

  assign m = (x & y) | (y & z) | (x & z);

endmodule
