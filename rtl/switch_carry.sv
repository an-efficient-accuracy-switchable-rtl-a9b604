// switch_carry: switchable final-carry stage of the adder.
//
// The exact carry-out of the 8-bit adder is c8 = M(m10, m9, m8), where m10
// and m9 summarise bits 7..4 and m8 is the carry into bit 4. Written as a
// sum of two terms,
//     c8 = (m10 & m9) | (m8 & (m10 | m9)),
// the left term is the "approximate part": it is the carry out of bits 7..4
// when the carry into bit 4 is taken as 0, i.e. the carry chain is cut at
// bit 4. The right term is the "augmenting part": it adds the carries that
// propagate from the lower half through the upper half. A 2:1 multiplexer
// driven by `approx` selects either the approximate part alone or the
// exact sum of both parts.
//
// Which term is the approximate one, and the select polarity (1 = approx),
// are this design's reading of the published drawing; the drawing shows the
// approximate part feeding both the augmenting combination and one mux
// input, and the combined value feeding the other mux input.
//
// Interface: m8, m9, m10, approx in; c8 (selected carry-out) and c8_exact
// (always exact, used by the sum stage) out. Purely combinational.
module switch_carry
  import asmp_pkg::*;
(
  input  logic m8,
  input  logic m9,
  input  logic m10,
  input  logic approx,
  output logic c8,
  output logic c8_exact
);

  carry_mode_e mode;
  logic        approx_part;
  logic        augment_part;

  assign mode         = carry_mode_e'(approx);
  assign approx_part  = m10 & m9;
  assign augment_part = m8 & (m10 | m9);
  assign c8_exact     = approx_part | augment_part;

  always_comb begin
    unique case (mode)
      MODE_APPROX: c8 = approx_part;
      default:     c8 = c8_exact;
    endcase
  end

endmodule
