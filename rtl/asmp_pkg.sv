// asmp_pkg: constants and types shared by the accuracy-switchable majority
// prefix adder.
//
// ADDER_W is the operand width of the adder. The prefix network of this
// design is drawn for eight bits (carry-out c8), so the carry generator is
// fixed at that width; the sum generator takes it as a parameter.
//
// carry_mode_e names the two settings of the final-carry multiplexer. The
// encoding (0 = exact, 1 = approximate) is this design's choice: the select
// line is only labelled "Approx", so a high level selects the approximate
// carry.
package asmp_pkg;

  localparam int unsigned ADDER_W = 8;

  typedef enum logic {
    MODE_EXACT  = 1'b0,
    MODE_APPROX = 1'b1
  } carry_mode_e;

endpackage
