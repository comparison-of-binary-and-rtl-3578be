// qb_converter: quaternary-to-binary converter for the comparator status.
//
// One quaternary status signal comes in and three binary lines go out, one per
// condition: level 1 raises l (A < B), level 2 raises e (A = B), level 3 raises g
// (A > B). The unused level 0 (error or don't care) leaves all three low, so a binary
// receiver sees at most one line high. This lets the quaternary comparator hand its
// result to ordinary binary logic.
//
// Purely combinational. The level-to-line assignment follows the comparator's status
// convention; the circuit (pass structures tied to reference levels in the original) is
// replaced by a decoder of the two-bit level code.
module qb_converter
  import quat_pkg::*;
(
  input  quat_t leg_q,   // quaternary L/E/G status
  output logic  l,       // A < B
  output logic  e,       // A = B
  output logic  g        // A > B
);

  always_comb begin
    l = 1'b0;
    e = 1'b0;
    g = 1'b0;
    unique case (leg_t'(leg_q))
      LEG_L:   l = 1'b1;
      LEG_E:   e = 1'b1;
      LEG_G:   g = 1'b1;
      default: ;   // LEG_ERR: no condition
    endcase
  end

endmodule
