// hybrid_comparator: binary-in, binary-out magnitude comparator whose core works in
// quaternary (four-level) logic.
//
// Two 2*DIGITS-bit binary words a and b are compared; exactly one of l (a < b),
// e (a = b) and g (a > b) is high. Inside, each pair of bits {a[2i+1], a[2i]} is one
// quaternary digit of word A (likewise for B), the quaternary comparator reduces the
// digits to one status signal leg_q, and the quaternary-to-binary converter turns that
// status into the three binary lines.
//
// Binary-to-quaternary conversion: a quaternary level is represented in this RTL by its
// two-bit digit code, which is the binary pair itself, so the binary-to-quaternary
// converters of the hybrid system have no logic to do here and the pairs are wired
// straight to the comparator digits. In silicon that step generates the analog level.
//
// leg_q is brought out as well, giving the quaternary-in, quaternary-out result of the
// comparator without the output converter.
//
// Purely combinational; with DIGITS = 2 the path is two driver-array stages plus the
// output converter. DIGITS = 2 (a 4-bit compare) is the configuration of the original
// design; other values use the cascade extension of quat_comparator.
module hybrid_comparator
  import quat_pkg::*;
#(
  parameter int unsigned DIGITS = 2
) (
  input  logic [2*DIGITS-1:0] a,
  input  logic [2*DIGITS-1:0] b,
  output logic                l,       // a < b
  output logic                e,       // a = b
  output logic                g,       // a > b
  output quat_t               leg_q    // quaternary status: 1 L, 2 E, 3 G
);

  quat_t [DIGITS-1:0] a_q, b_q, digit_leg;

  // Binary pair i is quaternary digit i (see above).
  assign a_q = a;
  assign b_q = b;

  quat_comparator #(.DIGITS(DIGITS)) u_cmp (
    .a         (a_q),
    .b         (b_q),
    .digit_leg (digit_leg),
    .leg       (leg_q)
  );

  qb_converter u_qb (
    .leg_q (leg_q),
    .l     (l),
    .e     (e),
    .g     (g)
  );

  // For any pair of binary words exactly one condition holds.
  always_comb begin
    assert final ((2'(l) + 2'(e) + 2'(g)) == 2'd1)
      else $error("hybrid_comparator: l/e/g not one-hot for a=%0d b=%0d", a, b);
  end

endmodule
