// quat_comparator: magnitude comparator for quaternary words, built only from
// driver-array circuits.
//
// Each digit pair (a[i], b[i]) goes to its own driver-array programmed with the
// per-digit comparison map, giving a status digit_leg[i] (1 = L, 2 = E, 3 = G). The
// statuses are then merged by cascade driver-arrays, starting from the least
// significant digit: the running status of the lower digits selects the row and the
// status of the next higher digit selects the column. A higher digit that is L or G
// decides; one that is E lets the lower result through. The result leg is one
// quaternary signal: 1 for A < B, 2 for A = B, 3 for A > B; 0 never appears for valid
// inputs.
//
// With the default DIGITS = 2 (the quaternary equivalent of a 4-bit binary compare) this
// is three driver-arrays: two digit comparators working in parallel and one cascade
// array. The chaining rule for DIGITS > 2 (one more comparator and one more cascade
// array per digit) is this design's extension of that two-digit arrangement.
//
// Purely combinational. Depth: two driver-array stages for DIGITS = 2, DIGITS stages in
// general.
module quat_comparator
  import quat_pkg::*;
#(
  parameter int unsigned DIGITS = 2
) (
  input  quat_t [DIGITS-1:0] a,          // word A, a[0] is the least significant digit
  input  quat_t [DIGITS-1:0] b,          // word B
  output quat_t [DIGITS-1:0] digit_leg,  // per-digit status L_i/E_i/G_i
  output quat_t              leg         // overall L/E/G status
);

  // running[i] is the status of digits i..0
  quat_t [DIGITS-1:0] running;

  for (genvar i = 0; i < DIGITS; i++) begin : g_digit
    quat_processor #(.CELLS(CMP_CELLS)) u_cmp (
      .a (a[i]),
      .b (b[i]),
      .q (digit_leg[i])
    );

    if (i == 0) begin : g_first
      assign running[0] = digit_leg[0];
    end else begin : g_cascade
      quat_processor #(.CELLS(CASCADE_CELLS)) u_casc (
        .a (running[i-1]),
        .b (digit_leg[i]),
        .q (running[i])
      );
    end
  end

  assign leg = running[DIGITS-1];

endmodule
