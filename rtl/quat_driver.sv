// quat_driver: input driver of a driver-array circuit.
//
// It decodes one quaternary input digit into the control lines of one side of a 4x4
// array: select line sel[k] (L_k) is high when the input sits at level k, and sel_n[k]
// (L_k_N) is its complement, so each pass gate of the array receives a complementary
// pair. Exactly one sel line is high for every input.
//
// Purely combinational, no clock or reset. The decode function and the L_k / L_k_N
// naming follow the array schematic this design is based on; the circuit inside (level
// sensing with sense amplifiers in the original) is replaced here by a plain decoder of
// the two-bit digit code.
module quat_driver
  import quat_pkg::*;
(
  input  quat_t                digit,   // quaternary input level
  output logic [NLEVELS-1:0]   sel,     // L0..L3, one-hot
  output logic [NLEVELS-1:0]   sel_n    // L0_N..L3_N
);

  always_comb begin
    for (int k = 0; k < NLEVELS; k++) begin
      sel[k]   = (digit == quat_t'(k));
      sel_n[k] = (digit != quat_t'(k));
    end
  end

endmodule
