// tb_quat_processor: self-checking test of the driver-array circuit.
// Three processors are driven with all 16 input pairs:
//   - the default map, checked against a magnitude comparison (1 L, 2 E, 3 G);
//   - the cascade map, checked against the merge rule (a 0 on either input gives 0;
//     otherwise an L or G from the column input wins and an E passes the row input);
//   - a map generated here for the digit-wise AND of the two-bit codes (1 AND 3 = 1),
//     showing that the same circuit computes another truth table.
module tb_quat_processor;
  import quat_pkg::*;

  function automatic cell_map_t and_map();
    cell_map_t m;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        m[r][c] = quat_t'(r & c);
    return m;
  endfunction

  localparam cell_map_t ANDMAP = and_map();

  function automatic int cmp_ref(int a, int b);
    return (a < b) ? 1 : (a == b) ? 2 : 3;
  endfunction

  function automatic int casc_ref(int lower, int upper);
    if (lower == 0 || upper == 0) return 0;
    if (upper == 2) return lower;
    return upper;
  endfunction

  quat_t a, b, q_cmp, q_casc, q_and;
  int checks = 0, failures = 0;

  quat_processor                         dut_cmp  (.a(a), .b(b), .q(q_cmp));
  quat_processor #(.CELLS(CASCADE_CELLS)) dut_casc (.a(a), .b(b), .q(q_casc));
  quat_processor #(.CELLS(ANDMAP))       dut_and  (.a(a), .b(b), .q(q_and));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s a=%0d b=%0d: got %0d expected %0d", what, a, b, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        a = quat_t'(i);
        b = quat_t'(j);
        #1;
        check("compare", int'(q_cmp), cmp_ref(i, j));
        check("cascade", int'(q_casc), casc_ref(i, j));
        check("and", int'(q_and), i & j);
      end
    end
    // The example from the quaternary logic description: 1 AND 3 = 1.
    a = 2'd1; b = 2'd3;
    #1;
    check("and example", int'(q_and), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
