// tb_quat_array: self-checking test of the 4x4 quaternary cell array.
// Two arrays are tested: one with the default (per-digit comparator) map and one with a
// test map generated here, cell[r][c] = (r + 2c) mod 4. For every row/column pair driven
// with proper complementary selects it checks the four intermediate lines (the selected
// row) and the output (the selected cell) against values computed in the bench. It then
// checks that an unselected row, a select whose complement is not inverted, and an
// unselected column all give level 0.
module tb_quat_array;
  import quat_pkg::*;

  function automatic cell_map_t test_map();
    cell_map_t m;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        m[r][c] = quat_t'((r + 2 * c) % 4);
    return m;
  endfunction

  localparam cell_map_t TMAP = test_map();

  // Per-digit comparison worked out from the magnitudes: 1 L, 2 E, 3 G.
  function automatic int cmp_ref(int a, int b);
    return (a < b) ? 1 : (a == b) ? 2 : 3;
  endfunction

  logic [3:0] row_sel, row_sel_n, col_sel, col_sel_n;
  quat_t [3:0] lines_d, lines_t;
  quat_t q_d, q_t;
  int checks = 0, failures = 0;

  quat_array dut_default (
    .row_sel(row_sel), .row_sel_n(row_sel_n), .col_sel(col_sel), .col_sel_n(col_sel_n),
    .lines(lines_d), .q(q_d));

  quat_array #(.CELLS(TMAP)) dut_test (
    .row_sel(row_sel), .row_sel_n(row_sel_n), .col_sel(col_sel), .col_sel_n(col_sel_n),
    .lines(lines_t), .q(q_t));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
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
    // Normal selection of every cell.
    for (int r = 0; r < 4; r++) begin
      for (int c = 0; c < 4; c++) begin
        row_sel = 4'(1 << r); row_sel_n = ~row_sel;
        col_sel = 4'(1 << c); col_sel_n = ~col_sel;
        #1;
        check($sformatf("default q r=%0d c=%0d", r, c), int'(q_d), cmp_ref(r, c));
        check($sformatf("test q r=%0d c=%0d", r, c), int'(q_t), (r + 2 * c) % 4);
        for (int k = 0; k < 4; k++) begin
          check($sformatf("default line%0d r=%0d", k, r), int'(lines_d[k]), cmp_ref(r, k));
          check($sformatf("test line%0d r=%0d", k, r), int'(lines_t[k]), (r + 2 * k) % 4);
        end
      end
    end
    // No row selected: lines and output stay at level 0.
    row_sel = 4'b0000; row_sel_n = 4'b1111; col_sel = 4'b0010; col_sel_n = 4'b1101;
    #1;
    check("no row: test q", int'(q_t), 0);
    check("no row: test line2", int'(lines_t[2]), 0);
    // Row 3 select high but its complement not low: the pass gate does not conduct.
    row_sel = 4'b1000; row_sel_n = 4'b1111;
    #1;
    check("bad complement: default q", int'(q_d), 0);
    check("bad complement: default line1", int'(lines_d[1]), 0);
    // Row 3 selected, no column: output 0, lines still carry row 3.
    row_sel = 4'b1000; row_sel_n = 4'b0111; col_sel = 4'b0000; col_sel_n = 4'b1111;
    #1;
    check("no column: default q", int'(q_d), 0);
    check("no column: default line1", int'(lines_d[1]), cmp_ref(3, 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
