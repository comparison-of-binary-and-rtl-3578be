// quat_processor: one driver-array circuit, the basic quaternary processing element.
//
// Input a goes through a driver that selects a row of the array, input b through a
// second driver that selects a column, and the output q is the level stored in the
// selected cell: q = CELLS[a][b]. Loading a different CELLS map gives any other
// two-input quaternary function; the default is the per-digit comparator.
//
// Purely combinational: one driver stage and one array stage from input to output.
module quat_processor
  import quat_pkg::*;
#(
  parameter cell_map_t CELLS = CMP_CELLS
) (
  input  quat_t a,    // row input
  input  quat_t b,    // column input
  output quat_t q
);

  logic [NLEVELS-1:0] row_sel, row_sel_n, col_sel, col_sel_n;
  quat_t [NLEVELS-1:0] lines;

  quat_driver u_row_drv (.digit(a), .sel(row_sel), .sel_n(row_sel_n));
  quat_driver u_col_drv (.digit(b), .sel(col_sel), .sel_n(col_sel_n));

  quat_array #(.CELLS(CELLS)) u_array (
    .row_sel   (row_sel),
    .row_sel_n (row_sel_n),
    .col_sel   (col_sel),
    .col_sel_n (col_sel_n),
    .lines     (lines),
    .q         (q)
  );

endmodule
