// quat_array: 4x4 array of hard-wired quaternary cells, the "memory" of a driver-array
// circuit.
//
// Every cell is tied to one of the four reference levels; the map CELLS[row][column]
// says which. Selection happens in two stages, as in the CMOS array:
//   1. the row select pairs (row_sel, row_sel_n) from the first driver open the pass
//      gates of one row, which puts that row's four cell values on the intermediate
//      lines Out0..Out3 (port `lines`);
//   2. the column select pairs (col_sel, col_sel_n) from the second driver pass one of
//      those lines to the output q.
// A pass gate conducts only when its select line is high and its complement is low.
// Lines that no gate drives would float in silicon; here they read as level 0, the
// unused level, so a missing or broken select shows up as the error status.
//
// Purely combinational. The default map is the per-digit comparator; any two-input
// quaternary truth table can be loaded through CELLS. Row 0 / column 0 is the cell at
// the lower left of the printed arrays.
module quat_array
  import quat_pkg::*;
#(
  parameter cell_map_t CELLS = CMP_CELLS
) (
  input  logic [NLEVELS-1:0]   row_sel,
  input  logic [NLEVELS-1:0]   row_sel_n,
  input  logic [NLEVELS-1:0]   col_sel,
  input  logic [NLEVELS-1:0]   col_sel_n,
  output quat_t [NLEVELS-1:0]  lines,     // Out0..Out3: cells of the selected row
  output quat_t                q          // selected cell
);

  logic [NLEVELS-1:0] row_pass, col_pass;

  assign row_pass = row_sel & ~row_sel_n;
  assign col_pass = col_sel & ~col_sel_n;

  // Stage 1: row selection onto the intermediate lines.
  always_comb begin
    for (int c = 0; c < NLEVELS; c++) begin
      lines[c] = '0;
      for (int r = 0; r < NLEVELS; r++)
        if (row_pass[r]) lines[c] |= CELLS[r][c];
    end
  end

  // Stage 2: column selection onto the output.
  always_comb begin
    q = '0;
    for (int c = 0; c < NLEVELS; c++)
      if (col_pass[c]) q |= lines[c];
  end

endmodule
