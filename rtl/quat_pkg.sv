// quat_pkg: types and constants shared by the quaternary (four-level) logic blocks.
//
// A quaternary signal is one wire carrying one of four voltage levels. In this RTL a
// level is represented by its digit value 0..3 in a two-bit code, so level k is the
// code k (0 = 2'b00, 1 = 2'b01, 2 = 2'b10, 3 = 2'b11), which is also the binary pair the
// digit stands for.
//
// The comparator status uses three of the four levels: 1 for A < B (L), 2 for A = B (E),
// 3 for A > B (G). Level 0 is the unused "error / don't care" level.
//
// A driver-array circuit is programmed by a 4x4 map of cell values, cell_map_t, indexed
// [row][column]: the row is chosen by the first input, the column by the second. The two
// maps below are the comparator's: the per-digit comparison and the cascade that merges
// the status of a lower digit (row) with that of the next higher digit (column).
package quat_pkg;

  typedef logic [1:0] quat_t;

  typedef enum logic [1:0] {
    LEG_ERR = 2'd0,   // unused level: error or don't care
    LEG_L   = 2'd1,   // A < B
    LEG_E   = 2'd2,   // A = B
    LEG_G   = 2'd3    // A > B
  } leg_t;

  // Number of rows and of columns in an array, i.e. the number of levels.
  localparam int unsigned NLEVELS = 4;

  typedef quat_t [NLEVELS-1:0][NLEVELS-1:0] cell_map_t;   // [row][column]

  // Per-digit magnitude comparison: row = a_i, column = b_i.
  localparam cell_map_t CMP_CELLS = '{
    0: '{0: 2'd2, 1: 2'd1, 2: 2'd1, 3: 2'd1},
    1: '{0: 2'd3, 1: 2'd2, 2: 2'd1, 3: 2'd1},
    2: '{0: 2'd3, 1: 2'd3, 2: 2'd2, 3: 2'd1},
    3: '{0: 2'd3, 1: 2'd3, 2: 2'd3, 3: 2'd2}
  };

  // Cascade: row = status of the less significant part, column = status of the more
  // significant digit. An L or G from the more significant digit wins, an E passes the
  // lower status on, and a 0 on either input gives 0.
  localparam cell_map_t CASCADE_CELLS = '{
    0: '{0: 2'd0, 1: 2'd0, 2: 2'd0, 3: 2'd0},
    1: '{0: 2'd0, 1: 2'd1, 2: 2'd1, 3: 2'd3},
    2: '{0: 2'd0, 1: 2'd1, 2: 2'd2, 3: 2'd3},
    3: '{0: 2'd0, 1: 2'd1, 2: 2'd3, 3: 2'd3}
  };

endpackage
