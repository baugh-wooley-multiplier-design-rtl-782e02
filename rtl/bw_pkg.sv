// bw_pkg: constants and helpers shared by the Baugh-Wooley array multiplier.
//
// The array multiplier uses two kinds of cell. A "white" cell forms the
// partial product c_j & d_i; a "pink" cell forms its complement ~(c_j & d_i).
// In an m x m Baugh-Wooley array the pink cells are the ones that carry
// exactly one sign bit: column m-1 of rows 0..m-2, and columns 0..m-2 of row
// m-1. The sign-by-sign cell (row m-1, column m-1) is white again. This
// placement is the one drawn for the 4 x 4 array and follows from the
// product formula; it is written here for any m.
package bw_pkg;

  // Kind of multiplier cell at one array position.
  typedef enum logic {
    CELL_WHITE = 1'b0,  // partial product c & d
    CELL_PINK  = 1'b1   // complemented partial product ~(c & d)
  } cell_kind_e;

  // Garbage lines left over by one reversible full adder.
  typedef struct packed {
    logic a;    // first operand, passed through
    logic axb;  // a ^ b
  } rfa_garbage_t;

  // Which cell sits at row (multiplier bit) `row`, column (multiplicand bit)
  // `col` of an m x m array.
  function automatic cell_kind_e cell_kind(int unsigned row, int unsigned col,
                                           int unsigned m);
    return ((row == m - 1) != (col == m - 1)) ? CELL_PINK : CELL_WHITE;
  endfunction

endpackage
