// bw_white_cell: white cell of the Baugh-Wooley array multiplier.
//
// The cell forms the partial product pp = c & d with a AND gate and adds it to
// the sum arriving diagonally from the row above (s_i) and the carry
// arriving vertically from the cell above (cy_i) in one reversible full
// adder. It puts out the new sum (s_o, diagonal) and carry (cy_o, vertical)
// and the adder's two garbage lines. The RFA is fed with A = pp, B = s_i,
// Cin = cy_i and a 0 ancilla; that assignment of the three addends is a
// choice of this implementation (the sum is symmetric in them).
// Combinational.
module bw_white_cell
  import bw_pkg::*;
(
  input  logic         c_i,        // multiplicand bit (vertical line)
  input  logic         d_i,        // multiplier bit (horizontal line)
  input  logic         s_i,        // sum from the previous row
  input  logic         cy_i,       // carry from the cell above
  output logic         s_o,        // sum out
  output logic         cy_o,       // carry out
  output rfa_garbage_t garbage_o   // RFA garbage lines
);

  logic pp;  // partial product

  always_comb pp = c_i & d_i;

  rfa u_rfa (
    .a_i      (pp),
    .b_i      (s_i),
    .anc_i    (1'b0),
    .cin_i    (cy_i),
    .sum_o    (s_o),
    .carry_o  (cy_o),
    .garbage_o(garbage_o)
  );

endmodule
