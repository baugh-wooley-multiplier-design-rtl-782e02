// bw_multiplier: signed M x M Baugh-Wooley array multiplier built from
// reversible full adders.
//
// Baugh-Wooley multiplication turns a two's-complement product into a sum
// of only positive terms. Every partial-product bit that pairs one sign bit
// with one non-sign bit has negative weight; it is replaced by its
// complement, and the constant that this introduces is cancelled by adding
// 1 at bit M and 1 at bit 2M-1 (modulo 2^(2M)):
//   P = c[M-1]d[M-1] 2^(2M-2) + sum_{i,j<M-1} c[j]d[i] 2^(i+j)
//     + sum_{j<M-1} ~(c[j]d[M-1]) 2^(j+M-1) + sum_{i<M-1} ~(c[M-1]d[i]) 2^(i+M-1)
//     + 2^M + 2^(2M-1).
//
// Structure. An M x M array of cells, row i for multiplier bit d[i],
// column j for multiplicand bit c[j]. Each cell forms its partial product
// (AND in a white cell, NAND in a pink cell, see bw_pkg::cell_kind) and adds
// it in one reversible full adder (RFA) to the sum from cell (i-1, j+1),
// which has the same weight, and the carry from cell (i-1, j). Row 0 and
// column M-1 receive 0 on the inputs that have no source. The sum of cell
// (i, 0) is product bit i. The last row's sums and carries are then added by
// a ripple row of M RFAs whose carry in is the constant 1 at weight 2^M and
// whose top operand bit is the constant 1 at weight 2^(2M-1); its sums are
// product bits M .. 2M-1 and its carry out is dropped.
//
// The array, cell placement and the two constant ones follow the drawn
// 4 x 4 design; the generalisation to any M >= 2 is this implementation's.
// All garbage lines of the reversible adders, and the dropped carry, are
// brought out so the reversible circuit is complete at the ports.
// Purely combinational: p is valid about 2M cell delays after c and d
// change (down the array, then along the final carry chain).
module bw_multiplier
  import bw_pkg::*;
#(
  parameter int unsigned M = 4  // operand width in bits, >= 2
) (
  input  logic [M-1:0]   c_i,   // multiplicand C, two's complement
  input  logic [M-1:0]   d_i,   // multiplier D, two's complement
  output logic [2*M-1:0] p_o,   // product P = C x D, two's complement
  output rfa_garbage_t [M-1:0][M-1:0] cell_garbage_o,  // [row][column]
  output rfa_garbage_t [M-1:0]        final_garbage_o, // final row, bit k = weight 2^(M+k)
  output logic                        carry_drop_o     // carry out of the final row (discarded)
);

  logic [M-1:0][M-1:0] s;   // s[i][j]: sum out of cell (i, j)
  logic [M-1:0][M-1:0] cy;  // cy[i][j]: carry out of cell (i, j)

  logic [M-1:0] fin_a;      // final row operand: last-row sums and the top 1
  logic [M-1:0] fin_sum;    // final row sums

  for (genvar i = 0; i < M; i++) begin : g_row
    for (genvar j = 0; j < M; j++) begin : g_col
      logic s_in, cy_in;

      if (i == 0 || j == M - 1) begin : g_s0
        assign s_in = 1'b0;
      end else begin : g_sd
        assign s_in = s[i-1][j+1];
      end

      if (i == 0) begin : g_c0
        assign cy_in = 1'b0;
      end else begin : g_cv
        assign cy_in = cy[i-1][j];
      end

      if (cell_kind(i, j, M) == CELL_PINK) begin : g_pink
        bw_pink_cell u_cell (
          .c_i      (c_i[j]),
          .d_i      (d_i[i]),
          .s_i      (s_in),
          .cy_i     (cy_in),
          .s_o      (s[i][j]),
          .cy_o     (cy[i][j]),
          .garbage_o(cell_garbage_o[i][j])
        );
      end else begin : g_white
        bw_white_cell u_cell (
          .c_i      (c_i[j]),
          .d_i      (d_i[i]),
          .s_i      (s_in),
          .cy_i     (cy_in),
          .s_o      (s[i][j]),
          .cy_o     (cy[i][j]),
          .garbage_o(cell_garbage_o[i][j])
        );
      end
    end

    assign p_o[i] = s[i][0];
  end

  // Final row operand A: sums of the last row, shifted to weights 2^M ..
  // 2^(2M-2), and the constant 1 at weight 2^(2M-1).
  assign fin_a = {1'b1, s[M-1][M-1:1]};

  rfa_ripple_adder #(.WIDTH(M)) u_final (
    .a_i      (fin_a),
    .b_i      (cy[M-1]),
    .cin_i    (1'b1),          // constant 1 at weight 2^M
    .sum_o    (fin_sum),
    .cout_o   (carry_drop_o),
    .garbage_o(final_garbage_o)
  );

  assign p_o[2*M-1:M] = fin_sum;

endmodule
