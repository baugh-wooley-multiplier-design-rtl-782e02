// rfa_ripple_adder: ripple-carry adder made of reversible full adders.
//
// This is the final row of the Baugh-Wooley multiplier. It adds two
// WIDTH-bit words and a carry in, bit by bit from the least significant end,
// each bit in one RFA with a 0 ancilla: sum_o + 2^WIDTH * cout_o =
// a_i + b_i + cin_i. The garbage lines of the adders are brought out,
// bit k of the adder in garbage_o[k]. The row's function (adding the last
// array row and the two constant ones) is the multiplier's; the ripple
// structure is the simplest adder that does it. Combinational, delay grows
// linearly with WIDTH.
module rfa_ripple_adder
  import bw_pkg::*;
#(
  parameter int unsigned WIDTH = 4  // operand width
) (
  input  logic [WIDTH-1:0] a_i,       // operand A
  input  logic [WIDTH-1:0] b_i,       // operand B
  input  logic             cin_i,     // carry into bit 0
  output logic [WIDTH-1:0] sum_o,     // sum
  output logic             cout_o,    // carry out of the top bit
  output rfa_garbage_t [WIDTH-1:0] garbage_o  // per-bit RFA garbage
);

  logic [WIDTH:0] cy;  // cy[k] is the carry into bit k

  assign cy[0]  = cin_i;
  assign cout_o = cy[WIDTH];

  for (genvar k = 0; k < WIDTH; k++) begin : g_bit
    rfa u_rfa (
      .a_i      (a_i[k]),
      .b_i      (b_i[k]),
      .anc_i    (1'b0),
      .cin_i    (cy[k]),
      .sum_o    (sum_o[k]),
      .carry_o  (cy[k+1]),
      .garbage_o(garbage_o[k])
    );
  end

endmodule
