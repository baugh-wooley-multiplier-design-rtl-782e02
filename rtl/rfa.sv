// rfa: reversible full adder built from four multiple-control Toffoli gates.
//
// Four lines go in: the operands a and b, an ancilla line that must be 0,
// and the carry in cin. Four lines come out: a (garbage), a ^ b (garbage),
// carry and sum. The gates act in this order:
//   1. Toffoli, controls a and b, target the ancilla:   anc' = anc ^ a&b
//   2. Feynman, control a, target b:                    b'   = a ^ b
//   3. Toffoli, controls b' and cin, target the ancilla: carry = anc' ^ b'&cin
//   4. Feynman, control b', target cin:                 sum  = cin ^ b'
// so that with anc = 0, sum = a ^ b ^ cin and carry = ((a ^ b) & cin) ^ (a & b).
// The mapping of the four lines is a bijection, so the adder stays reversible
// for any ancilla value; only anc = 0 gives the carry. Combinational.
module rfa
  import bw_pkg::*;
(
  input  logic         a_i,        // operand A
  input  logic         b_i,        // operand B
  input  logic         anc_i,      // ancilla (constant 0 in normal use)
  input  logic         cin_i,      // carry in
  output logic         sum_o,      // A ^ B ^ Cin
  output logic         carry_o,    // majority(A, B, Cin) when anc_i = 0
  output rfa_garbage_t garbage_o   // A and A ^ B
);

  logic anc_ab;  // ancilla after gate 1
  logic axb;     // line B after gate 2

  mct_gate #(.NCTRL(2)) u_g1 (.ctrl_i({a_i, b_i}),   .tgt_i(anc_i),  .tgt_o(anc_ab));
  mct_gate #(.NCTRL(1)) u_g2 (.ctrl_i(a_i),          .tgt_i(b_i),    .tgt_o(axb));
  mct_gate #(.NCTRL(2)) u_g3 (.ctrl_i({axb, cin_i}), .tgt_i(anc_ab), .tgt_o(carry_o));
  mct_gate #(.NCTRL(1)) u_g4 (.ctrl_i(axb),          .tgt_i(cin_i),  .tgt_o(sum_o));

  always_comb begin
    garbage_o.a   = a_i;
    garbage_o.axb = axb;
  end

endmodule
