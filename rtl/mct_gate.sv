// mct_gate: multiple-control Toffoli gate.
//
// A reversible gate on NCTRL+1 lines. The NCTRL control lines pass through
// unchanged, so only the target line is produced here: it is inverted when
// every control line is 1 (tgt_o = tgt_i ^ &ctrl_i). With one control it is
// the controlled-NOT (Feynman) gate, with two the classic Toffoli gate.
// Purely combinational. The gate is named by the design; the parameterised
// control count is a choice of this implementation.
module mct_gate #(
  parameter int unsigned NCTRL = 2  // number of control lines, >= 1
) (
  input  logic [NCTRL-1:0] ctrl_i,  // control lines
  input  logic             tgt_i,   // target line in
  output logic             tgt_o    // target line out
);

  always_comb tgt_o = tgt_i ^ (&ctrl_i);

endmodule
