// tb_bw_white_cell: exhaustive self-checking test of the white multiplier cell.
// For all 16 combinations of multiplicand bit, multiplier bit, sum in and
// carry in, {carry out, sum out} must equal (AND of the two bits) + sum in +
// carry in, and the garbage lines must be the partial product and its XOR
// with sum in.
module tb_bw_white_cell
  import bw_pkg::*;
;
  int checks = 0, failures = 0;

  logic c, d, s_in, cy_in, s_out, cy_out;
  rfa_garbage_t g;

  bw_white_cell dut (.c_i(c), .d_i(d), .s_i(s_in), .cy_i(cy_in),
                    .s_o(s_out), .cy_o(cy_out), .garbage_o(g));

  task automatic check(string what, logic [1:0] got, logic [1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic pp;
    for (int v = 0; v < 16; v++) begin
      {c, d, s_in, cy_in} = 4'(v);
      #1;
      pp = c & d;
      check($sformatf("cy,s for c=%b d=%b s=%b cy=%b", c, d, s_in, cy_in),
            {cy_out, s_out}, 2'(pp) + 2'(s_in) + 2'(cy_in));
      check($sformatf("garbage for c=%b d=%b s=%b", c, d, s_in), {g.a, g.axb}, {pp, pp ^ s_in});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
