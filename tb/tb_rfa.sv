// tb_rfa: exhaustive self-checking test of the reversible full adder.
// With the ancilla at 0, every (a, b, cin) must give the arithmetic sum and
// carry of a + b + cin and the garbage lines a and a ^ b. Over all 16
// patterns of the four input lines (ancilla included) the 16 output patterns
// must all differ: the adder is reversible.
module tb_rfa
  import bw_pkg::*;
;
  int checks = 0, failures = 0;

  logic a, b, anc, cin, sum, carry;
  rfa_garbage_t g;
  bit seen [16];

  rfa dut (.a_i(a), .b_i(b), .anc_i(anc), .cin_i(cin),
           .sum_o(sum), .carry_o(carry), .garbage_o(g));

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
    logic [1:0] total;
    logic [3:0] outv;
    for (int v = 0; v < 16; v++) begin
      {anc, a, b, cin} = 4'(v);
      #1;
      outv = {g.a, g.axb, carry, sum};
      if (anc == 1'b0) begin
        total = 2'(a) + 2'(b) + 2'(cin);
        check($sformatf("carry,sum for a=%b b=%b cin=%b", a, b, cin), {carry, sum}, total);
      end
      check($sformatf("garbage for a=%b b=%b", a, b), {g.a, g.axb}, {a, a != b});
      checks++;
      if (seen[outv]) begin
        failures++;
        $display("FAIL output pattern %b repeated: not reversible", outv);
      end
      seen[outv] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
