// tb_rfa_ripple_adder: self-checking test of the reversible ripple-carry
// adder. The default 4-bit adder is checked for all 512 combinations of
// the operands and carry in; an 8-bit adder gets 2000 random vectors. The
// {carry out, sum} must equal a + b + cin, and bit k's garbage lines must be
// a[k] and a[k] ^ b[k].
module tb_rfa_ripple_adder
  import bw_pkg::*;
;
  int checks = 0, failures = 0;

  logic [3:0] a4, b4, s4;  logic ci4, co4;
  logic [7:0] a8, b8, s8;  logic ci8, co8;
  rfa_garbage_t [3:0] g4;
  rfa_garbage_t [7:0] g8;

  rfa_ripple_adder              dut4 (.a_i(a4), .b_i(b4), .cin_i(ci4),
                                      .sum_o(s4), .cout_o(co4), .garbage_o(g4));
  rfa_ripple_adder #(.WIDTH(8)) dut8 (.a_i(a8), .b_i(b8), .cin_i(ci8),
                                      .sum_o(s8), .cout_o(co8), .garbage_o(g8));

  task automatic check(string what, logic [8:0] got, logic [8:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [8:0] ga, gx;
    for (int v = 0; v < 512; v++) begin
      {ci4, a4, b4} = 9'(v);
      #1;
      check($sformatf("4-bit %h+%h+%b", a4, b4, ci4), 9'({co4, s4}), 9'(a4) + 9'(b4) + 9'(ci4));
      ga = '0; gx = '0;
      for (int k = 0; k < 4; k++) begin
        ga[k] = g4[k].a;
        gx[k] = g4[k].axb;
      end
      check("4-bit garbage a", ga, 9'(a4));
      check("4-bit garbage a^b", gx, 9'(a4 ^ b4));
    end
    for (int n = 0; n < 2000; n++) begin
      a8 = 8'($urandom); b8 = 8'($urandom); ci8 = 1'($urandom);
      #1;
      check($sformatf("8-bit %h+%h+%b", a8, b8, ci8), {co8, s8}, 9'(a8) + 9'(b8) + 9'(ci8));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
