// tb_bw_multiplier_wide: self-checking test of the Baugh-Wooley multiplier
// at operand widths other than the default: 2 x 2 and 6 x 6 exhaustively,
// 8 x 8 with corner cases and 20000 random operand pairs. Each product must
// equal the signed product computed by the testbench.
module tb_bw_multiplier_wide
  import bw_pkg::*;
;
  int checks = 0, failures = 0;

  logic [1:0] c2, d2;  logic [3:0]  p2;
  logic [5:0] c6, d6;  logic [11:0] p6;
  logic [7:0] c8, d8;  logic [15:0] p8;

  rfa_garbage_t [1:0][1:0] cg2;  rfa_garbage_t [1:0] fg2;  logic dr2;
  rfa_garbage_t [5:0][5:0] cg6;  rfa_garbage_t [5:0] fg6;  logic dr6;
  rfa_garbage_t [7:0][7:0] cg8;  rfa_garbage_t [7:0] fg8;  logic dr8;

  bw_multiplier #(.M(2)) dut2 (.c_i(c2), .d_i(d2), .p_o(p2), .cell_garbage_o(cg2),
                               .final_garbage_o(fg2), .carry_drop_o(dr2));
  bw_multiplier #(.M(6)) dut6 (.c_i(c6), .d_i(d6), .p_o(p6), .cell_garbage_o(cg6),
                               .final_garbage_o(fg6), .carry_drop_o(dr6));
  bw_multiplier #(.M(8)) dut8 (.c_i(c8), .d_i(d8), .p_o(p8), .cell_garbage_o(cg8),
                               .final_garbage_o(fg8), .carry_drop_o(dr8));

  task automatic check(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, b;
    logic [3:0] e2;
    logic [11:0] e6;
    for (int v = 0; v < 16; v++) begin
      {c2, d2} = 4'(v);
      #1;
      a = int'($signed(c2)); b = int'($signed(d2));
      e2 = 4'(a * b);
      check($sformatf("2-bit %0d x %0d", a, b), 16'(p2), 16'(e2));
    end
    for (int v = 0; v < 4096; v++) begin
      {c6, d6} = 12'(v);
      #1;
      a = int'($signed(c6)); b = int'($signed(d6));
      e6 = 12'(a * b);
      check($sformatf("6-bit %0d x %0d", a, b), 16'(p6), 16'(e6));
    end
    for (int n = 0; n < 20016; n++) begin
      case (n)
        0: begin c8 = 8'h80; d8 = 8'h80; end
        1: begin c8 = 8'h80; d8 = 8'h7f; end
        2: begin c8 = 8'h7f; d8 = 8'h7f; end
        3: begin c8 = 8'hff; d8 = 8'hff; end
        4: begin c8 = 8'hff; d8 = 8'h80; end
        5: begin c8 = 8'h00; d8 = 8'h80; end
        default: begin c8 = 8'($urandom); d8 = 8'($urandom); end
      endcase
      #1;
      a = int'($signed(c8)); b = int'($signed(d8));
      check($sformatf("8-bit %0d x %0d", a, b), p8, 16'(a * b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
