// tb_bw_multiplier: end-to-end self-checking test of the 4 x 4 Baugh-Wooley
// multiplier at its default size. All 256 pairs of signed 4-bit operands
// are applied; for each the product must equal the signed product computed
// by the testbench, every cell's first garbage line must be its partial
// product (AND in a white cell, NAND in a pink cell, with the pink cells
// placed where exactly one of the two operand bits is a sign bit), and the
// dropped carry must match the one implied by the final-row sum. The
// worked example -2 x 3 = -6 is checked on its own. The test also counts
// how often each mechanism of the design showed up: products of each sign,
// the most negative operand pair (-8 x -8 = +64), and a final-row carry
// that is dropped (1) or not (0); a mechanism that never happened counts as
// a failure.
module tb_bw_multiplier
  import bw_pkg::*;
;
  localparam int M = 4;

  int checks = 0, failures = 0;
  int n_neg = 0, n_pos = 0, n_zero = 0, n_minmin = 0, n_drop1 = 0, n_drop0 = 0;

  logic [M-1:0]   c, d;
  logic [2*M-1:0] p;
  rfa_garbage_t [M-1:0][M-1:0] cg;
  rfa_garbage_t [M-1:0]        fg;
  logic                        drop;

  bw_multiplier dut (.c_i(c), .d_i(d), .p_o(p), .cell_garbage_o(cg),
                     .final_garbage_o(fg), .carry_drop_o(drop));

  task automatic check(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic need(string what, int n);
    checks++;
    $display("mechanism %-28s seen %0d times", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism %s never happened", what);
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
    int sc, sd, prod;
    logic pp, exp_drop;
    logic [2*M-1:0] exp_p;
    logic [M:0] upper;

    // Worked example: -2 x 3 = -6.
    c = 4'b1110; d = 4'b0011;
    #1;
    check("-2 x 3", 16'(p), 16'(8'hfa));

    for (int v = 0; v < (1 << (2 * M)); v++) begin
      {c, d} = (2 * M)'(v);
      #1;
      sc   = int'($signed(c));
      sd   = int'($signed(d));
      prod = sc * sd;
      exp_p = (2 * M)'(prod);
      check($sformatf("%0d x %0d", sc, sd), 16'(p), 16'(exp_p));

      for (int i = 0; i < M; i++)
        for (int j = 0; j < M; j++) begin
          pp = c[j] & d[i];
          if ((i == M - 1) != (j == M - 1)) pp = ~pp;
          check($sformatf("partial product row %0d col %0d", i, j), 16'(cg[i][j].a), 16'(pp));
        end

      // The final row adds 2^M, 2^(2M-1) and the upper part of the
      // unsigned sum of all array terms; its carry is whatever lies at
      // weight 2^(2M) and above of that total.
      upper = '0;
      begin
        int total;
        total = 0;
        for (int i = 0; i < M; i++)
          for (int j = 0; j < M; j++) begin
            pp = c[j] & d[i];
            if ((i == M - 1) != (j == M - 1)) pp = ~pp;
            total += int'(pp) << (i + j);
          end
        total += (1 << M) + (1 << (2 * M - 1));
        exp_drop = ((total >> (2 * M)) & 1) != 0;
        upper    = (M + 1)'(total >> M);
      end
      check("dropped carry", 16'(drop), 16'(exp_drop));
      check("upper product bits", 16'(p[2*M-1:M]), 16'(upper[M-1:0]));
      check("final-row carry bit", 16'(drop), 16'(upper[M]));

      // Constant 1 at weight 2^(2M-1) on the top bit of the final row.
      check("final row top operand", 16'(fg[M-1].a), 16'(1));
      if (prod < 0) n_neg++;
      else if (prod > 0) n_pos++;
      else n_zero++;
      if (sc == -(1 << (M - 1)) && sd == -(1 << (M - 1))) n_minmin++;
      if (drop) n_drop1++;
      else n_drop0++;
    end

    need("negative product", n_neg);
    need("positive product", n_pos);
    need("zero product", n_zero);
    need("most negative squared", n_minmin);
    need("final carry dropped (1)", n_drop1);
    need("final carry absent (0)", n_drop0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
