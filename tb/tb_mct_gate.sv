// tb_mct_gate: exhaustive self-checking test of the multiple-control Toffoli
// gate with one, two (the default) and three control lines. For every input
// pattern the target output must be the target input inverted exactly when
// all controls are 1.
module tb_mct_gate;
  int checks = 0, failures = 0;

  logic       c1;  logic t1, o1;
  logic [1:0] c2;  logic t2, o2;
  logic [2:0] c3;  logic t3, o3;

  mct_gate #(.NCTRL(1)) u1 (.ctrl_i(c1), .tgt_i(t1), .tgt_o(o1));
  mct_gate              u2 (.ctrl_i(c2), .tgt_i(t2), .tgt_o(o2));
  mct_gate #(.NCTRL(3)) u3 (.ctrl_i(c3), .tgt_i(t3), .tgt_o(o3));

  task automatic check(string what, logic got, logic exp);
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
    for (int v = 0; v < 16; v++) begin
      {c3, t3} = 4'(v);
      {c2, t2} = 3'(v);
      {c1, t1} = 2'(v);
      #1;
      check($sformatf("1 control %b%b", c1, t1), o1, (c1 == 1'b1) ? ~t1 : t1);
      check($sformatf("2 controls %b %b", c2, t2), o2, (c2 == 2'b11) ? ~t2 : t2);
      check($sformatf("3 controls %b %b", c3, t3), o3, (c3 == 3'b111) ? ~t3 : t3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
