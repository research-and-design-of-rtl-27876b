// Self-checking test of or_gate. The default two-input gate is checked
// against its four-row truth table; three-, four- and five-input instances
// (the widths the state-machine logic uses) are checked exhaustively against
// the rule that the output is 0 only when every input is 0.
module tb_or_gate;
  int checks = 0, failures = 0;

  // Two-input gate at the default width
  logic [1:0] a2;
  logic       y2;
  or_gate dut2 (.a(a2), .y(y2));

  // Truth table rows in order AB = 00, 01, 10, 11
  localparam logic TRUTH [4] = '{1'b0, 1'b1, 1'b1, 1'b1};

  logic [2:0] a3; logic y3;
  logic [3:0] a4; logic y4;
  logic [4:0] a5; logic y5;
  or_gate #(.N(3)) dut3 (.a(a3), .y(y3));
  or_gate #(.N(4)) dut4 (.a(a4), .y(y4));
  or_gate #(.N(5)) dut5 (.a(a5), .y(y5));

  function automatic logic expect_n(int unsigned N, int unsigned v);
    return (v != 0);
  endfunction

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 4; i++) begin
      a2 = 2'(i); #1;
      check($sformatf("N=2 in=%b", a2), y2, TRUTH[i]);
    end
    for (int i = 0; i < 8; i++) begin
      a3 = 3'(i); #1;
      check($sformatf("N=3 in=%b", a3), y3, expect_n(3, i));
    end
    for (int i = 0; i < 16; i++) begin
      a4 = 4'(i); #1;
      check($sformatf("N=4 in=%b", a4), y4, expect_n(4, i));
    end
    for (int i = 0; i < 32; i++) begin
      a5 = 5'(i); #1;
      check($sformatf("N=5 in=%b", a5), y5, expect_n(5, i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
