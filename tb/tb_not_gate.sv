// Self-checking test of not_gate: both input values against the inverter
// truth table (0 -> 1, 1 -> 0), each checked twice in alternating order.
module tb_not_gate;
  logic a, y;
  int checks = 0, failures = 0;

  not_gate dut (.a, .y);

  // The truth table, written out: index = input, value = output.
  localparam logic TRUTH [2] = '{1'b1, 1'b0};

  initial begin
    for (int rep = 0; rep < 2; rep++)
      for (int i = 0; i < 2; i++) begin
        a = 1'(i);
        #1;
        checks++;
        if (y !== TRUTH[i]) begin
          failures++;
          $display("FAIL not_gate a=%0b y=%0b expected %0b", a, y, TRUTH[i]);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
