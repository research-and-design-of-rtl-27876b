// Self-checking test of dff_input_logic: all sixteen combinations of the
// present state ABC and input X. The twelve rows of used states are checked
// against the transition table written out below (present state, X ->
// next state). The four rows of the unused codes 110 and 111 are checked to
// lead back into a used state, and to the exact states the minimised
// equations assign (110 -> S5/S3, 111 -> S3/S4).
module tb_dff_input_logic;
  logic a, b, c, x;
  logic a_d, b_d, c_d;
  int checks = 0, failures = 0;

  dff_input_logic dut (
    .a, .a_n(~a), .b, .b_n(~b), .c, .c_n(~c), .x,
    .a_d, .b_d, .c_d
  );

  // Next-state table indexed by {A,B,C,X}; rows 12..15 hold the recovery
  // targets of the unused codes.
  localparam logic [2:0] NEXT [16] = '{
    3'b000, 3'b001,   // S0: 0 -> S0, 1 -> S1
    3'b000, 3'b010,   // S1: 0 -> S0, 1 -> S2
    3'b000, 3'b011,   // S2: 0 -> S0, 1 -> S3
    3'b011, 3'b100,   // S3: 0 -> S3, 1 -> S4
    3'b101, 3'b011,   // S4: 0 -> S5, 1 -> S3
    3'b011, 3'b000,   // S5: 0 -> S3, 1 -> S0
    3'b101, 3'b011,   // 110 (unused): 0 -> S5, 1 -> S3
    3'b011, 3'b100    // 111 (unused): 0 -> S3, 1 -> S4
  };

  initial begin
    for (int rep = 0; rep < 2; rep++)
      for (int i = 0; i < 16; i++) begin
        // Second pass walks the rows in reverse
        automatic int r = (rep == 0) ? i : 15 - i;
        {a, b, c, x} = 4'(r);
        #1;
        checks++;
        if ({a_d, b_d, c_d} !== NEXT[r]) begin
          failures++;
          $display("FAIL ABC=%b X=%b: next %b expected %b", {a, b, c}, x,
                   {a_d, b_d, c_d}, NEXT[r]);
        end
        checks++;
        if ({a_d, b_d, c_d} > 3'b101) begin
          failures++;
          $display("FAIL ABC=%b X=%b: next state %b is unused", {a, b, c}, x,
                   {a_d, b_d, c_d});
        end
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
