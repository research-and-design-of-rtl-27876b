// Self-checking test of encrypt_output_logic: all sixteen combinations of
// the present state ABC and input X. The twelve rows of used states are
// checked against the output column written out below; the unused codes
// 110 and 111 are checked to invert, like the encrypting states.
module tb_encrypt_output_logic;
  logic a, b, c, x;
  logic z;
  int checks = 0, failures = 0;

  encrypt_output_logic dut (
    .a, .a_n(~a), .b, .b_n(~b), .c, .c_n(~c), .x, .z
  );

  // Output for {A,B,C,X} = 0..15
  localparam logic ZOUT [16] = '{
    1'b0, 1'b1,   // S0 passes
    1'b0, 1'b1,   // S1 passes
    1'b0, 1'b1,   // S2 passes
    1'b1, 1'b0,   // S3 inverts
    1'b1, 1'b0,   // S4 inverts
    1'b1, 1'b0,   // S5 inverts
    1'b1, 1'b0,   // 110 (unused) inverts
    1'b1, 1'b0    // 111 (unused) inverts
  };

  initial begin
    for (int rep = 0; rep < 2; rep++)
      for (int i = 0; i < 16; i++) begin
        automatic int r = (rep == 0) ? i : 15 - i;
        {a, b, c, x} = 4'(r);
        #1;
        checks++;
        if (z !== ZOUT[r]) begin
          failures++;
          $display("FAIL ABC=%b X=%b: z=%b expected %b", {a, b, c}, x, z, ZOUT[r]);
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
