// End-to-end test of encryption_circuit at its default (and only)
// configuration.
//
// Every cycle the output z is checked before the clock edge and the state
// and encrypting outputs after it, against a reference model of the
// six-state transition table kept here (state numbers 0..5, binary coded).
// The stream is first a directed sequence whose output is written out by
// hand (it checks that encryption begins on the bit right after "111" and
// ends with the last bit of "101"), then 20000 random bits biased towards 1
// so that both patterns occur often, with an asynchronous reset dropped in
// while encrypting.
//
// Each mechanism of the machine is counted, and one that never happened is
// a failure: start of encryption (S2 -1-> S3), end of it (S5 -1-> S0), a 0
// breaking the "111" search (S1/S2 -0-> S0), staying in S3 on 0, "11"
// restarting the "101" search (S4 -1-> S3), "100" restarting it
// (S5 -0-> S3), inverted and passed-through bits, and reset mid-stream.
module tb_encryption_circuit;
  logic clk = 1'b0, rst_n = 1'b0, x = 1'b0;
  logic z, encrypting;
  logic [2:0] state;
  int checks = 0, failures = 0;

  encryption_circuit dut (.clk, .rst_n, .x, .z, .state, .encrypting);

  always #5 clk = ~clk;

  // ---- reference model ---------------------------------------------------
  int m_state;   // 0..5

  function automatic int ref_next(int s, logic xi);
    case (s)
      0: return xi ? 1 : 0;
      1: return xi ? 2 : 0;
      2: return xi ? 3 : 0;
      3: return xi ? 4 : 3;
      4: return xi ? 3 : 5;
      5: return xi ? 0 : 3;
      default: return 0;
    endcase
  endfunction

  function automatic logic ref_z(int s, logic xi);
    return (s >= 3) ? ~xi : xi;
  endfunction

  // ---- mechanism counters --------------------------------------------------
  int n_start, n_stop, n_break, n_hold, n_restart_11, n_restart_100;
  int n_inverted, n_passed, n_reset_mid;

  task automatic count(int s, logic xi);
    int n;
    n = ref_next(s, xi);
    if (s == 2 && n == 3) n_start++;
    if (s == 5 && n == 0) n_stop++;
    if ((s == 1 || s == 2) && n == 0) n_break++;
    if (s == 3 && n == 3) n_hold++;
    if (s == 4 && n == 3) n_restart_11++;
    if (s == 5 && n == 3) n_restart_100++;
    if (s >= 3) n_inverted++; else n_passed++;
  endtask

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s at %0t: got %b expected %b", what, $time, got, exp);
    end
  endtask

  // One stream bit: present it after the falling edge, check z, let the
  // rising edge consume it, check the new state.
  task automatic step(logic xi, output logic zo);
    @(negedge clk);
    x = xi;
    #1;
    check("z", z, ref_z(m_state, xi));
    zo = z;
    count(m_state, xi);
    @(posedge clk);
    m_state = ref_next(m_state, xi);
    #1;
    checks++;
    if (state !== 3'(m_state)) begin
      failures++;
      if (failures < 20)
        $display("FAIL state at %0t: got %b expected %0d", $time, state, m_state);
    end
    check("encrypting", encrypting, m_state >= 3);
  endtask

  // Directed stream and its output, worked out by hand from the table
  localparam int DLEN = 12;
  localparam logic [DLEN-1:0] D_IN  = 12'b0111_0101_0110;  // sent MSB first
  localparam logic [DLEN-1:0] D_OUT = 12'b0111_1010_0110;

  initial begin
    logic zo;
    m_state = 0;
    #12 rst_n = 1'b1;
    check("state after reset", state === 3'b000, 1'b1);

    for (int i = DLEN - 1; i >= 0; i--) begin
      step(D_IN[i], zo);
      check($sformatf("directed bit %0d", DLEN - 1 - i), zo, D_OUT[i]);
    end

    // Latency: the edge that takes the third 1 turns encryption on
    m_state = 0;
    @(negedge clk) rst_n = 1'b0;
    @(negedge clk) rst_n = 1'b1;
    for (int k = 0; k < 3; k++) begin
      step(1'b1, zo);
      check($sformatf("encrypting after %0d ones", k + 1), encrypting, k == 2);
    end

    // Random stream
    for (int i = 0; i < 20000; i++) begin
      step(($urandom_range(0, 9) < 6) ? 1'b1 : 1'b0, zo);
      if (i % 2500 == 1000 && m_state >= 3) begin
        // Asynchronous reset while encrypting, between clock edges
        @(negedge clk) #2 rst_n = 1'b0;
        #1 check("reset clears state", state === 3'b000 && !encrypting, 1'b1);
        m_state = 0;
        n_reset_mid++;
        @(negedge clk) rst_n = 1'b1;
      end
    end

    $display("mechanisms: start=%0d stop=%0d break=%0d hold=%0d restart_11=%0d restart_100=%0d inverted=%0d passed=%0d reset_mid=%0d",
             n_start, n_stop, n_break, n_hold, n_restart_11, n_restart_100,
             n_inverted, n_passed, n_reset_mid);
    check("start happened",       n_start       > 0, 1'b1);
    check("stop happened",        n_stop        > 0, 1'b1);
    check("break happened",       n_break       > 0, 1'b1);
    check("hold happened",        n_hold        > 0, 1'b1);
    check("restart_11 happened",  n_restart_11  > 0, 1'b1);
    check("restart_100 happened", n_restart_100 > 0, 1'b1);
    check("inversion happened",   n_inverted    > 0, 1'b1);
    check("passthrough happened", n_passed      > 0, 1'b1);
    check("mid-stream reset",     n_reset_mid   > 0, 1'b1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
