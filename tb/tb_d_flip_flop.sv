// Self-checking test of d_flip_flop. Checks, against a model kept in the
// testbench: the asynchronous clear (q = 0, qn = 1 without a clock edge);
// all four rows of the flip-flop table (Q+ = D for each old Q and each D);
// that q holds while d changes between rising edges and on falling edges;
// that qn is always the complement of q; and a clear in mid-run.
module tb_d_flip_flop;
  logic clk = 1'b0, rst_n = 1'b0, d = 1'b0;
  logic q, qn;
  logic model_q;
  int checks = 0, failures = 0;
  int rows_seen [4];   // (old Q, D) combinations exercised

  d_flip_flop dut (.clk, .rst_n, .d, .q, .qn);

  always #5 clk = ~clk;

  task automatic check(string what);
    checks++;
    if (q !== model_q || qn !== ~model_q) begin
      failures++;
      $display("FAIL %s: q=%0b qn=%0b expected q=%0b", what, q, qn, model_q);
    end
  endtask

  initial begin
    // Clear asserted at time 0, before any clock edge
    model_q = 1'b0;
    #2 check("async clear");
    @(negedge clk);
    d = 1'b1;
    @(negedge clk);
    check("held in clear");
    rst_n = 1'b1;
    @(posedge clk);
    model_q = d;
    #1 check("first edge after clear");

    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      d = 1'($urandom_range(0, 1));
      rows_seen[{model_q, d}]++;
      // Wiggle d mid-cycle: q must not follow until the rising edge
      #1 d = ~d;  #1 check("hold while d changes");
      #1 d = ~d;
      @(posedge clk);
      model_q = d;
      #1 check("capture on rising edge");
      if (i == 200) begin
        // Clear without a clock edge
        @(negedge clk); #2;
        rst_n = 1'b0; model_q = 1'b0;
        #1 check("async clear mid-run");
        @(negedge clk) rst_n = 1'b1;
        @(posedge clk);
        model_q = d;
        #1 check("first edge after clear");
      end
    end
    for (int r = 0; r < 4; r++) begin
      checks++;
      if (rows_seen[r] == 0) begin
        failures++;
        $display("FAIL table row Q=%0b D=%0b never exercised", r[1], r[0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
