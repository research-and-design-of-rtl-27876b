// Serial data encryption circuit built from D flip-flops and logic gates.
//
// One plaintext bit x enters per rising clock edge. The circuit watches the
// stream for two patterns: after it has seen three 1s in a row ("111") it
// starts encrypting, which here means inverting each bit (z = NOT x); after
// it then sees "101" it stops and passes bits through again (z = x). The
// pattern bits themselves are output under the mode in force when they
// arrive: the three 1s of "111" come out unchanged, the bits of "101" come
// out inverted.
//
// Structure: three D flip-flops hold the state ABC (S0..S5, binary coded,
// see enc_pkg); dff_input_logic computes their D inputs and
// encrypt_output_logic computes z, both from AND, OR and NOT gates and both
// fed with the flip-flops' Q and Q' outputs. The transitions follow the
// six-state table exactly, including its non-overlapping pattern search:
// a 0 in S1 or S2 returns to S0, "11" in S4 returns to S3, and "100" after
// S3 also returns to S3.
//
// Timing: z is combinational from x and the present state (it is valid in
// the same cycle as x, before the edge that consumes x). state and
// encrypting are registered. rst_n asynchronously clears the state to S0;
// the reset is this design's own addition.
module encryption_circuit
  import enc_pkg::*;
(
  input  logic                  clk,         // one stream bit per rising edge
  input  logic                  rst_n,       // asynchronous reset to S0, active low
  input  logic                  x,           // input (plaintext) bit
  output logic                  z,           // output bit: x, or NOT x while encrypting
  output logic [STATE_BITS-1:0] state,       // present state ABC
  output logic                  encrypting   // 1 in S3, S4, S5
);

  logic a, a_n, b, b_n, c, c_n;  // flip-flop Q and Q' outputs
  logic a_d, b_d, c_d;           // flip-flop D inputs

  d_flip_flop u_ff_a (.clk, .rst_n, .d(a_d), .q(a), .qn(a_n));
  d_flip_flop u_ff_b (.clk, .rst_n, .d(b_d), .q(b), .qn(b_n));
  d_flip_flop u_ff_c (.clk, .rst_n, .d(c_d), .q(c), .qn(c_n));

  dff_input_logic u_next (
    .a, .a_n, .b, .b_n, .c, .c_n, .x,
    .a_d, .b_d, .c_d
  );

  encrypt_output_logic u_out (
    .a, .a_n, .b, .b_n, .c, .c_n, .x,
    .z
  );

  always_comb begin
    state      = {a, b, c};
    encrypting = is_encrypting(state);
  end

  // The flip-flops never hold an unused code once out of reset.
  a_legal_state : assert property (@(posedge clk) disable iff (!rst_n)
                                   state inside {S0, S1, S2, S3, S4, S5})
    else $error("encryption_circuit: unused state code %b", state);

endmodule
