// Shared types of the serial encryption state machine.
//
// The machine has six states, held in three D flip-flops named A, B and C
// (A is the most significant bit). The states are numbered in plain binary,
// S0 = ABC 000 up to S5 = ABC 101; the codes 110 and 111 are never entered
// from a legal state. S0..S2 are the "watching for 111" states in which the
// input passes through unchanged; S3..S5 are the "encrypting" states in which
// the input is inverted while the machine watches for 101.
package enc_pkg;

  localparam int unsigned STATE_BITS = 3;

  typedef enum logic [STATE_BITS-1:0] {
    S0 = 3'b000,  // idle, no 1 seen
    S1 = 3'b001,  // seen "1"
    S2 = 3'b010,  // seen "11"
    S3 = 3'b011,  // "111" found: encrypting
    S4 = 3'b100,  // encrypting, seen "1" of "101"
    S5 = 3'b101   // encrypting, seen "10" of "101"
  } state_t;

  // Encrypting in S3, S4, S5: A + B.C for the binary codes above.
  function automatic logic is_encrypting(input logic [STATE_BITS-1:0] s);
    return s[2] | (s[1] & s[0]);
  endfunction

endpackage
