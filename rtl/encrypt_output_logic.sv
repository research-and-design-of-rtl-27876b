// Output logic of the encryption state machine: the output bit Z from the
// present state A, B, C and the input bit X, as an AND-OR network of gate
// instances.
//
// In S0..S2 the input passes through (Z = X); in the encrypting states
// S3..S5 it is inverted (Z = X'). Z therefore depends on the input as well as
// the state, as the transition table gives it. Minimised with the unused
// codes 110 and 111 as don't-cares:
//
//   Z = A'.B'.X + A'.C'.X + A.X' + B.C.X'
//
// which equals X XOR (A + B.C). The grouping is this design's own choice.
// The complemented state literals come from the flip-flops' Q' outputs; X'
// is made by a NOT gate here. Purely combinational: Z changes in the same
// cycle as X.
module encrypt_output_logic (
  input  logic a, a_n,  // state bit A and its complement
  input  logic b,       // state bit B
  input  logic b_n,     // complement of B
  input  logic c,       // state bit C
  input  logic c_n,     // complement of C
  input  logic x,       // input stream bit
  output logic z        // output stream bit
);

  logic x_n;
  not_gate u_inv_x (.a(x), .y(x_n));

  logic p_abx, p_acx, p_axn, p_bcxn;

  and_gate #(.N(3)) u_and_abx  (.a({a_n, b_n, x  }), .y(p_abx));   // A'.B'.X
  and_gate #(.N(3)) u_and_acx  (.a({a_n, c_n, x  }), .y(p_acx));   // A'.C'.X
  and_gate          u_and_axn  (.a({a,   x_n}),      .y(p_axn));   // A.X'
  and_gate #(.N(3)) u_and_bcxn (.a({b,   c,   x_n}), .y(p_bcxn));  // B.C.X'

  or_gate #(.N(4)) u_or_z (.a({p_abx, p_acx, p_axn, p_bcxn}), .y(z));

endmodule
