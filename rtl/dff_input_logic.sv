// Next-state logic of the encryption state machine: the D inputs of the
// three state flip-flops A, B, C as two-level AND-OR networks of gate
// instances.
//
// The equations come from the machine's transition table with states coded
// S0 = 000 ... S5 = 101 (see enc_pkg), minimised on Karnaugh maps with the
// unused codes 110 and 111 as don't-cares:
//
//   A+ = B.C.X + A.C'.X'
//   B+ = A'.B'.C.X + B.C'.X + A.C'.X + B.C.X' + A.C.X'
//   C+ = C'.X + A.X' + B.C.X'
//
// The minimised forms are this design's own (the grouping of don't-cares is
// a choice); they match the table on all twelve used rows. They also decide
// where the two unused codes go: 110 -> S5 (X=0) or S3 (X=1), and
// 111 -> S3 (X=0) or S4 (X=1), so the machine never stays in an unused code.
//
// The complemented state literals come from the flip-flops' Q' outputs; X'
// is made by a NOT gate here. Purely combinational, no clock.
module dff_input_logic (
  input  logic a, a_n,  // state bit A and its complement
  input  logic b, b_n,  // state bit B and its complement
  input  logic c, c_n,  // state bit C and its complement
  input  logic x,       // input stream bit
  output logic a_d,     // D input of flip-flop A (A+)
  output logic b_d,     // D input of flip-flop B (B+)
  output logic c_d      // D input of flip-flop C (C+)
);

  logic x_n;
  not_gate u_inv_x (.a(x), .y(x_n));

  // Product terms
  logic p_bcx, p_acxn_n, p_abcx_b, p_bc_x, p_ac_x, p_bcx_n, p_acx_n, p_c_x, p_ax_n;

  and_gate #(.N(3)) u_and_bcx    (.a({b,   c,   x  }),       .y(p_bcx));    // B.C.X
  and_gate #(.N(4)) u_and_abcx   (.a({a_n, b_n, c,   x}),    .y(p_abcx_b)); // A'.B'.C.X
  and_gate #(.N(3)) u_and_bc_x   (.a({b,   c_n, x  }),       .y(p_bc_x));   // B.C'.X
  and_gate #(.N(3)) u_and_ac_x   (.a({a,   c_n, x  }),       .y(p_ac_x));   // A.C'.X
  and_gate #(.N(3)) u_and_bcxn   (.a({b,   c,   x_n}),       .y(p_bcx_n));  // B.C.X'
  and_gate #(.N(3)) u_and_acxn   (.a({a,   c,   x_n}),       .y(p_acx_n));  // A.C.X'
  and_gate #(.N(3)) u_and_acnxn  (.a({a,   c_n, x_n}),       .y(p_acxn_n)); // A.C'.X'
  and_gate          u_and_cx     (.a({c_n, x  }),            .y(p_c_x));    // C'.X
  and_gate          u_and_axn    (.a({a,   x_n}),            .y(p_ax_n));   // A.X'

  or_gate          u_or_a (.a({p_bcx, p_acxn_n}), .y(a_d));

  or_gate #(.N(5)) u_or_b (.a({p_abcx_b, p_bc_x, p_ac_x, p_bcx_n, p_acx_n}), .y(b_d));
  or_gate #(.N(3)) u_or_c (.a({p_c_x, p_ax_n, p_bcx_n}),                      .y(c_d));

endmodule
