// NOT gate: a single-input, single-output inverter. The output is the
// complement of the input (0 -> 1, 1 -> 0), purely combinational with no
// delay modelled. It is the inverter of the gate set the encryption circuit
// is built from; the input-literal inverters of the next-state and output
// logic are instances of it.
module not_gate (
  input  logic a,  // input
  output logic y   // NOT a
);

  always_comb y = ~a;

endmodule
