// OR gate with N inputs (two by default, as in the two-input symbol the
// gate set is drawn with). The output is 1 when at least one input is 1, and
// 0 only when every input is 0. Purely combinational. Wider instances sum the
// product terms of the next-state and output equations.
module or_gate #(
  parameter int unsigned N = 2  // number of inputs, at least 2
) (
  input  logic [N-1:0] a,  // inputs
  output logic         y   // OR of all inputs
);

  always_comb y = |a;

endmodule
