// AND gate with N inputs (two by default, as in the two-input symbol the
// gate set is drawn with). The output is 1 only when every input is 1,
// otherwise 0. Purely combinational. Wider instances (three and four inputs)
// form the product terms of the next-state and output equations; the
// parameter is this design's way of giving "two or more inputs".
module and_gate #(
  parameter int unsigned N = 2  // number of inputs, at least 2
) (
  input  logic [N-1:0] a,  // inputs
  output logic         y   // AND of all inputs
);

  always_comb y = &a;

endmodule
