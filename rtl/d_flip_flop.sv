// Rising-edge D flip-flop with true and complementary outputs.
//
// On each rising edge of clk the value at d is stored: Q+ = D whatever the
// old Q was, and qn always shows the opposite of q. Between edges the stored
// bit holds. The asynchronous active-low clear rst_n is this design's own
// addition: it forces q to 0 (qn to 1) so that the state machine built from
// these flip-flops starts in a known state.
module d_flip_flop (
  input  logic clk,    // rising-edge clock
  input  logic rst_n,  // asynchronous clear, active low
  input  logic d,      // data input
  output logic q,      // stored bit
  output logic qn      // complement of the stored bit
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= d;
  end

  always_comb qn = ~q;

endmodule
