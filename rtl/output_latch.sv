// output_latch -- latch for an enduring output of a control unit.
//
// Enduring outputs are operated on only by SET and RESET statements: once
// set, the output stays on until some state or transition resets it. The
// set and reset inputs are the OR of all the rows that SET, respectively
// RESET, this output. Master reset clears the output (the document does not
// say what an enduring output holds after reset; clearing it is this
// design's choice).
//
// Timing: sampled on the rising edge of clk, q follows one clock later.
// A simultaneous set and reset is the hazard the document warns about for
// outputs controlled by logically adjacent states; here reset wins and the
// event is flagged on the collide output for the environment to observe.
module output_latch (
  input  logic clk,
  input  logic mr,
  input  logic set,
  input  logic reset,
  output logic q,
  output logic collide
);
  always_ff @(posedge clk) begin
    if (mr)         q <= 1'b0;
    else if (reset) q <= 1'b0;
    else if (set)   q <= 1'b1;
  end

  assign collide = set & reset;
endmodule
