// state_latch -- one state variable of a one-hot self-timed control unit.
//
// Each state of a control unit owns one of these latches. A forward
// transition row sets it when the machine enters the state and a reverse
// row resets it once the successor state has been entered. The outputs q
// and q_n are taken from the stored value, so a change is only visible
// after the latch has really changed: this is what lets the rows around it
// wait for each other instead of relying on gate delays.
//
// Interface: set and reset are level inputs held by the rows; mr is the
// master reset that loads INIT (1 for the start state, 0 otherwise).
// Timing: the stored value is sampled on the rising edge of clk, so q
// follows set/reset one clock later. The clock only samples the latch; the
// order of events, and so the function, does not depend on its period.
// Following the document, set and reset must not be asserted together
// (that would make the real latch metastable); here reset then wins and an
// assertion reports the collision.
module state_latch #(
  parameter bit INIT = 1'b0
) (
  input  logic clk,
  input  logic mr,
  input  logic set,
  input  logic reset,
  output logic q,
  output logic q_n
);
  logic st;

  always_ff @(posedge clk) begin
    if (mr)         st <= INIT;
    else if (reset) st <= 1'b0;
    else if (set)   st <= 1'b1;
  end

  assign q   = st;
  assign q_n = ~st;

  a_no_set_reset: assert property (@(posedge clk) disable iff (mr) !(set && reset))
    else $error("state latch set and reset together");
endmodule
