// st_onehot_array -- transition array of a one-hot, self-timed control unit.
//
// A control unit is a token-passing machine: each state has one
// state_latch, and a state is "on" while it holds a token. Every transition
// t is built from two rows, as in a Path-Programmable Logic array:
//
//   forward row  fwd[t] = all source states of t are on
//                         AND every predecessor of those sources is off
//                         AND the transition condition cond_f[t] holds
//                → sets every destination state of t
//   reverse row  rev[t] = all destination states of t are on
//                         AND the extra reverse condition cond_r[t] holds
//                → resets every source state of t
//
// A MOVE has one source and one destination, a FORK several destinations,
// a JOIN several sources. The predecessor guard is what makes the unit
// self-timed: a state may only hand its token on after the state that gave
// it the token has really been reset, so a fast chain of transitions can
// never leave two sequential states on. Predecessors are computed here from
// the SRC/DST tables (a predecessor of s is any source of a transition
// whose destinations include s). cond_r is 1 for ordinary transitions; in a
// scale-of-two loop (X->Y and Y->X) each reverse row must also see that the
// condition of the opposite transition is false, otherwise both reverse rows
// fire and the token is lost.
//
// fwd[t] is high while transition t is in progress and is what transition
// outputs are gated with; state is what state outputs are gated with.
//
// Parameters: NS states, NT transitions, START = mask of states set by the
// master reset, SRC/DST = NT masks of NS bits, transition t at
// [t*NS +: NS]. Timing: the latches sample on the rising clock edge, so a
// MOVE takes two clocks (one to set the destination, one to reset the
// source) and the next transition may start on the third. The clock does
// not change the order of events: any clock period gives the same sequence.
module st_onehot_array #(
  parameter int unsigned NS = 3,
  parameter int unsigned NT = 3,
  parameter logic [NS-1:0]    START = NS'(1),
  parameter logic [NT*NS-1:0] SRC   = {NS'(4), NS'(2), NS'(1)},
  parameter logic [NT*NS-1:0] DST   = {NS'(1), NS'(4), NS'(2)}
) (
  input  logic          clk,
  input  logic          mr,
  input  logic [NT-1:0] cond_f,
  input  logic [NT-1:0] cond_r,
  output logic [NS-1:0] state,
  output logic [NT-1:0] fwd,
  output logic [NT-1:0] rev
);
  // Predecessor mask of each transition: union of the predecessors of its
  // sources.
  function automatic logic [NT*NS-1:0] pred_table();
    logic [NS-1:0] pred_of [NS];
    logic [NT*NS-1:0] r;
    for (int s = 0; s < NS; s++) pred_of[s] = '0;
    for (int t = 0; t < NT; t++)
      for (int s = 0; s < NS; s++)
        if (DST[t*NS+s]) pred_of[s] |= SRC[t*NS +: NS];
    r = '0;
    for (int t = 0; t < NT; t++)
      for (int s = 0; s < NS; s++)
        if (SRC[t*NS+s]) r[t*NS +: NS] |= pred_of[s];
    return r;
  endfunction

  localparam logic [NT*NS-1:0] PRED = pred_table();

  logic [NS-1:0] set_s, reset_s;

  always_comb begin
    for (int t = 0; t < NT; t++) begin
      fwd[t] = (&(state | ~SRC[t*NS +: NS])) &
               ~(|(state & PRED[t*NS +: NS])) & cond_f[t];
      rev[t] = (&(state | ~DST[t*NS +: NS])) & cond_r[t];
    end
    set_s   = '0;
    reset_s = '0;
    for (int t = 0; t < NT; t++) begin
      if (fwd[t]) set_s   |= DST[t*NS +: NS];
      if (rev[t]) reset_s |= SRC[t*NS +: NS];
    end
  end

  for (genvar s = 0; s < NS; s++) begin : g_state
    logic unused_n;
    state_latch #(.INIT(START[s])) u_latch (
      .clk(clk), .mr(mr), .set(set_s[s]), .reset(reset_s[s]),
      .q(state[s]), .q_n(unused_n)
    );
  end

  // Two transitions leaving the same state must never be taken together
  // (the machine would be in two mutually exclusive states); keeping their
  // conditions exclusive is the environment's duty.
  for (genvar s = 0; s < NS; s++) begin : g_excl
    logic [NT-1:0] from_s;
    always_comb
      for (int t = 0; t < NT; t++) from_s[t] = SRC[t*NS+s];
    a_one_exit: assert property (@(posedge clk) disable iff (mr) $onehot0(fwd & from_s))
      else $error("two transitions leave state %0d together", s);
  end
endmodule
