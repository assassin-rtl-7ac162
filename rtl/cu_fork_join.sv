// cu_fork_join -- the document's example of a control-flow graph with
// concurrency: a FORK that starts two control paths and a JOIN that ends
// them, built as a one-hot self-timed state machine.
//
// States A (start) ... G. Transitions:
//   FORK A -> B, C on INPUT-1;   MOVE B -> D on INPUT-2;
//   MOVE C -> E on INPUT-3;      JOIN D, E -> F on INPUT-4 (from D) and
//   INPUT-5 (from E);            MOVE F -> G on INPUT-6;
//   MOVE G -> A on INPUT-8.
// The graph names no outputs, so the state vector is the unit's output.
// The two paths B -> D and C -> E run independently; the JOIN waits until
// both have arrived and both B and C (the predecessors of D and E) are off.
// Timing: see st_onehot_array.
module cu_fork_join (
  input  logic       clk,
  input  logic       mr,
  input  logic       input_1,
  input  logic       input_2,
  input  logic       input_3,
  input  logic       input_4,
  input  logic       input_5,
  input  logic       input_6,
  input  logic       input_8,
  output logic [6:0] state,        // {G, F, E, D, C, B, A}
  output logic [5:0] in_progress
);
  localparam int unsigned NS = 7;
  localparam int unsigned NT = 6;
  localparam int unsigned A = 0, B = 1, C = 2, D = 3, E = 4, F = 5, G = 6;

  function automatic logic [NS-1:0] st(int unsigned s);
    return NS'(1) << s;
  endfunction

  localparam logic [NT*NS-1:0] SRC = {
    st(G), st(F), st(D) | st(E), st(C), st(B), st(A)
  };
  localparam logic [NT*NS-1:0] DST = {
    st(A), st(G), st(F), st(E), st(D), st(B) | st(C)
  };

  logic [NT-1:0] rev;
  logic          unused_rev;

  st_onehot_array #(
    .NS(NS), .NT(NT), .START(st(A)), .SRC(SRC), .DST(DST)
  ) u_array (
    .clk, .mr,
    .cond_f({input_8, input_6, input_4 & input_5, input_3, input_2, input_1}),
    .cond_r('1), .state(state), .fwd(in_progress), .rev(rev)
  );

  assign unused_rev = ^rev;
endmodule
