// cu_test9 -- the CompileTest9 control unit, a one-hot self-timed state
// machine that uses every construct of the control-unit language.
//
// States A (start), B, C, D, E, F. Input expression BIG = I1 and (I2 or not
// I3). Transitions:
//   t0  FORK A -> B, C        on BIG
//   t1  MOVE A -> D           on not BIG
//   t2  JOIN B, C -> F        on (I4 and I5) from B and I6 from C;
//                             doing RESET O3, and SET O4 if BIG
//   t3  JOIN B, E -> F        on (I4 or I5) from B and TRUE from E
//   t4  MOVE C -> E           on not I6
//   t5  MOVE D -> F           on I7, doing SET O3
//   t6  MOVE F -> A           on I8
//   t7  MOVE F -> D           on not I8
// Outputs: O1, O2, O5 are ephemeral (held), O3, O4 enduring (set/reset).
//   A: HOLD O1, O2; RESET O3; SET O4
//   B: HOLD O1; if I3 SET O3; if I4 or I5 RESET O4 and HOLD O2, O5
//   C: HOLD O1
// D <-> F is a scale-of-two loop. Its reverse rows carry mutual exclusion:
// D is reset (after D -> F) only while I8 is still high, as the document
// describes; F is reset (after F -> D) only while I7 is low, the symmetric
// rule, which is this design's completion of the scheme.
//
// O3 and O4 can be set and reset at once (B with I3 during the JOIN t2;
// B with I4 or I5 during t2 with BIG); the document warns of exactly this.
// Reset wins in output_latch and o_collide flags the event.
// Timing: see st_onehot_array (two clocks per transition).
module cu_test9 (
  input  logic       clk,
  input  logic       mr,
  input  logic [8:1] i,
  output logic [5:1] o,
  output logic [1:0] o_collide,
  output logic [5:0] state,       // {F, E, D, C, B, A}
  output logic [7:0] in_progress  // forward row of each transition
);
  localparam int unsigned NS = 6;
  localparam int unsigned NT = 8;
  localparam int unsigned A = 0, B = 1, C = 2, D = 3, E = 4, F = 5;

  function automatic logic [NS-1:0] st(int unsigned s);
    return NS'(1) << s;
  endfunction

  localparam logic [NT*NS-1:0] SRC = {
    st(F), st(F), st(D), st(C), st(B) | st(E), st(B) | st(C), st(A), st(A)
  };
  localparam logic [NT*NS-1:0] DST = {
    st(D), st(A), st(F), st(E), st(F), st(F), st(D), st(B) | st(C)
  };

  logic          big, i4_or_5;
  logic [NT-1:0] cond_f, cond_r, fwd, rev;
  logic          unused_rev;

  assign big     = i[1] & (i[2] | ~i[3]);
  assign i4_or_5 = i[4] | i[5];

  always_comb begin
    cond_f    = '0;
    cond_f[0] = big;
    cond_f[1] = ~big;
    cond_f[2] = (i[4] & i[5]) & i[6];
    cond_f[3] = i4_or_5;
    cond_f[4] = ~i[6];
    cond_f[5] = i[7];
    cond_f[6] = i[8];
    cond_f[7] = ~i[8];
    cond_r    = '1;
    cond_r[5] = i[8];    // D reset only while I8 has not become false
    cond_r[7] = ~i[7];   // F reset only while I7 is false
  end

  st_onehot_array #(
    .NS(NS), .NT(NT), .START(st(A)), .SRC(SRC), .DST(DST)
  ) u_array (
    .clk, .mr, .cond_f(cond_f), .cond_r(cond_r), .state(state), .fwd(fwd), .rev(rev)
  );

  assign unused_rev  = ^rev;
  assign in_progress = fwd;

  // ephemeral outputs
  assign o[1] = state[A] | state[B] | state[C];
  assign o[2] = state[A] | (state[B] & i4_or_5);
  assign o[5] = state[B] & i4_or_5;

  // enduring outputs
  output_latch u_o3 (
    .clk, .mr,
    .set  ((state[B] & i[3]) | fwd[5]),
    .reset(state[A] | fwd[2]),
    .q(o[3]), .collide(o_collide[0])
  );
  output_latch u_o4 (
    .clk, .mr,
    .set  (state[A] | (fwd[2] & big)),
    .reset(state[B] & i4_or_5),
    .q(o[4]), .collide(o_collide[1])
  );
endmodule
