// cu_simple -- the document's simple control-flow graph as a one-hot
// self-timed state machine.
//
// States A (start), B, C in a ring: A -> B on INPUT-1, B -> C on INPUT-2,
// C -> A on INPUT-3. OUTPUT-1 is held (ephemeral) while in A, OUTPUT-2
// while in B. Because of the self-timed handshake, A and B are briefly on
// together on the way from A to B, so OUTPUT-1 and OUTPUT-2 overlap for one
// clock rather than leaving a gap.
// Timing: see st_onehot_array.
module cu_simple (
  input  logic       clk,
  input  logic       mr,
  input  logic       input_1,
  input  logic       input_2,
  input  logic       input_3,
  output logic       output_1,
  output logic       output_2,
  output logic [2:0] state         // {C, B, A}
);
  localparam int unsigned NS = 3;
  localparam int unsigned NT = 3;

  logic [NT-1:0] fwd, rev;
  logic          unused;

  st_onehot_array #(
    .NS(NS), .NT(NT), .START(3'b001),
    .SRC({3'b100, 3'b010, 3'b001}),
    .DST({3'b001, 3'b100, 3'b010})
  ) u_array (
    .clk, .mr, .cond_f({input_3, input_2, input_1}), .cond_r('1),
    .state(state), .fwd(fwd), .rev(rev)
  );

  assign unused   = ^{fwd, rev};
  assign output_1 = state[0];
  assign output_2 = state[1];
endmodule
