// hs_counter -- counter of the Read_Init_Parameters datapath driven by held
// commands and acknowledged by DON.
//
// The self-timed controller holds exactly one command at a time while it is
// in a state: CLR (load 0), MAX (load all ones) or INC (add one, wrapping),
// and moves on only when the counter answers DON. The command is carried
// out once, on the first clock edge at which it is seen; DON is high from
// then on for as long as the same command is held and drops at once when
// the command is released (a four-phase, return-to-zero handshake).
// Loading the maximum and then incrementing is how the controller makes a
// count start at 0 ("initialised to 7, incremented, now 0").
//
// Parameter W is the width. The commands, the DON answer and the
// wrap-around follow the block diagram of the document; the priority among
// simultaneous commands (CLR, then MAX, then INC) is this design's choice,
// since the controller never asserts two at once.
module hs_counter #(
  parameter int unsigned W = 3
) (
  input  logic         clk,
  input  logic         mr,
  input  logic         clr,
  input  logic         max,
  input  logic         inc,
  output logic         don,
  output logic [W-1:0] q
);
  logic [2:0] cmd, done_cmd;

  assign cmd = {clr, max, inc};

  always_ff @(posedge clk) begin
    if (mr) begin
      q        <= '0;
      done_cmd <= '0;
    end else if (cmd == 3'b000) begin
      done_cmd <= '0;
    end else if (cmd != done_cmd) begin
      if (clr)      q <= '0;
      else if (max) q <= '1;
      else          q <= q + W'(1);
      done_cmd <= cmd;
    end
  end

  assign don = (cmd != 3'b000) && (cmd == done_cmd);
endmodule
