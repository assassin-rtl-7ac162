// hs_register -- load-and-hold register of the Read_Init_Parameters
// datapath.
//
// While LOD is held the register follows its input bus on every clock edge;
// when LOD drops it keeps the last value. DON answers LOD: it rises once
// the register has captured the bus at least once during the current LOD
// and falls as soon as LOD is released (four-phase handshake). This is how
// the document describes INITNUM.REG ("watch the associated bus and assume
// its value at all times; when the signal is dropped the register latches
// the value") and how the parameter registers behind the register decoder
// answer REG.ACK. W is the width; the reset value 0 is this design's choice.
module hs_register #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         mr,
  input  logic         lod,
  input  logic [W-1:0] d,
  output logic         don,
  output logic [W-1:0] q
);
  logic captured;

  always_ff @(posedge clk) begin
    if (mr) begin
      q        <= '0;
      captured <= 1'b0;
    end else begin
      captured <= lod;
      if (lod) q <= d;
    end
  end

  assign don = lod & captured;
endmodule
