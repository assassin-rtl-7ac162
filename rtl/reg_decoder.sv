// reg_decoder -- register decoder and REG.MUX of Read_Init_Parameters.
//
// The register counter selects one of REG_COUNT parameter registers. While
// the controller holds REG.DECODE.ENA, the decoder raises the LOD line of
// the selected register only; the multiplexer returns that register's DON
// as REG.ACK, so the controller waits for exactly the register it is
// loading. Purely combinational. The mapping of counter values to
// registers (0 = LNM-MAX-PACKET.LO ... 7 = TOS.ROW.REG, top to bottom in
// the block diagram) is this design's reading of the diagram.
module reg_decoder #(
  parameter int unsigned REG_COUNT = 8,
  localparam int unsigned SW = (REG_COUNT > 1) ? $clog2(REG_COUNT) : 1
) (
  input  logic                 ena,
  input  logic [SW-1:0]        sel,
  input  logic [REG_COUNT-1:0] don,
  output logic [REG_COUNT-1:0] lod,
  output logic                 reg_ack
);
  always_comb begin
    lod = '0;
    if (ena) lod[sel] = 1'b1;
  end

  assign reg_ack = don[sel];
endmodule
