// tos_ram -- type-of-service translation table of Read_Init_Parameters.
//
// N words of 8 bits. While TOS.REG.LOD is held, the octet on the memory bus
// is written at the address given by TOS.ADR.CTR; TOS.REG.DON answers once
// the word has been written and falls when LOD is released (four-phase).
// octet_out shows the word at the counter address, as in the block diagram;
// the second read port (rd_addr/rd_data) is this design's addition, for the
// rest of INM_OUT that translates with the table. Both reads are
// combinational. N comes from the document only as a symbol; 32 is this
// design's default. The address width is ceil(log2 N).
module tos_ram #(
  parameter int unsigned N = 32,
  localparam int unsigned M = (N > 1) ? $clog2(N) : 1
) (
  input  logic         clk,
  input  logic         mr,
  input  logic         lod,
  input  logic [M-1:0] addr,
  input  logic [7:0]   data_in,
  output logic         don,
  output logic [7:0]   octet_out,
  input  logic [M-1:0] rd_addr,
  output logic [7:0]   rd_data
);
  logic [7:0] mem [N];
  logic       written;

  always_ff @(posedge clk) begin
    if (lod) mem[addr] <= data_in;
  end

  always_ff @(posedge clk) begin
    if (mr) written <= 1'b0;
    else    written <= lod;
  end

  assign don       = lod & written;
  assign octet_out = mem[addr];
  assign rd_data   = mem[rd_addr];
endmodule
