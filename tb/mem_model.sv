// mem_model -- behavioural model of the memory module seen by
// Read_Init_Parameters (not part of the design; used by testbenches only).
//
// Four-phase slave: when MEM.REQ rises it waits a random 0..MAXD clocks,
// then either takes the octet on the server command bus (MEM.SEND high) and
// appends it to addr_rx, or drives the next octet of its parameter block
// blk onto the memory bus (MEM.SEND low), and raises MEM.ACK. When MEM.REQ
// falls it waits again and drops MEM.ACK. The testbench fills blk and reads
// addr_rx / n_addr / n_read through hierarchical references.
module mem_model #(
  parameter int MAXD = 3
) (
  input  logic       clk,
  input  logic       mr,
  input  logic       mem_req,
  input  logic       mem_send,
  input  logic [2:0] srv_cmd_bus,
  output logic       mem_ack,
  output logic [7:0] mem_bus
);
  logic [7:0] blk [64];
  logic [2:0] addr_rx [16];
  int n_addr, n_read;

  initial begin
    mem_ack = 0; mem_bus = 8'h00; n_addr = 0; n_read = 0;
    forever begin
      @(posedge clk);
      if (mr) begin
        mem_ack = 0; n_addr = 0; n_read = 0;
      end else if (mem_req && !mem_ack) begin
        repeat ($urandom_range(MAXD)) @(posedge clk);
        #1;
        if (mem_send) begin
          addr_rx[n_addr % 16] = srv_cmd_bus;
          n_addr++;
        end else begin
          mem_bus = blk[n_read % 64];
          n_read++;
        end
        mem_ack = 1;
      end else if (!mem_req && mem_ack) begin
        repeat ($urandom_range(MAXD)) @(posedge clk);
        #1 mem_ack = 0;
      end
    end
  end
endmodule
