// read_init_parameters -- the Read_Init_Parameters task of the INM_OUT
// Internet-Protocol submodule: self-timed controller plus datapath.
//
// On GO.REQ from the rest of INM_OUT the unit
//   1. takes from the server command bus the number of address octets
//      (INITNUM.REG) and forwards that many octets, one per SRV.REQ, to the
//      memory module (MEM.REQ with MEM.SEND), acknowledging each with SRV.ACK;
//   2. reads eight octets from the memory module into the parameter
//      registers (maximum packet size, address length, time-out, ack type,
//      TOS row size and number of rows);
//   3. reads the type-of-service table from memory into the TOS RAM;
//   4. holds GO.ACK until GO.REQ drops, and returns to its start state.
// GO.RESPONSE is set on the first forwarded octet.
//
// All exchanges with the outside are four-phase request/acknowledge
// handshakes: a request is held until its acknowledge rises and the
// acknowledge must fall before the next request. The memory module answers
// MEM.REQ with MEM.ACK after accepting the command bus (MEM.SEND high) or
// after placing an octet on the memory bus (MEM.SEND low), and drops MEM.ACK
// after MEM.REQ drops. All state is sampled on the rising edge of clk; mr
// is the master reset.
module read_init_parameters
  import rip_pkg::*;
#(
  parameter int unsigned N = 32,
  localparam int unsigned M = (N > 1) ? $clog2(N) : 1
) (
  input  logic              clk,
  input  logic              mr,
  // rest of INM_OUT
  input  logic              go_req,
  output logic              go_ack,
  output logic              go_response,
  // INM_SRV
  input  logic              srv_req,
  output logic              srv_ack,
  input  logic [INIT_W-1:0] srv_cmd_bus,
  // memory module
  output logic              mem_req,
  output logic              mem_send,
  input  logic              mem_ack,
  input  logic [7:0]        mem_bus,
  // loaded parameters
  output logic [7:0]        lnm_max_packet_lo,
  output logic [7:0]        lnm_max_packet_hi,
  output logic [7:0]        lnm_addr_length,
  output logic [7:0]        lnm_time_out_lo,
  output logic [7:0]        lnm_time_out_hi,
  output logic              ack_type,
  output logic [M-1:0]      tos_col_reg,
  output logic [M-1:0]      tos_row_reg,
  output logic [7:0]        octet_out,
  input  logic [M-1:0]      tos_rd_addr,
  output logic [7:0]        tos_rd_data,
  // controller state, one-hot (RIP0, RIP1, RIP1A, RIP2 .. RIP9, RIPA)
  output logic [11:0]       state
);
  rip_cmd_t cmd;
  rip_sts_t sts;

  rip_control u_control (
    .clk, .mr, .go_req, .go_ack, .go_response, .srv_req, .srv_ack,
    .mem_req, .mem_send, .mem_ack, .cmd, .sts, .state
  );

  rip_datapath #(.N(N)) u_datapath (
    .clk, .mr, .cmd, .sts, .srv_cmd_bus, .mem_bus,
    .lnm_max_packet_lo, .lnm_max_packet_hi, .lnm_addr_length,
    .lnm_time_out_lo, .lnm_time_out_hi, .ack_type, .tos_col_reg, .tos_row_reg,
    .octet_out, .tos_rd_addr, .tos_rd_data
  );

  // four-phase rules: a request is only withdrawn once it is acknowledged,
  // and MEM.REQ is not raised again before MEM.ACK has fallen
  a_srv_req: assert property (@(posedge clk) disable iff (mr) $fell(srv_req) |-> srv_ack)
    else $error("SRV.REQ withdrawn before SRV.ACK");
  a_go_req: assert property (@(posedge clk) disable iff (mr) $fell(go_req) |-> go_ack)
    else $error("GO.REQ withdrawn before GO.ACK");
  a_mem_req: assert property (@(posedge clk) disable iff (mr) $rose(mem_req) |-> !mem_ack)
    else $error("MEM.REQ raised while MEM.ACK still high");
endmodule
