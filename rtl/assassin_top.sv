// assassin_top -- the four self-timed control units side by side.
//
// The units do not interact; each has its own ports, prefixed by its name:
//   rip_*    Read_Init_Parameters of INM_OUT, controller and datapath
//   t9_*     the CompileTest9 control unit (FORK, JOIN, scale-of-two loop,
//            ephemeral and enduring outputs)
//   fj_*     the FORK/JOIN example graph
//   sm_*     the simple three-state example graph
// They share the sampling clock and the master reset. N sizes the
// type-of-service RAM of Read_Init_Parameters.
module assassin_top
  import rip_pkg::*;
#(
  parameter int unsigned N = 32,
  localparam int unsigned M = (N > 1) ? $clog2(N) : 1
) (
  input  logic              clk,
  input  logic              mr,
  // Read_Init_Parameters
  input  logic              rip_go_req,
  output logic              rip_go_ack,
  output logic              rip_go_response,
  input  logic              rip_srv_req,
  output logic              rip_srv_ack,
  input  logic [INIT_W-1:0] rip_srv_cmd_bus,
  output logic              rip_mem_req,
  output logic              rip_mem_send,
  input  logic              rip_mem_ack,
  input  logic [7:0]        rip_mem_bus,
  output logic [7:0]        rip_lnm_max_packet_lo,
  output logic [7:0]        rip_lnm_max_packet_hi,
  output logic [7:0]        rip_lnm_addr_length,
  output logic [7:0]        rip_lnm_time_out_lo,
  output logic [7:0]        rip_lnm_time_out_hi,
  output logic              rip_ack_type,
  output logic [M-1:0]      rip_tos_col_reg,
  output logic [M-1:0]      rip_tos_row_reg,
  output logic [7:0]        rip_octet_out,
  input  logic [M-1:0]      rip_tos_rd_addr,
  output logic [7:0]        rip_tos_rd_data,
  output logic [11:0]       rip_state,
  // CompileTest9
  input  logic [8:1]        t9_i,
  output logic [5:1]        t9_o,
  output logic [1:0]        t9_o_collide,
  output logic [5:0]        t9_state,
  output logic [7:0]        t9_in_progress,
  // FORK/JOIN example
  input  logic [6:1]        fj_input_1_to_6,
  input  logic              fj_input_8,
  output logic [6:0]        fj_state,
  output logic [5:0]        fj_in_progress,
  // simple example
  input  logic [3:1]        sm_input,
  output logic [2:1]        sm_output,
  output logic [2:0]        sm_state
);
  read_init_parameters #(.N(N)) u_rip (
    .clk, .mr,
    .go_req(rip_go_req), .go_ack(rip_go_ack), .go_response(rip_go_response),
    .srv_req(rip_srv_req), .srv_ack(rip_srv_ack), .srv_cmd_bus(rip_srv_cmd_bus),
    .mem_req(rip_mem_req), .mem_send(rip_mem_send), .mem_ack(rip_mem_ack),
    .mem_bus(rip_mem_bus),
    .lnm_max_packet_lo(rip_lnm_max_packet_lo), .lnm_max_packet_hi(rip_lnm_max_packet_hi),
    .lnm_addr_length(rip_lnm_addr_length), .lnm_time_out_lo(rip_lnm_time_out_lo),
    .lnm_time_out_hi(rip_lnm_time_out_hi), .ack_type(rip_ack_type),
    .tos_col_reg(rip_tos_col_reg), .tos_row_reg(rip_tos_row_reg),
    .octet_out(rip_octet_out), .tos_rd_addr(rip_tos_rd_addr),
    .tos_rd_data(rip_tos_rd_data), .state(rip_state)
  );

  cu_test9 u_test9 (
    .clk, .mr, .i(t9_i), .o(t9_o), .o_collide(t9_o_collide),
    .state(t9_state), .in_progress(t9_in_progress)
  );

  cu_fork_join u_fork_join (
    .clk, .mr,
    .input_1(fj_input_1_to_6[1]), .input_2(fj_input_1_to_6[2]),
    .input_3(fj_input_1_to_6[3]), .input_4(fj_input_1_to_6[4]),
    .input_5(fj_input_1_to_6[5]), .input_6(fj_input_1_to_6[6]),
    .input_8(fj_input_8), .state(fj_state), .in_progress(fj_in_progress)
  );

  cu_simple u_simple (
    .clk, .mr, .input_1(sm_input[1]), .input_2(sm_input[2]), .input_3(sm_input[3]),
    .output_1(sm_output[1]), .output_2(sm_output[2]), .state(sm_state)
  );
endmodule
