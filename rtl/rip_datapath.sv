// rip_datapath -- datapath of the Read_Init_Parameters task of INM_OUT.
//
// Everything the controller orders about, as in the task's block diagram:
//   * INITNUM.REG (3 bits) follows the server command bus while LOD is held
//     and keeps the number of address octets to forward; INITNUM.CTR
//     (3 bits) counts forwarded octets; their equality is INITNUM.CMP.EQ.
//   * REG.CTR (3 bits) selects, through the register decoder, which of the
//     eight parameter registers takes the memory bus: LNM-MAX-PACKET.LO/HI,
//     LNM-ADDR-LENGTH, LNM-TIME-OUT.LO/HI (8 bits each), ACK-TYPE (1 bit),
//     TOS.COL.REG and TOS.ROW.REG (M bits each). REG.CTR.EQ7 ends the loop.
//   * TOS.COL.CTR and TOS.ROW.CTR count through the type-of-service table;
//     they are compared with TOS.COL.REG and TOS.ROW.REG.
//   * TOS.ADR.CTR addresses the type-of-service RAM (N words of 8 bits),
//     which is written from the memory bus.
// M = ceil(log2 N). Every unit answers the command it is given with a DON
// line (four-phase handshake); comparators are combinational. The narrow
// registers take the low bits of the memory bus (this design's choice).
module rip_datapath
  import rip_pkg::*;
#(
  parameter int unsigned N = 32,
  localparam int unsigned M = (N > 1) ? $clog2(N) : 1
) (
  input  logic              clk,
  input  logic              mr,
  input  rip_cmd_t          cmd,
  output rip_sts_t          sts,
  input  logic [INIT_W-1:0] srv_cmd_bus,
  input  logic [7:0]        mem_bus,
  // parameter registers, for the rest of INM_OUT
  output logic [7:0]        lnm_max_packet_lo,
  output logic [7:0]        lnm_max_packet_hi,
  output logic [7:0]        lnm_addr_length,
  output logic [7:0]        lnm_time_out_lo,
  output logic [7:0]        lnm_time_out_hi,
  output logic              ack_type,
  output logic [M-1:0]      tos_col_reg,
  output logic [M-1:0]      tos_row_reg,
  // type-of-service table
  output logic [7:0]        octet_out,
  input  logic [M-1:0]      tos_rd_addr,
  output logic [7:0]        tos_rd_data
);
  // ---------------- initialisation-number loop ----------------
  logic [INIT_W-1:0] initnum_reg, initnum_ctr;

  hs_register #(.W(INIT_W)) u_initnum_reg (
    .clk, .mr, .lod(cmd.initnum_reg_lod), .d(srv_cmd_bus),
    .don(sts.initnum_reg_don), .q(initnum_reg)
  );

  hs_counter #(.W(INIT_W)) u_initnum_ctr (
    .clk, .mr, .clr(cmd.initnum_ctr_clr), .max(1'b0), .inc(cmd.initnum_ctr_inc),
    .don(sts.initnum_ctr_don), .q(initnum_ctr)
  );

  assign sts.initnum_cmp_eq = (initnum_reg == initnum_ctr);

  // ---------------- parameter registers ----------------
  logic [REG_W-1:0]     reg_ctr;
  logic [REG_COUNT-1:0] reg_lod, reg_don;

  hs_counter #(.W(REG_W)) u_reg_ctr (
    .clk, .mr, .clr(1'b0), .max(cmd.reg_ctr_max), .inc(cmd.reg_ctr_inc),
    .don(sts.reg_ctr_don), .q(reg_ctr)
  );

  assign sts.reg_ctr_eq7 = (reg_ctr == REG_W'(REG_COUNT - 1));

  reg_decoder #(.REG_COUNT(REG_COUNT)) u_decoder (
    .ena(cmd.reg_decode_ena), .sel(reg_ctr), .don(reg_don), .lod(reg_lod),
    .reg_ack(sts.reg_ack)
  );

  hs_register #(.W(8)) u_max_packet_lo (.clk, .mr, .lod(reg_lod[R_MAX_PACKET_LO]),
    .d(mem_bus), .don(reg_don[R_MAX_PACKET_LO]), .q(lnm_max_packet_lo));
  hs_register #(.W(8)) u_max_packet_hi (.clk, .mr, .lod(reg_lod[R_MAX_PACKET_HI]),
    .d(mem_bus), .don(reg_don[R_MAX_PACKET_HI]), .q(lnm_max_packet_hi));
  hs_register #(.W(8)) u_addr_length (.clk, .mr, .lod(reg_lod[R_ADDR_LENGTH]),
    .d(mem_bus), .don(reg_don[R_ADDR_LENGTH]), .q(lnm_addr_length));
  hs_register #(.W(8)) u_time_out_lo (.clk, .mr, .lod(reg_lod[R_TIME_OUT_LO]),
    .d(mem_bus), .don(reg_don[R_TIME_OUT_LO]), .q(lnm_time_out_lo));
  hs_register #(.W(8)) u_time_out_hi (.clk, .mr, .lod(reg_lod[R_TIME_OUT_HI]),
    .d(mem_bus), .don(reg_don[R_TIME_OUT_HI]), .q(lnm_time_out_hi));
  hs_register #(.W(1)) u_ack_type (.clk, .mr, .lod(reg_lod[R_ACK_TYPE]),
    .d(mem_bus[0]), .don(reg_don[R_ACK_TYPE]), .q(ack_type));
  hs_register #(.W(M)) u_tos_col_reg (.clk, .mr, .lod(reg_lod[R_TOS_COL]),
    .d(mem_bus[M-1:0]), .don(reg_don[R_TOS_COL]), .q(tos_col_reg));
  hs_register #(.W(M)) u_tos_row_reg (.clk, .mr, .lod(reg_lod[R_TOS_ROW]),
    .d(mem_bus[M-1:0]), .don(reg_don[R_TOS_ROW]), .q(tos_row_reg));

  // ---------------- type-of-service table ----------------
  logic [M-1:0] tos_col_ctr, tos_row_ctr, tos_adr_ctr;

  hs_counter #(.W(M)) u_tos_col_ctr (
    .clk, .mr, .clr(1'b0), .max(cmd.tos_col_ctr_max),
    .inc(cmd.tos_col_ctr_inc), .don(sts.tos_col_ctr_don), .q(tos_col_ctr)
  );
  hs_counter #(.W(M)) u_tos_row_ctr (
    .clk, .mr, .clr(cmd.tos_row_ctr_clr), .max(1'b0),
    .inc(cmd.tos_row_ctr_inc), .don(sts.tos_row_ctr_don), .q(tos_row_ctr)
  );
  hs_counter #(.W(M)) u_tos_adr_ctr (
    .clk, .mr, .clr(1'b0), .max(cmd.tos_adr_ctr_max),
    .inc(cmd.tos_adr_ctr_inc), .don(sts.tos_adr_ctr_don), .q(tos_adr_ctr)
  );

  assign sts.tos_col_cmp_eq = (tos_col_ctr == tos_col_reg);
  assign sts.tos_row_cmp_eq = (tos_row_ctr == tos_row_reg);

  tos_ram #(.N(N)) u_tos_ram (
    .clk, .mr, .lod(cmd.tos_reg_lod), .addr(tos_adr_ctr), .data_in(mem_bus),
    .don(sts.tos_reg_don), .octet_out(octet_out), .rd_addr(tos_rd_addr),
    .rd_data(tos_rd_data)
  );
endmodule
