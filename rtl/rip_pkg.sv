// rip_pkg -- signal bundles shared by the Read_Init_Parameters controller
// and its datapath.
//
// rip_cmd_t carries every command the controller holds towards the
// datapath (counter CLR/MAX/INC, register LOD, decoder enable, TOS table
// load); rip_sts_t carries every answer back (DON acknowledgements and
// comparator results). Names follow the signal names of the controller's
// flow graph. REG_COUNT is the number of parameter registers loaded from
// memory and REG_W the width of the register counter that selects them.
package rip_pkg;
  localparam int unsigned REG_COUNT = 8;
  localparam int unsigned REG_W     = 3;
  localparam int unsigned INIT_W    = 3;

  typedef struct packed {
    logic initnum_ctr_clr;
    logic initnum_ctr_inc;
    logic initnum_reg_lod;
    logic reg_ctr_max;
    logic reg_ctr_inc;
    logic reg_decode_ena;
    logic tos_col_ctr_max;
    logic tos_col_ctr_inc;
    logic tos_row_ctr_clr;
    logic tos_row_ctr_inc;
    logic tos_adr_ctr_max;
    logic tos_adr_ctr_inc;
    logic tos_reg_lod;
  } rip_cmd_t;

  typedef struct packed {
    logic initnum_reg_don;
    logic initnum_ctr_don;
    logic initnum_cmp_eq;
    logic reg_ctr_don;
    logic reg_ctr_eq7;
    logic reg_ack;
    logic tos_col_ctr_don;
    logic tos_col_cmp_eq;
    logic tos_row_ctr_don;
    logic tos_row_cmp_eq;
    logic tos_adr_ctr_don;
    logic tos_reg_don;
  } rip_sts_t;

  // Index of each parameter register behind the register decoder, in the
  // order the register counter visits them.
  typedef enum logic [REG_W-1:0] {
    R_MAX_PACKET_LO = 3'd0,
    R_MAX_PACKET_HI = 3'd1,
    R_ADDR_LENGTH   = 3'd2,
    R_TIME_OUT_LO   = 3'd3,
    R_TIME_OUT_HI   = 3'd4,
    R_ACK_TYPE      = 3'd5,
    R_TOS_COL       = 3'd6,
    R_TOS_ROW       = 3'd7
  } rip_reg_e;
endpackage
