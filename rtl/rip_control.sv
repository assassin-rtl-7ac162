// rip_control -- self-timed control unit of the Read_Init_Parameters task.
//
// Twelve one-hot states, RIP0 (start) ... RIP9, RIP1A, RIPA, all MOVE
// transitions, held (ephemeral) outputs and one enduring output. The
// controller
//   RIP0   lets INITNUM.REG follow the server command bus and presets the
//          counters, then waits for GO.REQ (start of "accept GO");
//   RIP1 -> RIP1A -> RIP2
//          forwards one octet of the parameter-block address per SRV.REQ
//          to the memory module (MEM.REQ + MEM.SEND), counting with
//          INITNUM.CTR and answering SRV.ACK, until INITNUM.CMP.EQ;
//   RIP3 -> RIP4 -> RIP5
//          reads one octet per pass from memory into the parameter register
//          picked by REG.CTR, until REG.CTR.EQ7;
//   RIP6 -> RIP7 -> RIP8 (-> RIP9 -> RIPA)
//          reads the type-of-service table, column by column and row by
//          row, and finally holds GO.ACK until GO.REQ drops.
// GO.RESPONSE is set in RIP1A and stays set (master reset clears it).
// The states, transitions, conditions and outputs are those of the task's
// CUDL program and flow graph. In RIP9 the column counter is loaded with
// its maximum, as in the CUDL program, so that the next increment makes it
// 0 and every row of the type-of-service table has the same length (the
// flow-graph drawing names a clear there instead). Transition timing is that of st_onehot_array: every
// MOVE takes two clocks once its condition holds. The array's
// transition-in-progress flags (fwd, rev) are left unread because this
// program has no output tied to a transition, and GO.RESPONSE is never
// reset, so its collision flag cannot rise and is left unread as well.
module rip_control
  import rip_pkg::*;
(
  input  logic     clk,
  input  logic     mr,
  // handshakes with INM_SRV, the rest of INM_OUT and the memory module
  input  logic     go_req,
  output logic     go_ack,
  output logic     go_response,
  input  logic     srv_req,
  output logic     srv_ack,
  output logic     mem_req,
  output logic     mem_send,
  input  logic     mem_ack,
  // datapath
  output rip_cmd_t cmd,
  input  rip_sts_t sts,
  // observation of the one-hot state (bit order of rip_state_e)
  output logic [11:0] state
);
  localparam int unsigned NS = 12;
  localparam int unsigned NT = 16;

  typedef enum int unsigned {
    RIP0 = 0, RIP1 = 1, RIP1A = 2, RIP2 = 3, RIP3 = 4, RIP4 = 5,
    RIP5 = 6, RIP6 = 7, RIP7 = 8, RIP8 = 9, RIP9 = 10, RIPA = 11
  } rip_state_e;

  function automatic logic [NS-1:0] st(rip_state_e s);
    return NS'(1) << s;
  endfunction

  // transition t occupies bits [t*NS +: NS]; listed from t15 down to t0
  localparam logic [NT*NS-1:0] SRC = {
    st(RIPA), st(RIPA), st(RIP9), st(RIP8), st(RIP8), st(RIP7), st(RIP6), st(RIP5),
    st(RIP5), st(RIP4), st(RIP3), st(RIP2), st(RIP2), st(RIP1A), st(RIP1), st(RIP0)
  };
  localparam logic [NT*NS-1:0] DST = {
    st(RIP0), st(RIP6), st(RIPA), st(RIP6), st(RIP9), st(RIP8), st(RIP7), st(RIP3),
    st(RIP6), st(RIP5), st(RIP4), st(RIP1), st(RIP3), st(RIP2), st(RIP1A), st(RIP1)
  };

  logic [NT-1:0] cond_f, fwd, rev;
  logic          go_response_collide;

  always_comb begin
    cond_f[0]  = go_req & (sts.initnum_reg_don & sts.initnum_ctr_don);
    cond_f[1]  = srv_req;
    cond_f[2]  = mem_ack & sts.initnum_ctr_don;
    cond_f[3]  = ~srv_req & (~mem_ack &  sts.initnum_cmp_eq);
    cond_f[4]  = ~srv_req & (~mem_ack & ~sts.initnum_cmp_eq);
    cond_f[5]  = mem_ack & sts.reg_ctr_don;
    cond_f[6]  = sts.reg_ack;
    cond_f[7]  =  sts.reg_ctr_eq7 & ~mem_ack;
    cond_f[8]  = ~sts.reg_ctr_eq7 & ~mem_ack;
    cond_f[9]  = mem_ack & (sts.tos_col_ctr_don & sts.tos_adr_ctr_don);
    cond_f[10] = sts.tos_reg_don;
    cond_f[11] = ~mem_ack &  sts.tos_col_cmp_eq;
    cond_f[12] = ~mem_ack & ~sts.tos_col_cmp_eq;
    cond_f[13] = sts.tos_col_ctr_don & sts.tos_row_ctr_don;
    cond_f[14] = ~sts.tos_row_cmp_eq;
    cond_f[15] = ~go_req;
  end

  st_onehot_array #(
    .NS(NS), .NT(NT), .START(st(RIP0)), .SRC(SRC), .DST(DST)
  ) u_array (
    .clk, .mr, .cond_f(cond_f), .cond_r('1), .state(state), .fwd(fwd), .rev(rev)
  );

  // ephemeral (held) outputs
  always_comb begin
    cmd = '0;
    cmd.initnum_ctr_clr = state[RIP0];
    cmd.initnum_reg_lod = state[RIP0];
    cmd.reg_ctr_max     = state[RIP0];
    cmd.tos_col_ctr_max = state[RIP0] | state[RIP9];
    cmd.tos_row_ctr_clr = state[RIP0];
    cmd.tos_adr_ctr_max = state[RIP0];
    cmd.initnum_ctr_inc = state[RIP1A];
    cmd.reg_ctr_inc     = state[RIP3];
    cmd.reg_decode_ena  = state[RIP4];
    cmd.tos_col_ctr_inc = state[RIP6];
    cmd.tos_adr_ctr_inc = state[RIP6];
    cmd.tos_reg_lod     = state[RIP7];
    cmd.tos_row_ctr_inc = state[RIP9];
  end

  assign mem_req  = state[RIP1A] | state[RIP3] | state[RIP4] | state[RIP6] | state[RIP7];
  assign mem_send = state[RIP1A];
  assign srv_ack  = state[RIP2];
  assign go_ack   = state[RIPA] & sts.tos_row_cmp_eq;

  // enduring output: SET GO_Response in RIP1A; nothing resets it
  output_latch u_go_response (
    .clk, .mr, .set(state[RIP1A]), .reset(1'b0), .q(go_response),
    .collide(go_response_collide)
  );
endmodule
