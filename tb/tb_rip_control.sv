// tb_rip_control -- walks the Read_Init_Parameters controller through
// every one of its 16 transitions by driving the handshake inputs and the
// datapath answers directly, and checks after each step the one-hot state
// and the held outputs that state must produce (flow graph of the task).
// A step also checks that a transition takes two clocks once its condition
// holds and that nothing moves while the condition is false.
module tb_rip_control;
  import rip_pkg::*;
  logic clk = 0, mr;
  logic go_req, go_ack, go_response, srv_req, srv_ack, mem_req, mem_send, mem_ack;
  rip_cmd_t cmd;
  rip_sts_t sts;
  logic [11:0] state;
  int checks = 0, failures = 0;

  rip_control dut (.clk, .mr, .go_req, .go_ack, .go_response, .srv_req, .srv_ack,
                   .mem_req, .mem_send, .mem_ack, .cmd, .sts, .state);

  always #5 clk = ~clk;

  localparam int RIP0 = 0, RIP1 = 1, RIP1A = 2, RIP2 = 3, RIP3 = 4, RIP4 = 5,
                 RIP5 = 6, RIP6 = 7, RIP7 = 8, RIP8 = 9, RIP9 = 10, RIPA = 11;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: state=%b cmd=%b", what, state, cmd);
    end
  endtask

  // expected outputs of a state, from the flow graph
  task automatic check_outputs(int s);
    rip_cmd_t e;
    logic e_req, e_send, e_srv_ack, e_go_ack;
    e = '0;
    e_req = 0; e_send = 0; e_srv_ack = 0; e_go_ack = 0;
    case (s)
      RIP0: begin
        e.initnum_ctr_clr = 1; e.initnum_reg_lod = 1; e.reg_ctr_max = 1;
        e.tos_col_ctr_max = 1; e.tos_row_ctr_clr = 1; e.tos_adr_ctr_max = 1;
      end
      RIP1A: begin e_req = 1; e_send = 1; e.initnum_ctr_inc = 1; end
      RIP2:  e_srv_ack = 1;
      RIP3:  begin e_req = 1; e.reg_ctr_inc = 1; end
      RIP4:  begin e_req = 1; e.reg_decode_ena = 1; end
      RIP6:  begin e_req = 1; e.tos_col_ctr_inc = 1; e.tos_adr_ctr_inc = 1; end
      RIP7:  begin e_req = 1; e.tos_reg_lod = 1; end
      RIP9:  begin e.tos_col_ctr_max = 1; e.tos_row_ctr_inc = 1; end
      RIPA:  e_go_ack = sts.tos_row_cmp_eq;
      default: ;
    endcase
    check(cmd == e && mem_req == e_req && mem_send == e_send && srv_ack == e_srv_ack
          && go_ack == e_go_ack, $sformatf("outputs of state %0d", s));
  endtask

  // from state 'from', make the condition true (done by the caller) and
  // expect 'to' after exactly two clocks
  task automatic expect_move(int from, int to);
    check(state == 12'(1 << from), $sformatf("in state %0d before move", from));
    @(posedge clk); #1;
    check(state == 12'((1 << from) | (1 << to)), $sformatf("%0d and %0d both on", from, to));
    @(posedge clk); #1;
    check(state == 12'(1 << to), $sformatf("moved %0d -> %0d", from, to));
    check_outputs(to);
  endtask

  task automatic expect_stay(int s);
    repeat (3) @(posedge clk);
    #1 check(state == 12'(1 << s), $sformatf("stays in %0d", s));
  endtask

  initial begin
    #100000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mr = 1; go_req = 0; srv_req = 0; mem_ack = 0; sts = '0;
    repeat (2) @(posedge clk); #1 mr = 0;
    check(state == 12'b1, "start in RIP0"); check_outputs(RIP0);
    check(go_response == 0, "GO.RESPONSE clear");
    // RIP0 -> RIP1 needs GO.REQ and both INITNUM DONs
    go_req = 1; sts.initnum_reg_don = 1; expect_stay(RIP0);
    sts.initnum_ctr_don = 1; expect_move(RIP0, RIP1);
    sts.initnum_reg_don = 0; sts.initnum_ctr_don = 0;
    expect_stay(RIP1);
    for (int pass = 0; pass < 2; pass++) begin
      srv_req = 1; expect_move(RIP1, RIP1A);
      check(go_response == 1, "GO.RESPONSE set in RIP1A");
      mem_ack = 1; expect_stay(RIP1A);
      sts.initnum_ctr_don = 1; expect_move(RIP1A, RIP2);
      sts.initnum_ctr_don = 0;
      sts.initnum_cmp_eq = (pass == 1);
      expect_stay(RIP2);            // SRV.REQ and MEM.ACK still high
      srv_req = 0; expect_stay(RIP2);
      mem_ack = 0;
      if (pass == 0) expect_move(RIP2, RIP1); else expect_move(RIP2, RIP3);
    end
    for (int r = 0; r < 2; r++) begin
      mem_ack = 1; sts.reg_ctr_don = 1; expect_move(RIP3, RIP4);
      sts.reg_ctr_don = 0; expect_stay(RIP4);
      sts.reg_ack = 1; expect_move(RIP4, RIP5);
      sts.reg_ack = 0; sts.reg_ctr_eq7 = (r == 1); expect_stay(RIP5);
      mem_ack = 0;
      if (r == 0) expect_move(RIP5, RIP3); else expect_move(RIP5, RIP6);
    end
    for (int row = 0; row < 2; row++) begin
      for (int col = 0; col < 2; col++) begin
        mem_ack = 1; sts.tos_col_ctr_don = 1; expect_stay(RIP6);
        sts.tos_adr_ctr_don = 1; expect_move(RIP6, RIP7);
        sts.tos_col_ctr_don = 0; sts.tos_adr_ctr_don = 0;
        sts.tos_reg_don = 1; expect_move(RIP7, RIP8);
        sts.tos_reg_don = 0; sts.tos_col_cmp_eq = (col == 1); expect_stay(RIP8);
        mem_ack = 0;
        if (col == 0) expect_move(RIP8, RIP6); else expect_move(RIP8, RIP9);
      end
      sts.tos_col_cmp_eq = 0;
      sts.tos_col_ctr_don = 1; sts.tos_row_ctr_don = 1; expect_move(RIP9, RIPA);
      sts.tos_col_ctr_don = 0; sts.tos_row_ctr_don = 0;
      if (row == 0) expect_move(RIPA, RIP6);
    end
    sts.tos_row_cmp_eq = 1;
    #1 check_outputs(RIPA);
    check(go_ack == 1, "GO.ACK with TOS.ROW.CMP.EQ");
    expect_stay(RIPA);
    go_req = 0; expect_move(RIPA, RIP0);
    check(go_response == 1, "GO.RESPONSE is enduring");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
