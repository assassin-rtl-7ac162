// tb_assassin_top -- end-to-end run of the whole design at its default
// parameters. All four control units run at the same time:
//   * Read_Init_Parameters performs two complete "accept GO" operations
//     against behavioural memory / INM_SRV models; registers, TOS RAM and
//     octet counts are checked;
//   * CompileTest9 is driven through FORK, both JOINs, C -> E and the
//     D <-> F scale-of-two loop; its resting states and outputs are checked;
//   * the FORK/JOIN example and the simple ring make full laps.
// Each mechanism the design has is counted while it happens, and a
// mechanism that never happened counts as a failure: the address-forwarding
// loop repeating (RIP2 -> RIP1), the register loop (RIP5 -> RIP3), the
// column loop (RIP8 -> RIP6), the row loop (RIPA -> RIP6), the four-phase
// wait for MEM.ACK, a FORK, a JOIN waiting for its late branch, the
// scale-of-two reverse-row stall, a SET/RESET collision on an enduring
// output, and the overlap of adjacent states' held outputs.
module tb_assassin_top;
  localparam int M = 5;   // ceil(log2 32), the default TOS RAM size
  logic clk = 0, mr;
  logic rip_go_req, rip_go_ack, rip_go_response, rip_srv_req, rip_srv_ack;
  logic rip_mem_req, rip_mem_send, rip_mem_ack, rip_ack_type;
  logic [2:0] rip_srv_cmd_bus;
  logic [7:0] rip_mem_bus, rip_lnm_max_packet_lo, rip_lnm_max_packet_hi, rip_lnm_addr_length,
              rip_lnm_time_out_lo, rip_lnm_time_out_hi, rip_octet_out, rip_tos_rd_data;
  logic [M-1:0] rip_tos_col_reg, rip_tos_row_reg, rip_tos_rd_addr;
  logic [11:0] rip_state;
  logic [8:1] t9_i;
  logic [5:1] t9_o;
  logic [1:0] t9_o_collide;
  logic [5:0] t9_state;
  logic [7:0] t9_in_progress;
  logic [6:1] fj_in;
  logic fj_input_8;
  logic [6:0] fj_state;
  logic [5:0] fj_in_progress;
  logic [3:1] sm_input;
  logic [2:1] sm_output;
  logic [2:0] sm_state;
  int checks = 0, failures = 0;

  assassin_top dut (
    .clk, .mr, .rip_go_req, .rip_go_ack, .rip_go_response, .rip_srv_req, .rip_srv_ack,
    .rip_srv_cmd_bus, .rip_mem_req, .rip_mem_send, .rip_mem_ack, .rip_mem_bus,
    .rip_lnm_max_packet_lo, .rip_lnm_max_packet_hi, .rip_lnm_addr_length,
    .rip_lnm_time_out_lo, .rip_lnm_time_out_hi, .rip_ack_type, .rip_tos_col_reg,
    .rip_tos_row_reg, .rip_octet_out, .rip_tos_rd_addr, .rip_tos_rd_data, .rip_state,
    .t9_i, .t9_o, .t9_o_collide, .t9_state, .t9_in_progress,
    .fj_input_1_to_6(fj_in), .fj_input_8, .fj_state, .fj_in_progress,
    .sm_input, .sm_output, .sm_state
  );

  mem_model u_mem (.clk, .mr, .mem_req(rip_mem_req), .mem_send(rip_mem_send),
                   .srv_cmd_bus(rip_srv_cmd_bus), .mem_ack(rip_mem_ack), .mem_bus(rip_mem_bus));

  always #5 clk = ~clk;

  // ---------------- mechanism counters ----------------
  typedef enum int {
    MC_ADDR_LOOP, MC_REG_LOOP, MC_COL_LOOP, MC_ROW_LOOP, MC_MEM_WAIT, MC_FORK,
    MC_JOIN_WAIT, MC_SCALE2_STALL, MC_COLLIDE, MC_OVERLAP, MC_N
  } mech_e;
  string mech_name [MC_N] = '{"address loop", "register loop", "column loop", "row loop",
    "wait for MEM.ACK", "fork", "join waiting for a branch", "scale-of-two stall",
    "set/reset collision", "adjacent-state output overlap"};
  int mech [MC_N];
  logic [11:0] rip_prev;
  logic [5:0]  t9_prev;
  logic [6:0]  fj_prev;
  int d_and_f;

  function automatic bit moved(logic [11:0] p, logic [11:0] n, int from, int to);
    return p[from] && !p[to] && n[to];
  endfunction

  always @(posedge clk) begin
    if (mr) begin
      for (int k = 0; k < MC_N; k++) mech[k] <= 0;
      d_and_f <= 0;
    end else begin
      if (moved(rip_prev, rip_state, 3, 1))  mech[MC_ADDR_LOOP] <= mech[MC_ADDR_LOOP] + 1;
      if (moved(rip_prev, rip_state, 6, 4))  mech[MC_REG_LOOP]  <= mech[MC_REG_LOOP] + 1;
      if (moved(rip_prev, rip_state, 9, 7))  mech[MC_COL_LOOP]  <= mech[MC_COL_LOOP] + 1;
      if (moved(rip_prev, rip_state, 11, 7)) mech[MC_ROW_LOOP]  <= mech[MC_ROW_LOOP] + 1;
      if (rip_mem_req && !rip_mem_ack && rip_prev == rip_state)
        mech[MC_MEM_WAIT] <= mech[MC_MEM_WAIT] + 1;
      if ((t9_state[2:1] == 2'b11 && t9_prev[2:1] == 2'b00) ||
          (fj_state[2:1] == 2'b11 && fj_prev[2:1] == 2'b00))
        mech[MC_FORK] <= mech[MC_FORK] + 1;
      if (fj_state[4:3] != 2'b00 && fj_state[4:3] != 2'b11 && fj_in[4] && fj_in[5] &&
          fj_state == fj_prev)
        mech[MC_JOIN_WAIT] <= mech[MC_JOIN_WAIT] + 1;
      d_and_f <= (t9_state == 6'b101000) ? d_and_f + 1 : 0;
      if (d_and_f == 3) mech[MC_SCALE2_STALL] <= mech[MC_SCALE2_STALL] + 1;
      if (|t9_o_collide) mech[MC_COLLIDE] <= mech[MC_COLLIDE] + 1;
      if (&sm_output) mech[MC_OVERLAP] <= mech[MC_OVERLAP] + 1;
    end
    rip_prev <= rip_state;
    t9_prev  <= t9_state;
    fj_prev  <= fj_state;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ---------------- Read_Init_Parameters ----------------
  task automatic rip_go(int k, int rows, int cols);
    int n_tab, n;
    logic [2:0] addr_tx [8];
    for (int r = 0; r < 6; r++) u_mem.blk[r] = 8'($urandom);
    u_mem.blk[6] = 8'(cols);
    u_mem.blk[7] = 8'(rows);
    n_tab = rows * (cols + 1);
    for (int a = 0; a < n_tab; a++) u_mem.blk[8 + a] = 8'($urandom);
    u_mem.n_read = 0; u_mem.n_addr = 0;
    rip_srv_cmd_bus = 3'(k);
    rip_go_req = 1;
    n = 0; while (rip_state[0] && n < 200) begin @(posedge clk); #1; n++; end
    for (int a = 0; a < k; a++) begin
      addr_tx[a] = 3'($urandom);
      rip_srv_cmd_bus = addr_tx[a];
      rip_srv_req = 1;
      n = 0; while (!rip_srv_ack && n < 200) begin @(posedge clk); #1; n++; end
      rip_srv_req = 0;
      n = 0; while (rip_srv_ack && n < 200) begin @(posedge clk); #1; n++; end
    end
    n = 0; while (!rip_go_ack && n < 5000) begin @(posedge clk); #1; n++; end
    check(rip_go_ack && rip_go_response, "GO.ACK and GO.RESPONSE");
    check(u_mem.n_addr == k, "address octets forwarded");
    for (int a = 0; a < k; a++) check(u_mem.addr_rx[a] == addr_tx[a], "address octet");
    check(u_mem.n_read == 8 + n_tab, "octets read");
    check(rip_lnm_max_packet_lo == u_mem.blk[0] && rip_lnm_max_packet_hi == u_mem.blk[1] &&
          rip_lnm_addr_length == u_mem.blk[2] && rip_lnm_time_out_lo == u_mem.blk[3] &&
          rip_lnm_time_out_hi == u_mem.blk[4] && rip_ack_type == u_mem.blk[5][0] &&
          rip_tos_col_reg == M'(cols) && rip_tos_row_reg == M'(rows), "parameter registers");
    for (int a = 0; a < n_tab; a++) begin
      rip_tos_rd_addr = M'(a);
      #0 check(rip_tos_rd_data == u_mem.blk[8 + a], "TOS RAM word");
    end
    rip_go_req = 0;
    n = 0; while (rip_state != 12'b1 && n < 200) begin @(posedge clk); #1; n++; end
    check(rip_state == 12'b1 && !rip_go_ack, "back in RIP0");
  endtask

  // ---------------- CompileTest9 ----------------
  task automatic t9_park(logic [5:0] exp_st, logic [5:1] exp_o, string what);
    int n = 0, stable = 0;
    while (stable < 4 && n < 40) begin
      @(posedge clk); #1; n++;
      stable = (t9_state === exp_st) ? stable + 1 : 0;
    end
    check(t9_state === exp_st && t9_o === exp_o, {"Test9: ", what});
  endtask

  task automatic run_test9();
    t9_park(6'b001000, 5'b01000, "A -> D");
    t9_i[7] = 1;
    t9_park(6'b101000, 5'b01100, "D -> F waits for I8");
    t9_i[1] = 1; t9_i[2] = 1; t9_i[6] = 1; t9_i[8] = 1;
    t9_park(6'b000110, 5'b01001, "F -> A -> FORK B, C");
    t9_i[3] = 1; t9_i[4] = 1;
    t9_park(6'b000110, 5'b10111, "B holds O2, O5, sets O3, resets O4");
    t9_i[5] = 1; t9_i[8] = 0;
    t9_park(6'b101000, 5'b00000, "JOIN B, C -> F, F -> D");
    t9_i[7] = 0;
    t9_park(6'b001000, 5'b00000, "F reset");
    t9_i[7] = 1; t9_i[8] = 1; t9_i[6] = 0; t9_i[5:3] = '0;
    t9_park(6'b010010, 5'b01001, "C -> E");
    t9_i[4] = 1; t9_i[7] = 0; t9_i[8] = 0;
    t9_park(6'b001000, 5'b00000, "JOIN B, E -> F, F -> D");
  endtask

  // ---------------- FORK/JOIN example and simple ring ----------------
  task automatic fj_wait(logic [6:0] exp_st, string what);
    int n = 0, stable = 0;
    while (stable < 3 && n < 30) begin
      @(posedge clk); #1; n++;
      stable = (fj_state === exp_st) ? stable + 1 : 0;
    end
    check(fj_state === exp_st, {"fork/join: ", what});
  endtask

  task automatic run_fj();
    fj_in[1] = 1; fj_wait(7'b0000110, "fork");
    fj_in[1] = 0; fj_in[2] = 1; fj_in[4] = 1; fj_in[5] = 1;
    fj_wait(7'b0001100, "join waits for right branch");
    fj_in[3] = 1; fj_wait(7'b0100000, "join");
    fj_in[5:2] = '0; fj_in[6] = 1; fj_wait(7'b1000000, "F -> G");
    fj_in[6] = 0; fj_input_8 = 1; fj_wait(7'b0000001, "G -> A");
    fj_input_8 = 0;
  endtask

  task automatic run_sm();
    int n;
    for (int s = 1; s <= 3; s++) begin
      sm_input = 3'(1 << (s - 1));
      n = 0;
      while (sm_state != 3'(1 << (s % 3)) && n < 20) begin @(posedge clk); #1; n++; end
      check(sm_state == 3'(1 << (s % 3)), "simple ring step");
      check(sm_output == {sm_state[1], sm_state[0]}, "simple ring outputs");
    end
    sm_input = '0;
  endtask

  initial begin
    #5000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mr = 1;
    rip_go_req = 0; rip_srv_req = 0; rip_srv_cmd_bus = 0; rip_tos_rd_addr = 0;
    t9_i = '0; fj_in = '0; fj_input_8 = 0; sm_input = '0;
    repeat (3) @(posedge clk); #1 mr = 0;
    fork
      begin
        rip_go(3, 2, 3);
        rip_go(7, 3, 7);
      end
      run_test9();
      begin
        run_fj();
        run_fj();
      end
      begin
        run_sm();
        run_sm();
      end
    join
    for (int k = 0; k < MC_N; k++) begin
      $display("mechanism %-30s happened %0d times", mech_name[k], mech[k]);
      check(mech[k] > 0, {"mechanism never happened: ", mech_name[k]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
