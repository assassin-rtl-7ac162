// tb_read_init_parameters -- complete "accept GO" operations of
// Read_Init_Parameters against behavioural models of the memory module,
// INM_SRV and the GO requester, at the default table size (N = 32).
//
// Each operation: the number of address octets K (1..7) is put on the
// server command bus and GO.REQ raised; INM_SRV then offers K address
// octets, one per SRV.REQ/SRV.ACK handshake; the memory model returns an
// 8-octet parameter block followed by the type-of-service table of R rows
// of C+1 octets (the row loop runs until the row counter equals R, the
// column loop until the column counter, preloaded to its maximum, equals
// C). The testbench checks that the K octets reached the memory in order,
// that exactly 8 + R*(C+1) octets were read, the eight parameter
// registers, every word of the TOS RAM, GO.ACK / GO.RESPONSE, and the
// return to the start state.
module tb_read_init_parameters;
  localparam int N = 32;
  localparam int M = $clog2(N);
  logic clk = 0, mr;
  logic go_req, go_ack, go_response, srv_req, srv_ack, mem_req, mem_send, mem_ack;
  logic [2:0] srv_cmd_bus;
  logic [7:0] mem_bus, lnm_max_packet_lo, lnm_max_packet_hi, lnm_addr_length,
              lnm_time_out_lo, lnm_time_out_hi, octet_out, tos_rd_data;
  logic ack_type;
  logic [M-1:0] tos_col_reg, tos_row_reg, tos_rd_addr;
  logic [11:0] state;
  int checks = 0, failures = 0;
  logic [2:0] addr_tx [8];

  read_init_parameters dut (
    .clk, .mr, .go_req, .go_ack, .go_response, .srv_req, .srv_ack, .srv_cmd_bus,
    .mem_req, .mem_send, .mem_ack, .mem_bus,
    .lnm_max_packet_lo, .lnm_max_packet_hi, .lnm_addr_length, .lnm_time_out_lo,
    .lnm_time_out_hi, .ack_type, .tos_col_reg, .tos_row_reg, .octet_out,
    .tos_rd_addr, .tos_rd_data, .state
  );

  mem_model u_mem (.clk, .mr, .mem_req, .mem_send, .srv_cmd_bus, .mem_ack, .mem_bus);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  typedef enum int {S_RIP0, S_SRV_ACK, S_GO_ACK} sig_e;

  function automatic logic sig_val(sig_e which);
    case (which)
      S_RIP0:    return state[0];
      S_SRV_ACK: return srv_ack;
      default:   return go_ack;
    endcase
  endfunction

  task automatic wait_for(sig_e which, logic val, int max_clk, string what);
    int n = 0;
    while (sig_val(which) !== val && n < max_clk) begin
      @(posedge clk); #1; n++;
    end
    check(sig_val(which) === val, what);
  endtask

  task automatic one_go(int k, int rows, int cols);
    int n_tab;
    longint cyc0;
    // parameter block: 8 register octets, then the table
    for (int r = 0; r < 6; r++) u_mem.blk[r] = 8'($urandom);
    u_mem.blk[6] = 8'(cols);
    u_mem.blk[7] = 8'(rows);
    n_tab = rows * (cols + 1);
    for (int a = 0; a < n_tab; a++) u_mem.blk[8 + a] = 8'($urandom);
    u_mem.n_read = 0; u_mem.n_addr = 0;
    cyc0 = $time;
    // GO with the address length on the command bus
    srv_cmd_bus = 3'(k);
    go_req = 1;
    wait_for(S_RIP0, 1'b0, 200, "RIP0 left after GO.REQ");
    for (int a = 0; a < k; a++) begin
      addr_tx[a] = 3'($urandom);
      srv_cmd_bus = addr_tx[a];
      srv_req = 1;
      wait_for(S_SRV_ACK, 1'b1, 200, "SRV.ACK");
      srv_req = 0;
      wait_for(S_SRV_ACK, 1'b0, 200, "SRV.ACK released");
    end
    wait_for(S_GO_ACK, 1'b1, 5000, "GO.ACK");
    check(go_response == 1'b1, "GO.RESPONSE set");
    check(u_mem.n_addr == k, $sformatf("address octets sent %0d of %0d", u_mem.n_addr, k));
    for (int a = 0; a < k && a < 8; a++)
      check(u_mem.addr_rx[a] == addr_tx[a], "address octet order");
    check(u_mem.n_read == 8 + n_tab, $sformatf("octets read %0d, expected %0d", u_mem.n_read, 8 + n_tab));
    check(lnm_max_packet_lo == u_mem.blk[0], "LNM-MAX-PACKET.LO");
    check(lnm_max_packet_hi == u_mem.blk[1], "LNM-MAX-PACKET.HI");
    check(lnm_addr_length   == u_mem.blk[2], "LNM-ADDR-LENGTH");
    check(lnm_time_out_lo   == u_mem.blk[3], "LNM-TIME-OUT.LO");
    check(lnm_time_out_hi   == u_mem.blk[4], "LNM-TIME-OUT.HI");
    check(ack_type          == u_mem.blk[5][0], "ACK-TYPE");
    check(tos_col_reg == M'(cols) && tos_row_reg == M'(rows), "TOS.COL.REG / TOS.ROW.REG");
    for (int a = 0; a < n_tab; a++) begin
      tos_rd_addr = M'(a);
      #0 check(tos_rd_data == u_mem.blk[8 + a], $sformatf("TOS RAM word %0d", a));
    end
    go_req = 0;
    wait_for(S_GO_ACK, 1'b0, 200, "GO.ACK released");
    wait_for(S_RIP0, 1'b1, 200, "back in RIP0");
    $display("GO: K=%0d rows=%0d cols=%0d octets=%0d took %0d clocks",
             k, rows, cols + 1, u_mem.n_read, ($time - cyc0) / 10);
  endtask

  initial begin
    #2000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mr = 1; go_req = 0; srv_req = 0; srv_cmd_bus = 0; tos_rd_addr = 0;
    repeat (3) @(posedge clk); #1 mr = 0;
    check(state == 12'b1 && go_ack == 0 && go_response == 0, "reset into RIP0");
    one_go(1, 1, 0);
    one_go(3, 2, 3);
    one_go(7, 3, 7);   // largest table the 2-bit row / 3-bit column fields allow
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
