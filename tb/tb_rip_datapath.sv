// tb_rip_datapath -- drives the Read_Init_Parameters datapath with the
// command sequences the controller produces and checks every answer:
// INITNUM.REG/CTR and INITNUM.CMP.EQ, the register counter with its EQ7
// output, the register decoder loading each of the eight parameter
// registers from the memory bus with REG.ACK, the TOS counters and
// comparators, and writes into the TOS RAM at the address counter.
module tb_rip_datapath;
  import rip_pkg::*;
  localparam int N = 32;
  localparam int M = $clog2(N);
  logic clk = 0, mr;
  rip_cmd_t cmd;
  rip_sts_t sts;
  logic [2:0] srv_cmd_bus;
  logic [7:0] mem_bus, r0, r1, r2, r3, r4, octet_out, tos_rd_data;
  logic r5;
  logic [M-1:0] r6, r7, tos_rd_addr;
  logic [7:0] expv [8];
  logic [7:0] tab [N];
  int checks = 0, failures = 0;

  rip_datapath #(.N(N)) dut (
    .clk, .mr, .cmd, .sts, .srv_cmd_bus, .mem_bus,
    .lnm_max_packet_lo(r0), .lnm_max_packet_hi(r1), .lnm_addr_length(r2),
    .lnm_time_out_lo(r3), .lnm_time_out_hi(r4), .ack_type(r5),
    .tos_col_reg(r6), .tos_row_reg(r7), .octet_out, .tos_rd_addr, .tos_rd_data
  );

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: sts=%b", what, sts);
    end
  endtask

  // hold the command bits in c until the answer 'don_of' rises, then release
  typedef enum int {D_INITREG, D_INITCTR, D_REGCTR, D_REGACK, D_COL, D_ROW, D_ADR, D_TOS} don_e;
  function automatic logic don_val(don_e d);
    case (d)
      D_INITREG: return sts.initnum_reg_don;
      D_INITCTR: return sts.initnum_ctr_don;
      D_REGCTR:  return sts.reg_ctr_don;
      D_REGACK:  return sts.reg_ack;
      D_COL:     return sts.tos_col_ctr_don;
      D_ROW:     return sts.tos_row_ctr_don;
      D_ADR:     return sts.tos_adr_ctr_don;
      default:   return sts.tos_reg_don;
    endcase
  endfunction

  task automatic handshake(rip_cmd_t c, don_e d, string what);
    int n = 0;
    cmd = c;
    #1 check(don_val(d) == 0, {what, ": answer low at request"});
    while (!don_val(d) && n < 10) begin
      @(posedge clk); #1; n++;
    end
    check(n == 1, {what, ": answered after one clock"});
    cmd = '0;
    #1 check(don_val(d) == 0, {what, ": answer falls with request"});
    @(posedge clk); #1;
  endtask

  initial begin
    #200000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rip_cmd_t c;
    mr = 1; cmd = '0; srv_cmd_bus = 0; mem_bus = 0; tos_rd_addr = 0;
    repeat (2) @(posedge clk); #1 mr = 0;
    // ---- initialisation number: load 5, clear, count up to it
    srv_cmd_bus = 3'd5;
    c = '0; c.initnum_reg_lod = 1; handshake(c, D_INITREG, "INITNUM.REG load");
    srv_cmd_bus = 3'd2;   // bus moves on, register keeps 5
    c = '0; c.initnum_ctr_clr = 1; handshake(c, D_INITCTR, "INITNUM.CTR clear");
    for (int k = 1; k <= 5; k++) begin
      check(sts.initnum_cmp_eq == 0, "INITNUM.CMP.EQ low before count reached");
      c = '0; c.initnum_ctr_inc = 1; handshake(c, D_INITCTR, "INITNUM.CTR inc");
    end
    check(sts.initnum_cmp_eq == 1, "INITNUM.CMP.EQ after five increments");
    // ---- parameter registers
    c = '0; c.reg_ctr_max = 1; handshake(c, D_REGCTR, "REG.CTR max");
    check(sts.reg_ctr_eq7 == 1, "REG.CTR.EQ7 after max");
    for (int r = 0; r < 8; r++) begin
      c = '0; c.reg_ctr_inc = 1; handshake(c, D_REGCTR, "REG.CTR inc");
      check(sts.reg_ctr_eq7 == (r == 7), "REG.CTR.EQ7");
      expv[r] = 8'($urandom);
      if (r == 6) expv[r] = 8'd3;   // columns
      if (r == 7) expv[r] = 8'd2;   // rows
      mem_bus = expv[r];
      c = '0; c.reg_decode_ena = 1; handshake(c, D_REGACK, "register load / REG.ACK");
      mem_bus = 8'($urandom);
    end
    check(r0 == expv[0] && r1 == expv[1] && r2 == expv[2] && r3 == expv[3] && r4 == expv[4],
          "8-bit parameter registers");
    check(r5 == expv[5][0] && r6 == M'(expv[6]) && r7 == M'(expv[7]), "ACK-TYPE, TOS.COL.REG, TOS.ROW.REG");
    // ---- TOS table: rows of cols+1 entries
    c = '0; c.tos_col_ctr_max = 1; handshake(c, D_COL, "TOS.COL.CTR max");
    c = '0; c.tos_row_ctr_clr = 1; handshake(c, D_ROW, "TOS.ROW.CTR clear");
    c = '0; c.tos_adr_ctr_max = 1; handshake(c, D_ADR, "TOS.ADR.CTR max");
    for (int row = 0; row < 2; row++) begin
      for (int col = 0; col < 4; col++) begin
        c = '0; c.tos_col_ctr_inc = 1; handshake(c, D_COL, "TOS.COL.CTR inc");
        c = '0; c.tos_adr_ctr_inc = 1; handshake(c, D_ADR, "TOS.ADR.CTR inc");
        tab[row*4+col] = 8'($urandom);
        mem_bus = tab[row*4+col];
        c = '0; c.tos_reg_lod = 1; handshake(c, D_TOS, "TOS RAM load");
        check(octet_out == tab[row*4+col], "OCTET-OUT at address counter");
        check(sts.tos_col_cmp_eq == (col == 3), "TOS.COL.CMP.EQ");
      end
      c = '0; c.tos_col_ctr_max = 1; handshake(c, D_COL, "TOS.COL.CTR max");
      c = '0; c.tos_row_ctr_inc = 1; handshake(c, D_ROW, "TOS.ROW.CTR inc");
      check(sts.tos_row_cmp_eq == (row == 1), "TOS.ROW.CMP.EQ");
    end
    for (int a = 0; a < 8; a++) begin
      tos_rd_addr = M'(a);
      #1 check(tos_rd_data == tab[a], "TOS RAM read back");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
