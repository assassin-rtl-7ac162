// tb_reg_decoder -- checks the register decoder and REG.MUX exhaustively:
// only the selected LOD line is high while enabled, none when disabled, and
// REG.ACK is the DON of the selected register.
module tb_reg_decoder;
  localparam int RC = 8;
  logic ena, reg_ack;
  logic [2:0] sel;
  logic [RC-1:0] don, lod, exp_lod;
  int checks = 0, failures = 0;

  reg_decoder #(.REG_COUNT(RC)) dut (.ena, .sel, .don, .lod, .reg_ack);

  initial begin
    for (int e = 0; e < 2; e++)
      for (int s = 0; s < RC; s++)
        for (int r = 0; r < 16; r++) begin
          ena = e[0]; sel = 3'(s); don = RC'($urandom);
          #1;
          exp_lod = '0;
          if (e == 1) exp_lod = RC'(1) << s;
          checks++;
          if (lod !== exp_lod || reg_ack !== don[s]) begin
            failures++;
            $display("FAIL ena=%0d sel=%0d don=%b: lod=%b ack=%b", e, s, don, lod, reg_ack);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
