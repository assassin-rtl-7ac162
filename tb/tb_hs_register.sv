// tb_hs_register -- checks the load-and-hold register: it follows the bus
// while LOD is held, keeps the last value after LOD drops, and DON rises one
// clock after LOD and falls with it.
module tb_hs_register;
  localparam int W = 8;
  logic clk = 0, mr, lod, don;
  logic [W-1:0] d, q, last;
  int checks = 0, failures = 0;

  hs_register #(.W(W)) dut (.clk, .mr, .lod, .d, .don, .q);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: q=%h don=%b", what, q, don);
    end
  endtask

  initial begin
    #20000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mr = 1; lod = 0; d = 8'h00;
    repeat (2) @(posedge clk); #1 mr = 0;
    check(q == 0 && don == 0, "reset");
    for (int r = 0; r < 8; r++) begin
      lod = 1; d = W'($urandom);
      #1 check(don == 0, "DON low before capture");
      for (int k = 0; k <= r % 3; k++) begin
        @(posedge clk); #1 last = d;
        check(q == last, "follows bus while LOD");
        check(don == 1, "DON while LOD");
        d = W'($urandom);
      end
      lod = 0;
      #1 check(don == 0, "DON falls with LOD");
      repeat (3) begin
        d = W'($urandom);
        @(posedge clk); #1 check(q == last, "holds after LOD drops");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
