// tb_output_latch -- checks the enduring-output latch: SET keeps the output
// on after the set condition goes away, RESET clears it, a simultaneous set
// and reset clears it and raises collide, master reset clears it.
module tb_output_latch;
  logic clk = 0, mr, set, reset, q, collide;
  int checks = 0, failures = 0;

  output_latch dut (.clk, .mr, .set, .reset, .q, .collide);

  always #5 clk = ~clk;

  task automatic check(logic eq, logic ec, string what);
    checks++;
    if (q !== eq || collide !== ec) begin
      failures++;
      $display("FAIL %s: q=%b collide=%b (exp %b %b)", what, q, collide, eq, ec);
    end
  endtask

  initial begin
    #5000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mr = 1; set = 0; reset = 0;
    @(posedge clk); #1 check(0, 0, "after reset");
    mr = 0;
    set = 1; @(posedge clk); #1 check(1, 0, "set");
    set = 0; repeat (3) @(posedge clk); #1 check(1, 0, "enduring after set released");
    reset = 1; @(posedge clk); #1 check(0, 0, "reset");
    reset = 0; repeat (2) @(posedge clk); #1 check(0, 0, "stays reset");
    set = 1; @(posedge clk); #1 check(1, 0, "set again");
    reset = 1; #1 check(1, 1, "collision flagged");
    @(posedge clk); #1 check(0, 1, "reset wins on collision");
    set = 0; reset = 0; #1 check(0, 0, "collision gone");
    set = 1; @(posedge clk); set = 0; mr = 1; @(posedge clk); #1 check(0, 0, "master reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
