// tb_state_latch -- checks the state latch: master reset loads INIT, set
// and reset act one clock later, q_n is the complement, the value holds
// with both inputs low.
module tb_state_latch;
  logic clk = 0, mr, set, reset;
  logic q0, q0_n, q1, q1_n;
  int checks = 0, failures = 0;

  state_latch #(.INIT(1'b0)) dut0 (.clk, .mr, .set, .reset, .q(q0), .q_n(q0_n));
  state_latch #(.INIT(1'b1)) dut1 (.clk, .mr, .set, .reset, .q(q1), .q_n(q1_n));

  always #5 clk = ~clk;

  task automatic check(logic e0, logic e1, string what);
    checks++;
    if (q0 !== e0 || q1 !== e1 || q0_n !== ~e0 || q1_n !== ~e1) begin
      failures++;
      $display("FAIL %s: q0=%b q1=%b (exp %b %b)", what, q0, q1, e0, e1);
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
    repeat (2) @(posedge clk);
    #1 check(0, 1, "reset values");
    mr = 0;
    repeat (3) @(posedge clk);
    #1 check(0, 1, "hold after reset");
    set = 1; #1 check(0, 1, "set not yet sampled");
    @(posedge clk); #1 check(1, 1, "set");
    set = 0; repeat (2) @(posedge clk); #1 check(1, 1, "hold set");
    reset = 1; @(posedge clk); #1 check(0, 0, "reset");
    reset = 0; repeat (2) @(posedge clk); #1 check(0, 0, "hold reset");
    set = 1; @(posedge clk); #1 check(1, 1, "set again");
    set = 0; mr = 1; @(posedge clk); #1 check(0, 1, "master reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
