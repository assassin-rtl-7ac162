// tb_hs_counter -- checks the handshake counter against a reference count
// kept in the testbench: each held command is applied exactly once, DON
// rises one clock after the command and falls as soon as it is released,
// MAX loads all ones and INC wraps to 0, a command changed without release
// is applied anew.
module tb_hs_counter;
  localparam int W = 3;
  logic clk = 0, mr, clr, max, inc, don;
  logic [W-1:0] q;
  int checks = 0, failures = 0;
  int ref_q;

  hs_counter #(.W(W)) dut (.clk, .mr, .clr, .max, .inc, .don, .q);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: q=%0d don=%b ref=%0d", what, q, don, ref_q);
    end
  endtask

  // hold one command, check the DON timing and the result, release it
  task automatic do_cmd(int which, int hold);
    {clr, max, inc} = 3'b000;
    case (which)
      0: clr = 1;
      1: max = 1;
      default: inc = 1;
    endcase
    #1 check(don == 0, "DON low right after command");
    @(posedge clk); #1;
    case (which)
      0: ref_q = 0;
      1: ref_q = (1 << W) - 1;
      default: ref_q = (ref_q + 1) % (1 << W);
    endcase
    check(don == 1, "DON one clock after command");
    check(q == W'(ref_q), "value after command");
    repeat (hold) @(posedge clk);
    #1 check(q == W'(ref_q), "applied only once while held");
    check(don == 1, "DON stays while held");
    {clr, max, inc} = 3'b000;
    #1 check(don == 0, "DON falls with command");
    @(posedge clk); #1;
  endtask

  initial begin
    #20000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mr = 1; {clr, max, inc} = 3'b000; ref_q = 0;
    repeat (2) @(posedge clk); #1 mr = 0;
    check(q == 0 && don == 0, "reset");
    do_cmd(1, 2);
    do_cmd(2, 3);
    for (int k = 0; k < 10; k++) do_cmd(2, k % 3);
    do_cmd(0, 1);
    do_cmd(2, 0);
    // change command without release: INC then CLR
    inc = 1; @(posedge clk); #1 ref_q = (ref_q + 1) % (1 << W);
    check(q == W'(ref_q) && don, "INC before switch");
    inc = 0; clr = 1; #1 check(don == 0, "DON low on new command");
    @(posedge clk); #1 ref_q = 0;
    check(q == 0 && don, "CLR applied after switch");
    clr = 0;
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
