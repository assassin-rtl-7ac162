// tb_cu_simple -- runs the three-state ring A -> B -> C -> A twice and
// checks, clock by clock, the states and the two held outputs, including
// the one-clock overlap of OUTPUT-1 and OUTPUT-2 on the way from A to B and
// that a transition takes two clocks.
module tb_cu_simple;
  logic clk = 0, mr, input_1, input_2, input_3, output_1, output_2;
  logic [2:0] state;
  int checks = 0, failures = 0;

  cu_simple dut (.clk, .mr, .input_1, .input_2, .input_3, .output_1, .output_2, .state);

  always #5 clk = ~clk;

  task automatic expect_now(logic [2:0] st, logic o1, logic o2, string what);
    checks++;
    if (state !== st || output_1 !== o1 || output_2 !== o2) begin
      failures++;
      $display("FAIL %s: state=%b o1=%b o2=%b (exp %b %b %b)", what, state, output_1, output_2, st, o1, o2);
    end
  endtask

  initial begin
    #100000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mr = 1; {input_1, input_2, input_3} = '0;
    repeat (2) @(posedge clk); #1 mr = 0;
    expect_now(3'b001, 1, 0, "start in A");
    repeat (2) begin
      input_2 = 1; input_3 = 1;  // conditions of other states: no effect in A
      repeat (3) @(posedge clk); #1 expect_now(3'b001, 1, 0, "A waits for INPUT-1");
      input_2 = 0; input_3 = 0; input_1 = 1;
      @(posedge clk); #1 expect_now(3'b011, 1, 1, "A and B both on");
      input_1 = 0;
      @(posedge clk); #1 expect_now(3'b010, 0, 1, "in B");
      repeat (2) @(posedge clk); #1 expect_now(3'b010, 0, 1, "B waits for INPUT-2");
      input_2 = 1;
      @(posedge clk); #1 expect_now(3'b110, 0, 1, "B and C");
      @(posedge clk); #1 expect_now(3'b100, 0, 0, "in C");
      input_2 = 0; input_3 = 1;
      @(posedge clk); #1 expect_now(3'b101, 1, 0, "C and A");
      @(posedge clk); #1 expect_now(3'b001, 1, 0, "back in A");
      input_3 = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
