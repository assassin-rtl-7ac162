// tb_cu_fork_join -- drives the FORK/JOIN example: the fork starts two
// branches together, the branches advance independently, the join waits
// for both branches and both of its conditions, and the loop returns to A.
module tb_cu_fork_join;
  logic clk = 0, mr;
  logic input_1, input_2, input_3, input_4, input_5, input_6, input_8;
  logic [6:0] state;       // {G, F, E, D, C, B, A}
  logic [5:0] in_progress;
  int checks = 0, failures = 0;

  cu_fork_join dut (.clk, .mr, .input_1, .input_2, .input_3, .input_4, .input_5,
                    .input_6, .input_8, .state, .in_progress);

  always #5 clk = ~clk;

  task automatic settle(logic [6:0] exp_st, int max_clk, string what);
    int n = 0;
    while (state !== exp_st && n < max_clk) begin
      @(posedge clk); #1; n++;
    end
    repeat (2) @(posedge clk);
    #1 checks++;
    if (state !== exp_st) begin
      failures++;
      $display("FAIL %s: state=%b exp %b", what, state, exp_st);
    end
  endtask

  initial begin
    #100000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mr = 1; {input_1, input_2, input_3, input_4, input_5, input_6, input_8} = '0;
    repeat (2) @(posedge clk); #1 mr = 0;
    settle(7'b0000001, 0, "start in A");
    for (int lap = 0; lap < 2; lap++) begin
      input_1 = 1;
      @(posedge clk); #1 checks++;
      if (state !== 7'b0000111) begin failures++; $display("FAIL fork sets B and C together"); end
      settle(7'b0000110, 4, "fork: B and C");
      input_1 = 0;
      if (lap == 0) begin
        input_2 = 1; settle(7'b0001100, 4, "left branch to D, C waits");
        input_4 = 1; input_5 = 1;
        settle(7'b0001100, 4, "join waits for right branch");
        input_3 = 1; settle(7'b0100000, 8, "right branch arrives, join to F");
      end else begin
        input_3 = 1; settle(7'b0010010, 4, "right branch to E, B waits");
        input_2 = 1; settle(7'b0011000, 4, "both arrived");
        input_4 = 1; settle(7'b0011000, 4, "join needs INPUT-5 too");
        input_5 = 1; settle(7'b0100000, 6, "join to F");
      end
      {input_2, input_3, input_4, input_5} = '0;
      input_6 = 1; settle(7'b1000000, 4, "F to G");
      input_6 = 0; input_8 = 1; settle(7'b0000001, 4, "G to A");
      input_8 = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
