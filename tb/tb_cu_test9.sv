// tb_cu_test9 -- takes the CompileTest9 control unit through every one of
// its eight transitions (FORK, both JOINs, the MOVEs and the D <-> F
// scale-of-two loop) and checks, at each point where the machine comes to
// rest, the one-hot state and all five outputs against values worked out
// by hand from the control-flow graph:
//   * enduring outputs O3/O4 keep their value after the setting state is
//     left, ephemeral O1/O2/O5 follow state and condition;
//   * the JOIN B, C -> F sets and resets O3 and O4 at the same time as
//     state B does the opposite; both collisions must be flagged;
//   * in the scale-of-two loop the reverse row of D -> F waits for I8, so
//     D and F stay on together until I8 rises.
module tb_cu_test9;
  logic clk = 0, mr;
  logic [8:1] i;
  logic [5:1] o;
  logic [1:0] o_collide;
  logic [5:0] state;      // {F, E, D, C, B, A}
  logic [7:0] in_progress;
  int checks = 0, failures = 0;
  int taken [8];
  logic [1:0] collide_seen;
  logic [7:0] prev_ip;

  cu_test9 dut (.clk, .mr, .i, .o, .o_collide, .state, .in_progress);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (mr) begin
      prev_ip <= '0; collide_seen <= '0;
      for (int t = 0; t < 8; t++) taken[t] <= 0;
    end else begin
      prev_ip <= in_progress;
      collide_seen <= collide_seen | o_collide;
      for (int t = 0; t < 8; t++)
        if (in_progress[t] && !prev_ip[t]) taken[t] <= taken[t] + 1;
    end
  end

  // wait until the state has been exp_st for 3 clocks, then compare outputs
  task automatic park(logic [5:0] exp_st, logic [5:1] exp_o, string what);
    int n = 0, stable = 0;
    while (stable < 3 && n < 40) begin
      @(posedge clk); #1; n++;
      stable = (state === exp_st) ? stable + 1 : 0;
    end
    checks++;
    if (state !== exp_st || o !== exp_o) begin
      failures++;
      $display("FAIL %s: state=%b o=%b (exp %b %b)", what, state, o, exp_st, exp_o);
    end
  endtask

  // wait until A is entered, then drop I7 so that D does not leave again
  task automatic wait_a();
    int n = 0;
    while (!state[0] && n < 40) begin
      @(posedge clk); #1; n++;
    end
    i[7] = 0;
  endtask

  initial begin
    #200000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  //                        O5 O4 O3 O2 O1
  initial begin
    mr = 1; i = '0;
    repeat (2) @(posedge clk); #1 mr = 0;
    checks++;
    if (state !== 6'b000001 || o[1] !== 1 || o[2] !== 1) begin
      failures++; $display("FAIL start in A holding O1, O2");
    end
    // not BIG: MOVE A -> D; A has set O4 and reset O3
    park(6'b001000, 5'b01000, "A -> D");
    // I7 with I8 low: D -> F sets F and O3, D stays on until I8 rises
    i[7] = 1;
    park(6'b101000, 5'b01100, "D -> F waits for I8 (scale-of-two)");
    checks++;
    // F is also a predecessor of D, so the forward row of D -> F is off now
    if (in_progress != 8'b0000_0000) begin
      failures++; $display("FAIL no forward row while D and F are on: %b", in_progress);
    end
    // I8 rises, BIG true, I6 high: D reset, F -> A, FORK A -> B, C
    i[1] = 1; i[2] = 1; i[6] = 1; i[8] = 1;
    park(6'b000110, 5'b01001, "F -> A -> FORK B, C");
    i[3] = 1;
    park(6'b000110, 5'b01101, "B: if I3 set O3");
    i[4] = 1;
    park(6'b000110, 5'b10111, "B: I4 or I5 holds O2, O5, resets O4");
    // JOIN B, C -> F on I4 and I5 and I6; then F -> D (I8 low) waits for I7 low
    i[5] = 1; i[8] = 0;
    park(6'b101000, 5'b00000, "JOIN B, C -> F, then F -> D with both on");
    checks++;
    if (collide_seen !== 2'b11) begin
      failures++; $display("FAIL set/reset collisions on O3, O4 not flagged: %b", collide_seen);
    end
    i[7] = 0;
    park(6'b001000, 5'b00000, "reverse F -> D resets F");
    // D -> F -> A -> FORK, C -> E on not I6: park in B, E
    i[7] = 1; i[8] = 1; i[6] = 0; i[4] = 0; i[5] = 0; i[3] = 0;
    park(6'b010010, 5'b01001, "FORK then C -> E");
    // JOIN B, E -> F on I4 or I5, then F -> D
    i[4] = 1; i[7] = 0; i[8] = 0;
    park(6'b001000, 5'b00000, "JOIN B, E -> F, then F -> D");
    // BIG = I1 and (I2 or not I3): false for I1=1, I2=0, I3=1 ...
    i[4] = 0; i[2] = 0; i[3] = 1; i[7] = 1; i[8] = 1;
    wait_a();
    park(6'b001000, 5'b01000, "D -> F -> A, not BIG with I2=0, I3=1: A -> D");
    // ... and true for I1=1, I2=0, I3=0
    i[3] = 0; i[7] = 1; i[8] = 1;
    wait_a();
    park(6'b010010, 5'b01001, "D -> F -> A, BIG with I2=0, I3=0: FORK, C -> E");
    for (int t = 0; t < 8; t++) begin
      checks++;
      if (taken[t] == 0) begin
        failures++; $display("FAIL transition t%0d never taken", t);
      end
    end
    $display("transitions taken: %0d %0d %0d %0d %0d %0d %0d %0d",
             taken[0], taken[1], taken[2], taken[3], taken[4], taken[5], taken[6], taken[7]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
