// tb_st_onehot_array -- checks the transition array clock by clock against
// hand-derived state sequences:
//   * a ring A -> B -> C -> A (the default parameters) with every condition
//     true: a MOVE takes two clocks, and the next MOVE waits until the state
//     before has been reset (predecessor guard), giving the 6-clock cycle
//     001 011 010 110 100 101;
//   * a FORK A -> B, C, JOIN B, C -> D, MOVE D -> A: the fork sets both
//     branches together, the reverse FORK row waits for both, the JOIN waits
//     until A is off; a held-low reverse condition freezes the handshake;
//   * a false forward condition keeps the token where it is.
module tb_st_onehot_array;
  logic clk = 0, mr;
  int checks = 0, failures = 0;

  // ring of three states, default parameters
  logic [2:0] cf3, cr3, st3, fwd3, rev3;
  st_onehot_array dut_ring (.clk, .mr, .cond_f(cf3), .cond_r(cr3), .state(st3), .fwd(fwd3), .rev(rev3));

  // fork/join: t0 A->{B,C}, t1 {B,C}->D, t2 D->A
  logic [2:0] cf4, cr4, fwd4, rev4;
  logic [3:0] st4;
  st_onehot_array #(
    .NS(4), .NT(3), .START(4'b0001),
    .SRC({4'b1000, 4'b0110, 4'b0001}),
    .DST({4'b0001, 4'b1000, 4'b0110})
  ) dut_fj (.clk, .mr, .cond_f(cf4), .cond_r(cr4), .state(st4), .fwd(fwd4), .rev(rev4));

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: ring=%b fj=%b", what, st3, st4);
    end
  endtask

  initial begin
    #100000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [2:0] ring_seq [6] = '{3'b011, 3'b010, 3'b110, 3'b100, 3'b101, 3'b001};
  logic [3:0] fj_seq   [6] = '{4'b0111, 4'b0110, 4'b1110, 4'b1000, 4'b1001, 4'b0001};

  initial begin
    mr = 1; cf3 = '0; cr3 = '1; cf4 = '0; cr4 = '1;
    repeat (2) @(posedge clk); #1 mr = 0;
    check(st3 == 3'b001 && st4 == 4'b0001, "start states");
    // conditions false: nothing moves
    repeat (3) @(posedge clk);
    #1 check(st3 == 3'b001 && st4 == 4'b0001, "no move on false condition");
    check(fwd3 == 0 && fwd4 == 0, "no forward row active");
    // all conditions true: two full laps, clock by clock
    cf3 = '1; cf4 = '1;
    #1 check(fwd3 == 3'b001, "forward row of A->B in progress");
    for (int lap = 0; lap < 2; lap++)
      for (int k = 0; k < 6; k++) begin
        @(posedge clk); #1;
        check(st3 == ring_seq[k], $sformatf("ring step %0d", k));
        check(st4 == fj_seq[k], $sformatf("fork/join step %0d", k));
      end
    // reverse condition held low: the fork cannot reset A
    cf3 = '0; cr4 = 3'b110;
    @(posedge clk); #1 check(st4 == 4'b0111, "fork sets both branches");
    repeat (4) @(posedge clk);
    #1 check(st4 == 4'b0111, "reverse row waits for its condition");
    check(fwd4 == 3'b001, "only the fork row active while A is on");
    cr4 = '1;
    @(posedge clk); #1 check(st4 == 4'b0110, "reverse row resets A");
    cf4 = 3'b101; // JOIN condition false
    repeat (3) @(posedge clk);
    #1 check(st4 == 4'b0110, "join waits for its condition");
    cf4 = '1;
    @(posedge clk); #1 check(st4 == 4'b1110, "join sets D");
    @(posedge clk); #1 check(st4 == 4'b1000, "join resets both sources");
    check(st3 == 3'b001, "ring held by false conditions");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
