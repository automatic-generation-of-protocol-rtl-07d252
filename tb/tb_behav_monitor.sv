// tb_behav_monitor: self-checking testbench for behav_monitor.
//
// The monitor under test holds a small automaton over four symbols:
//   state 0 --s0--> 1,  state 1 --s1--> 0,  state 0 --s2--> 2,  state 2 --s1--> 0
// (s3 has no transition at all).  The testbench requests symbols, checks
// which ones are allowed in each state, fires allowed actions and follows
// the state through the allow pattern.  It also checks the tie rule (lowest
// symbol first when two enabled symbols are requested together) and that a
// permission, once given, is held until the action fires.  Requests are
// applied on the falling edge and allow is checked 1 ns later (allow is
// combinational).  A watchdog ends a stuck run with a failure.
`timescale 1ns/1ps
module tb_behav_monitor;
  import conv_pkg::*;

  localparam int NSYM = 4, NTR = 4;
  localparam logic [NTR*TR_W-1:0] TRT = {tr(2, 1, 0), tr(0, 2, 2), tr(1, 1, 0), tr(0, 0, 1)};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NSYM-1:0] req = '0, fire = '0, allow;
  int checks = 0, failures = 0;

  behav_monitor #(.NSYM(NSYM), .NTR(NTR), .TR(TRT)) dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t (allow=%b)", what, $time, allow);
    end
  endtask

  // request set r, expect allow a
  task automatic ask(input logic [NSYM-1:0] r, input logic [NSYM-1:0] a, input string what);
    @(negedge clk);
    fire = '0;
    req  = r;
    #1 check(allow == a, what);
  endtask

  // fire symbol s in the current cycle (it must be allowed)
  task automatic do_fire(input int s);
    fire = '0;
    fire[s] = 1'b1;
    @(posedge clk);
    #1 fire = '0;
    req  = '0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // state 0
    ask(4'b0010, 4'b0000, "s1 not enabled in state 0");
    ask(4'b1000, 4'b0000, "s3 never enabled");
    ask(4'b0001, 4'b0001, "s0 enabled in state 0");
    do_fire(0);
    // state 1
    ask(4'b0001, 4'b0000, "s0 not enabled in state 1");
    ask(4'b0100, 4'b0000, "s2 not enabled in state 1");
    ask(4'b0010, 4'b0010, "s1 enabled in state 1");
    // hold the request a few cycles without firing: no state change
    repeat (3) @(negedge clk);
    #1 check(allow == 4'b0010, "permission holds while the action waits");
    do_fire(1);
    // state 0 again: both s0 and s2 requested, s0 wins
    ask(4'b0101, 4'b0001, "lowest enabled symbol wins");
    @(negedge clk);
    // s0 withdrawn, s2 still requested: the permission stays with s0
    req = 4'b0100;
    #1 check(allow == 4'b0001, "granted permission is held until it fires");
    req = 4'b0101;
    do_fire(0);
    ask(4'b0010, 4'b0010, "back in state 1 after s0");
    do_fire(1);
    // take the other branch: s2 then s1
    ask(4'b0100, 4'b0100, "s2 enabled in state 0");
    do_fire(2);
    ask(4'b0100, 4'b0000, "s2 not enabled in state 2");
    ask(4'b0011, 4'b0010, "only s1 enabled in state 2");
    do_fire(1);
    ask(4'b0001, 4'b0001, "state 0 after s2 s1");
    // reset returns to state 0 and clears the held permission
    @(negedge clk);
    rst_n = 1'b0;
    req = '0;
    @(negedge clk);
    rst_n = 1'b1;
    ask(4'b0100, 4'b0100, "state 0 after reset, no stale permission");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

endmodule
