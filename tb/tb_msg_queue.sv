// tb_msg_queue: self-checking testbench for msg_queue.
//
// Drives the queue at its default size (32-bit entries, depth 4) with a
// random mix of pushes and pops for a few thousand cycles, including pushes
// while full, pops while empty and simultaneous push and pop, and compares
// every cycle against a reference queue: empty, full and the head entry must
// match.  Stimulus is applied on the falling edge and checked just before the
// rising edge.  A watchdog ends a stuck run with a failure.
`timescale 1ns/1ps
module tb_msg_queue;

  localparam int W = 32, DEPTH = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         push = 1'b0, pop = 1'b0;
  logic [W-1:0] push_data = '0;
  logic         full, empty;
  logic [W-1:0] head;

  int checks = 0, failures = 0;
  logic [W-1:0] model [$];
  int n_full = 0, n_both = 0, n_push_full = 0, n_pop_empty = 0;

  msg_queue dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    #1 check(empty && !full, "empty after reset");

    for (int i = 0; i < 4000; i++) begin
      int bias;
      @(negedge clk);
      // alternate phases that favour filling and draining
      bias = ((i / 64) % 2 == 0) ? 70 : 30;
      push      = ($urandom_range(99) < bias);
      pop       = ($urandom_range(99) < 100 - bias);
      push_data = $urandom();
      #1;
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == DEPTH), "full flag");
      if (model.size() > 0) check(head == model[0], "head entry");
      if (full) n_full++;
      if (push && full) n_push_full++;
      if (pop && empty) n_pop_empty++;
      if (push && pop && !full && !empty) n_both++;
      @(posedge clk);
      // reference: a push while full and a pop while empty are ignored
      begin
        bit was_full, was_empty;
        was_full  = (model.size() == DEPTH);
        was_empty = (model.size() == 0);
        if (pop && !was_empty) void'(model.pop_front());
        if (push && !was_full) model.push_back(push_data);
      end
    end
    @(negedge clk);
    push = 1'b0; pop = 1'b0;
    check(n_full > 0 && n_push_full > 0, "queue was full and a push was refused");
    check(n_pop_empty > 0, "a pop on the empty queue was ignored");
    check(n_both > 0, "simultaneous push and pop happened");
    // reset empties the queue
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    #1 check(empty && !full, "empty after second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

endmodule
