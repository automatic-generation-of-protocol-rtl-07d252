// tb_run_channel: self-checking testbench for run_channel.
//
// Three threads (the default size) request nodes of a loaded path.  The
// testbench checks that every thread is handed the path in order, that a
// thread is refused (WAIT) while an earlier copy of the same node is active
// (some other thread is inside it or has not reached it yet) and is served
// once every thread has left it, that two threads may share one copy, that of two threads asking for copies of the
// same node in one cycle the one at the earlier path position wins, that
// done rises at the end of the path and falls again when the path is made
// longer.  Requests are applied on the falling edge and the combinational
// answer is checked 1 ns later.  A watchdog ends a stuck run with a failure.
`timescale 1ns/1ps
module tb_run_channel;

  localparam int NTHR = 3, PLEN = 32, NODE_W = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                    path_we = 1'b0;
  logic [$clog2(PLEN)-1:0] path_waddr = '0;
  logic [NODE_W-1:0]       path_wnode = '0;
  logic [$clog2(PLEN):0]   path_len = '0;
  logic [NTHR-1:0]         req = '0, gnt, done, wait_o;
  logic [NODE_W-1:0]       node [NTHR];

  int checks = 0, failures = 0;
  int n_wait = 0;
  always @(posedge clk) if (|wait_o) n_wait++;

  run_channel dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t (gnt=%b wait=%b done=%b)", what, $time, gnt, wait_o, done);
    end
  endtask

  task automatic write_path(input int nodes[], input int first);
    foreach (nodes[i]) begin
      @(negedge clk);
      path_we    = 1'b1;
      path_waddr = $clog2(PLEN)'(first + i);
      path_wnode = NODE_W'(nodes[i]);
    end
    @(negedge clk);
    path_we = 1'b0;
  endtask

  // threads in r ask in one cycle; expected grants g and, per granted
  // thread, the node it gets
  task automatic ask(input logic [NTHR-1:0] r, input logic [NTHR-1:0] g,
                     input int n0, input int n1, input int n2, input string what);
    int exp_n [NTHR];
    exp_n = '{n0, n1, n2};
    @(negedge clk);
    req = r;
    #1;
    check(gnt == g, {what, ": grants"});
    check(wait_o == (r & ~g & ~done), {what, ": wait flags"});
    for (int t = 0; t < NTHR; t++)
      if (g[t]) check(int'(node[t]) == exp_n[t], $sformatf("%s: node of thread %0d", what, t));
    @(negedge clk);
    req = '0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // path: 1 2 1 3 1
    write_path('{1, 2, 1, 3, 1}, 0);
    path_len = 5;
    #1 check(done == '0, "not done with a non-empty path");

    ask(3'b001, 3'b001, 1, 0, 0, "t0 enters pos0 node1");
    ask(3'b010, 3'b010, 0, 1, 0, "t1 shares copy pos0 of node1");
    ask(3'b010, 3'b010, 0, 2, 0, "t1 enters pos1 node2");
    ask(3'b010, 3'b000, 0, 0, 0, "t1 refused pos2 node1 while pos0 is active");
    // t0 leaves pos0, but t2 has not been through pos0 yet: still active
    ask(3'b011, 3'b001, 2, 0, 0, "t0 enters pos1, t1 still refused");
    ask(3'b100, 3'b100, 0, 0, 1, "t2 enters pos0 node1");
    ask(3'b010, 3'b000, 0, 0, 0, "t1 refused while t2 is in pos0");
    // t2 leaves pos0 in the same cycle t1 asks again
    ask(3'b110, 3'b110, 0, 1, 2, "t2 leaves pos0, t1 enters pos2 node1");
    ask(3'b001, 3'b001, 1, 0, 0, "t0 shares pos2 node1");
    ask(3'b010, 3'b010, 0, 3, 0, "t1 enters pos3 node3");
    ask(3'b010, 3'b000, 0, 0, 0, "t1 refused pos4 node1 while pos2 is active");
    ask(3'b001, 3'b001, 3, 0, 0, "t0 enters pos3 node3");
    // t1 (pos4, node1) and t2 (pos2, node1) ask in one cycle: the earlier
    // copy wins and t1 waits
    ask(3'b110, 3'b100, 0, 0, 1, "earlier copy wins a same-cycle tie");
    ask(3'b010, 3'b000, 0, 0, 0, "t1 waits while t2 is in pos2 node1");
    ask(3'b110, 3'b110, 0, 1, 3, "t2 leaves, t1 enters pos4 node1");
    ask(3'b001, 3'b001, 1, 0, 0, "t0 enters pos4 node1");
    ask(3'b100, 3'b100, 0, 0, 1, "t2 enters pos4 node1");
    @(negedge clk);
    #1 check(done == 3'b111, "all threads done at the end of the path");
    ask(3'b111, 3'b000, 0, 0, 0, "no grant past the end");
    // extend the path: done falls and the threads continue
    write_path('{5}, 5);
    path_len = 6;
    #1 check(done == 3'b000, "done falls when the path grows");
    ask(3'b111, 3'b111, 5, 5, 5, "all threads share the new node");
    check(n_wait > 0, "WAIT answers were given");
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
