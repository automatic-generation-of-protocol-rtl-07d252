// tb_conv_thread: self-checking testbench for conv_thread.
//
// One thread is run on its own; the RUN channel, the queues and the monitor
// around it are played by the testbench.  Its program has two nodes:
//   node 0: receive ch0 into queue 0; send control message on ch0 (monitored
//           symbol 1)
//   node 1: send the upper half of queue 1's head on ch1 (chop); send the
//           lower halves of queue 0's and queue 1's heads joined on ch0
//           (merge); send queue 0's head unchanged on ch1 (relay)
// The testbench checks that a receive waits while its queue is full (and
// reports q_stall), that the content is pushed when the message is taken,
// that a monitored send waits for allow and reports fire, that sends wait
// for their queue heads, the formatting of relay, chop and merge and the
// pops, that the thread asks the RUN channel for a node after the last
// action and that it reports finished at the end of the path.  Stimulus is
// applied on the falling edge and the thread's outputs are checked 1 ns
// later.  A watchdog ends a stuck run with a failure.
`timescale 1ns/1ps
module tb_conv_thread;
  import conv_pkg::*;

  localparam int W = 32, NRX = 2, NTX = 2, NQ = 2, NSYM = 2, NNODE = 2, NSTEP = 3;
  localparam int NT = 1, NN = NNODE, NS = NSTEP;

  function automatic logic [NNODE*NSTEP*ACT_W-1:0] build_prog();
    logic [NNODE*NSTEP*ACT_W-1:0] r;
    r = '0;
    r[((0 * NS) + 0) * ACT_W +: ACT_W] = a_recv_q(0, 0);
    r[((0 * NS) + 1) * ACT_W +: ACT_W] = a_mon(a_send(0), 1);
    r[((1 * NS) + 0) * ACT_W +: ACT_W] = a_send_q(1, 1, FMT_HI);
    r[((1 * NS) + 1) * ACT_W +: ACT_W] = a_send_cat(0, 0, 1);
    r[((1 * NS) + 2) * ACT_W +: ACT_W] = a_send_q(1, 0, FMT_FULL);
    return r;
  endfunction

  localparam logic [NNODE*NSTEP*ACT_W-1:0] PROG = build_prog();

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              run_req, run_gnt = 1'b0, run_done = 1'b0;
  logic [3:0]        run_node = '0;
  logic [NRX-1:0]    rx_valid = '0, rx_ready;
  logic [W-1:0]      rx_data [NRX];
  logic [NTX-1:0]    tx_valid, tx_ready = '0;
  logic [W-1:0]      tx_data;
  logic [NQ-1:0]     q_push, q_pop, q_full = '0, q_empty = '1;
  logic [W-1:0]      q_push_data;
  logic [W-1:0]      q_head [NQ];
  logic [NSYM-1:0]   mon_req, mon_allow = '0, mon_fire;
  logic              in_node, finished, fired, q_stall;
  logic [3:0]        cur_node;

  int checks = 0, failures = 0;

  conv_thread #(.W(W), .NRX(NRX), .NTX(NTX), .NQ(NQ), .NSYM(NSYM), .NNODE(NNODE),
                .NSTEP(NSTEP), .NODE_W(4), .PROG(PROG)) dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic step;
    @(negedge clk);
    #1;
  endtask

  // hand the thread a node in this cycle
  task automatic grant(input int n);
    check(run_req, "thread asks for a node");
    run_gnt  = 1'b1;
    run_node = 4'(n);
    @(posedge clk);
    #1 run_gnt = 1'b0;
  endtask

  initial begin
    rx_data[0] = '0; rx_data[1] = '0;
    q_head[0] = '0;  q_head[1] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    step();
    check(run_req && !in_node && !finished, "asks for a node after reset");
    grant(0);
    step();
    check(in_node && cur_node == 4'd0, "inside node 0");
    // receive into a full queue: held back
    q_full[0] = 1'b1;
    rx_valid[0] = 1'b1;
    rx_data[0]  = 32'hCAFE_0001;
    #1 check(!rx_ready[0] && q_stall && q_push == '0, "receive waits while queue 0 is full");
    step();
    check(!rx_ready[0], "still waiting");
    q_full[0] = 1'b0;
    #1 check(rx_ready[0] && !q_stall, "receive proceeds when there is room");
    check(q_push == 2'b01 && q_push_data == 32'hCAFE_0001 && fired, "content pushed to queue 0");
    step();
    rx_valid[0] = 1'b0;
    // monitored control send
    tx_ready[0] = 1'b1;
    #1 check(mon_req == 2'b10 && tx_valid == '0 && mon_fire == '0, "monitored send waits for allow");
    step();
    check(tx_valid == '0, "still waiting for allow");
    mon_allow = 2'b10;
    #1 check(tx_valid == 2'b01 && tx_data == 32'd1, "control message generated once allowed");
    check(mon_fire == 2'b10, "fire reported to the monitor");
    step();
    mon_allow = '0;
    tx_ready = '0;
    // step 2 is the end of node 0: one cycle later the thread asks again
    #1 check(!run_req && mon_fire == '0, "end of the node reached");
    step();
    check(run_req && mon_fire == '0, "asks for the next node after the last action");
    grant(1);
    step();
    check(cur_node == 4'd1, "inside node 1");
    // chop: upper half of queue 1's head; waits while queue 1 is empty
    tx_ready[1] = 1'b1;
    #1 check(tx_valid == '0, "send waits for its queue head");
    q_empty[1] = 1'b0;
    q_head[1]  = 32'h1234_ABCD;
    #1 check(tx_valid == 2'b10 && tx_data == 32'h0000_1234, "chop: upper half");
    check(q_pop == 2'b10, "queue 1 popped");
    step();
    tx_ready[1] = 1'b0;
    q_head[1]   = 32'h0000_5678;
    // merge: needs both heads
    tx_ready[0] = 1'b1;
    #1 check(tx_valid == '0, "merge waits for queue 0");
    q_empty[0] = 1'b0;
    q_head[0]  = 32'h0000_9ABC;
    #1 check(tx_valid == 2'b01 && tx_data == 32'h9ABC_5678, "merge: two lower halves joined");
    check(q_pop == 2'b11, "both queues popped");
    step();
    tx_ready[0] = 1'b0;
    q_empty[1]  = 1'b1;
    q_head[0]   = 32'hDEAD_BEEF;
    // relay, with the component slow to take it: valid must stay
    #1 check(tx_valid == 2'b10 && tx_data == 32'hDEAD_BEEF && q_pop == '0, "relay offered, not yet popped");
    step();
    check(tx_valid == 2'b10 && tx_data == 32'hDEAD_BEEF, "relay still offered");
    tx_ready[1] = 1'b1;
    #1 check(q_pop == 2'b01 && fired, "relay taken and queue 0 popped");
    step();
    tx_ready[1] = 1'b0;
    q_empty[0] = 1'b1;
    #1 check(run_req && !in_node, "node 1 finished");
    run_done = 1'b1;
    step();
    step();
    check(finished && !run_req, "finished at the end of the path");
    run_done = 1'b0;
    step();
    step();
    check(!finished && run_req, "resumes when the path grows");
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
