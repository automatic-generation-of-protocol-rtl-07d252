// tb_conv_core: self-checking testbench for conv_core.
//
// A two-thread converter core with a hand-written program and queues only
// two entries deep:
//   node 0: thread 0 receives three words on rx0 into queue 0, thread 1
//           sends them on tx0 (relay)
//   node 1: thread 0 receives rx1 (symbol 0), thread 1 sends tx1 (symbol 1);
//           monitor 0 (s1 then s0) lets rx1 in only after tx1 went out
//   node 2: thread 0 receives rx2 (symbol 2, monitor 1: 0 -s2-> 1)
// The consumer of tx0 is slow, so the third receive must wait for room in
// the queue.  Checks the relayed words, the order forced by monitor 0, the
// queue-full stall and that the threads finish the path 0 1 2 1 0.
//
// The components are modelled as concurrent processes, each walking through
// its own view of the nodes on the path; messages are valid/ready handshakes
// driven on the falling clock edge and sampled just before the rising edge.
// A watchdog ends the run with a failure if the exchange does not complete.
`timescale 1ns/1ps
module tb_conv_core;
  import conv_pkg::*;
  import conv_ex_pkg::*;

  localparam int W = 32, PLEN = 32;
  localparam int CC_NTHR = 2, CC_NRX = 3, CC_NTX = 2, NN = 3, NS = 3;

  function automatic logic [CC_NTHR*NN*NS*ACT_W-1:0] build_prog();
    logic [CC_NTHR*NN*NS*ACT_W-1:0] r;
    r = '0;
    for (int s = 0; s < 3; s++) begin
      r[((0 * NN + 0) * NS + s) * ACT_W +: ACT_W] = a_recv_q(0, 0);
      r[((1 * NN + 0) * NS + s) * ACT_W +: ACT_W] = a_send_q(0, 0, FMT_FULL);
    end
    r[((0 * NN + 1) * NS + 0) * ACT_W +: ACT_W] = a_mon(a_recv(1), 0);
    r[((1 * NN + 1) * NS + 0) * ACT_W +: ACT_W] = a_mon(a_send(1), 1);
    r[((0 * NN + 2) * NS + 0) * ACT_W +: ACT_W] = a_mon(a_recv(2), 2);
    return r;
  endfunction

  localparam logic [CC_NTHR*NN*NS*ACT_W-1:0] PROG = build_prog();
  localparam logic [2*2*TR_W-1:0] MON = {tr(1, 2, 1), tr(0, 2, 1), tr(1, 0, 0), tr(0, 1, 1)};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [CC_NRX-1:0]       rx_valid = '0;
  logic [W-1:0]            rx_data [CC_NRX];
  logic [CC_NRX-1:0]       rx_ready;
  logic [CC_NTX-1:0]       tx_valid;
  logic [W-1:0]            tx_data [CC_NTX];
  logic [CC_NTX-1:0]       tx_ready = '0;
  logic                    path_we = 1'b0;
  logic [$clog2(PLEN)-1:0] path_waddr = '0;
  logic [3:0]              path_wnode = '0;
  logic [$clog2(PLEN):0]   path_len = '0;
  logic [CC_NTHR-1:0]      finished;
  logic [3:0]              cur_node [CC_NTHR];
  logic [CC_NTHR-1:0]      in_node;
  logic                    stat_run_wait, stat_mon_block, stat_q_stall;
  int n_q_stall = 0, n_mon2 = 0;
  logic [1:0] mon1_prev = '0;
  always @(posedge clk) if (stat_q_stall) n_q_stall++;
  // monitor 1 taking its transition 0 -> 1
  always @(posedge clk) begin
    mon1_prev <= dut.u_mon1.state;
    if (rst_n && dut.u_mon1.state == 2'd1 && mon1_prev == 2'd0) n_mon2++;
  end

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  conv_core #(.W(W), .NTHR(CC_NTHR), .NRX(CC_NRX), .NTX(CC_NTX), .NQ(1), .NSYM(3), .NNODE(3), .NSTEP(3), .NODE_W(4), .PLEN(PLEN), .QDEPTH(2), .NTR(2), .PROG(PROG), .MON_TR(MON)) dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (cycle %0d)", what, cycle);
    end
  endtask

  // Component sends message ch with content d; returns the cycle it was taken.
  task automatic send(input int ch, input logic [W-1:0] d, output int at);
    bit hs;
    @(negedge clk);
    rx_valid[ch] = 1'b1;
    rx_data[ch]  = d;
    do begin
      #1 hs = rx_ready[ch];
      at = cycle;
      @(negedge clk);
    end while (!hs);
    rx_valid[ch] = 1'b0;
  endtask

  // Component waits for message ch; returns its content and the cycle.
  task automatic recv(input int ch, output logic [W-1:0] d, output int at);
    bit hs;
    @(negedge clk);
    tx_ready[ch] = 1'b1;
    do begin
      #1 hs = tx_valid[ch];
      d  = tx_data[ch];
      at = cycle;
      @(negedge clk);
    end while (!hs);
    tx_ready[ch] = 1'b0;
  endtask

  task automatic load_path(input int nodes[]);
    foreach (nodes[i]) begin
      @(negedge clk);
      path_we    = 1'b1;
      path_waddr = ($clog2(PLEN))'(i);
      path_wnode = 4'(nodes[i]);
    end
    @(negedge clk);
    path_we  = 1'b0;
    path_len = ($clog2(PLEN)+1)'(nodes.size());
  endtask

  int n_run_wait = 0, n_mon_block = 0;
  always @(posedge clk) begin
    if (stat_run_wait)  n_run_wait  <= n_run_wait + 1;
    if (stat_mon_block) n_mon_block <= n_mon_block + 1;
  end

  initial begin
    for (int i = 0; i < CC_NRX; i++) rx_data[i] = '0;
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  int path [] = '{0, 1, 2, 1, 0};
  logic [W-1:0] sent [$];
  int t_tx1 [$], t_rx1 [$];
  int n_got = 0;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    load_path(path);
    fork
      begin : producer
        logic [W-1:0] v; int at;
        foreach (path[i]) begin
          case (path[i])
            0: repeat (3) begin
                 v = $urandom(); sent.push_back(v);
                 send(0, v, at);
               end
            1: begin send(1, 1, at); t_rx1.push_back(at); end
            2: send(2, 1, at);
            default: ;
          endcase
        end
      end
      begin : consumer
        logic [W-1:0] d; int at;
        foreach (path[i]) begin
          case (path[i])
            0: begin
                 repeat (20) @(negedge clk);       // let the queue fill up
                 repeat (3) begin
                   recv(0, d, at);
                   check(d == sent[n_got], $sformatf("relayed word %0d", n_got));
                   n_got++;
                 end
               end
            1: begin
                 repeat (5) @(negedge clk);
                 recv(1, d, at); t_tx1.push_back(at);
               end
            default: ;
          endcase
        end
      end
    join
    repeat (4) @(negedge clk);
    check(n_got == 6, "six words relayed in order");
    foreach (t_rx1[k]) check(t_rx1[k] > t_tx1[k], $sformatf("node1 copy %0d: receive only after the send", k));
    check(n_q_stall > 0, "a receive was held back by a full queue");
    check(n_mon_block > 0, "monitor 0 held a receive back");
    check(n_mon2 == 1, "monitor 1 followed its symbol once");
    check(finished == '1, "both threads reached the end of the path");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
