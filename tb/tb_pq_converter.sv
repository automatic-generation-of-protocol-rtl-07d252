// tb_pq_converter: self-checking testbench for pq_converter.
//
// P sends four data tokens; Q is made slower each round.  Checks that Q's
// msg carries P's data, that msg never precedes data, that P may get its ack
// before Q has its msg (independent threads), and that the RUN channel makes
// thread P wait while thread Q is still in the previous copy of the node.
//
// The components are modelled as concurrent processes, each walking through
// its own view of the nodes on the path; messages are valid/ready handshakes
// driven on the falling clock edge and sampled just before the rising edge.
// A watchdog ends the run with a failure if the exchange does not complete.
`timescale 1ns/1ps
module tb_pq_converter;
  import conv_pkg::*;
  import conv_ex_pkg::*;

  localparam int W = 32, PLEN = 32;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [PQ_NRX-1:0]       rx_valid = '0;
  logic [W-1:0]            rx_data [PQ_NRX];
  logic [PQ_NRX-1:0]       rx_ready;
  logic [PQ_NTX-1:0]       tx_valid;
  logic [W-1:0]            tx_data [PQ_NTX];
  logic [PQ_NTX-1:0]       tx_ready = '0;
  logic                    path_we = 1'b0;
  logic [$clog2(PLEN)-1:0] path_waddr = '0;
  logic [3:0]              path_wnode = '0;
  logic [$clog2(PLEN):0]   path_len = '0;
  logic [PQ_NTHR-1:0]      finished;
  logic [3:0]              cur_node [PQ_NTHR];
  logic [PQ_NTHR-1:0]      in_node;
  logic                    stat_run_wait, stat_mon_block, stat_q_stall;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  pq_converter dut (.*);

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
    for (int i = 0; i < PQ_NRX; i++) rx_data[i] = '0;
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  localparam int N = 4;
  logic [W-1:0] vals [N];
  int t_data [N], t_msg [N], t_pack [N];
  int early_ack = 0;

  initial begin
    for (int k = 0; k < N; k++) vals[k] = $urandom();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    load_path('{0, 0, 0, 0});
    fork
      begin : proc_p
        logic [W-1:0] d; int at;
        for (int k = 0; k < N; k++) begin
          send(PQ_RX_P_REQ, 1, at);
          send(PQ_RX_P_DATA, vals[k], t_data[k]);
          recv(PQ_TX_P_ACK, d, t_pack[k]);
          check(d == 1, "ack to P is a control message");
        end
      end
      begin : proc_q
        logic [W-1:0] d; int at;
        for (int k = 0; k < N; k++) begin
          repeat (k * 3) @(negedge clk);       // Q gets slower each time
          send(PQ_RX_Q_READY, 1, at);
          recv(PQ_TX_Q_MSG, d, t_msg[k]);
          check(d == vals[k], $sformatf("msg %0d carries P's data", k));
          recv(PQ_TX_Q_FINISH, d, at);
          check(d == 1, "finish is a control message");
          send(PQ_RX_Q_ACK, 1, at);
        end
      end
    join
    repeat (4) @(negedge clk);
    for (int k = 0; k < N; k++) begin
      check(t_msg[k] > t_data[k], $sformatf("msg %0d only after data received", k));
      if (t_pack[k] < t_msg[k]) early_ack++;
    end
    check(finished == '1, "both threads reached the end of the path");
    check(early_ack > 0, "P got its ack before Q got msg at least once");
    check(n_run_wait > 0, "thread P waited for Q to leave the earlier copy of the node");
    $display("early_ack=%0d run_wait_cycles=%0d", early_ack, n_run_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
