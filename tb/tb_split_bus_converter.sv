// tb_split_bus_converter: self-checking testbench for split_bus_converter.
//
// Drives the path A B A C E F G F H A B A C D of the document's simulation
// with a slave that lags behind.  Checks that both transfers reach the slave
// unchanged, that the master receives its nogrant/grant/split/resume/ok in
// path order, and that the master's split is generated before the slave's
// own split arrives, as in the reference trace.
//
// The components are modelled as concurrent processes, each walking through
// its own view of the nodes on the path; messages are valid/ready handshakes
// driven on the falling clock edge and sampled just before the rising edge.
// A watchdog ends the run with a failure if the exchange does not complete.
`timescale 1ns/1ps
module tb_split_bus_converter;
  import conv_pkg::*;
  import conv_ex_pkg::*;

  localparam int W = 32, PLEN = 32;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [SB_NRX-1:0]       rx_valid = '0;
  logic [W-1:0]            rx_data [SB_NRX];
  logic [SB_NRX-1:0]       rx_ready;
  logic [SB_NTX-1:0]       tx_valid;
  logic [W-1:0]            tx_data [SB_NTX];
  logic [SB_NTX-1:0]       tx_ready = '0;
  logic                    path_we = 1'b0;
  logic [$clog2(PLEN)-1:0] path_waddr = '0;
  logic [3:0]              path_wnode = '0;
  logic [$clog2(PLEN):0]   path_len = '0;
  logic [SB_NTHR-1:0]      finished;
  logic [3:0]              cur_node [SB_NTHR];
  logic [SB_NTHR-1:0]      in_node;
  logic                    stat_run_wait, stat_mon_block, stat_q_stall;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  split_bus_converter dut (.*);

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
    for (int i = 0; i < SB_NRX; i++) rx_data[i] = '0;
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  // The path of the document's simulation run: A B A C E F G F H A B A C D
  int path [] = '{NODE_A, NODE_B, NODE_A, NODE_C, NODE_E, NODE_F, NODE_G, NODE_F,
                  NODE_H, NODE_A, NODE_B, NODE_A, NODE_C, NODE_D};
  logic [W-1:0] xfer [$];
  int m_split_at, s_split_at, m_seq [$];

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    load_path(path);
    fork
      begin : master
        logic [W-1:0] d, v; int at;
        foreach (path[i]) begin
          case (path[i])
            NODE_A: send(SB_RX_M_REQ_A, 1, at);
            NODE_B: begin recv(SB_TX_M_NOGRANT_B, d, at); m_seq.push_back(NODE_B); end
            NODE_C: begin
              recv(SB_TX_M_GRANT_C, d, at); m_seq.push_back(NODE_C);
              v = $urandom(); xfer.push_back(v);
              send(SB_RX_M_TRANSFER_C, v, at);
            end
            NODE_D: begin recv(SB_TX_M_OK_D, d, at); m_seq.push_back(NODE_D); end
            NODE_E: begin recv(SB_TX_M_SPLIT_E, d, m_split_at); m_seq.push_back(NODE_E); end
            NODE_F: send(SB_RX_M_REQ_F, 1, at);
            NODE_G: begin recv(SB_TX_M_NOGRANT_G, d, at); m_seq.push_back(NODE_G); end
            NODE_H: begin recv(SB_TX_M_RESUME_H, d, at); m_seq.push_back(NODE_H); end
            default: ;
          endcase
        end
      end
      begin : slave
        logic [W-1:0] d; int at, k;
        k = 0;
        foreach (path[i]) begin
          case (path[i])
            NODE_C: begin
              repeat (k == 0 ? 80 : 2) @(negedge clk);   // slave lags behind
              recv(SB_TX_S_TRANSFER_C, d, at);
              check(d == xfer[k], $sformatf("transfer %0d relayed to the slave", k));
              k++;
            end
            NODE_D: send(SB_RX_S_OK_D, 1, at);
            NODE_E: send(SB_RX_S_SPLIT_E, 1, s_split_at);
            NODE_H: send(SB_RX_S_RESUME_H, 1, at);
            default: ;
          endcase
        end
      end
    join
    repeat (4) @(negedge clk);
    check(m_seq.size() == 8, "master received 8 control messages");
    // the master's control messages come in the order of the path's nodes
    begin
      int k = 0;
      foreach (path[i]) begin
        if (path[i] inside {NODE_B, NODE_C, NODE_D, NODE_E, NODE_G, NODE_H}) begin
          check(k < m_seq.size() && m_seq[k] == path[i],
                $sformatf("master control message %0d belongs to node %0d", k, path[i]));
          k++;
        end
      end
    end
    check(m_split_at < s_split_at, "split reached the master before the slave sent it");
    check(finished == '1, "both threads reached the end of the path");
    check(n_run_wait > 0, "master thread waited for an earlier copy of a node");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
