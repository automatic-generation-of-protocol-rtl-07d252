// tb_split2_bus_converter: self-checking testbench for split2_bus_converter.
//
// Runs B F E (m0 granted, split by m1, resumed), then C D, A D, B E.  Checks
// the merged 32-bit read data of both masters and the order req (from m1),
// split (to m0), grant (to m1) in node F, with m0 slow to take the split so
// that the monitor must hold grant back.
//
// The components are modelled as concurrent processes, each walking through
// its own view of the nodes on the path; messages are valid/ready handshakes
// driven on the falling clock edge and sampled just before the rising edge.
// A watchdog ends the run with a failure if the exchange does not complete.
`timescale 1ns/1ps
module tb_split2_bus_converter;
  import conv_pkg::*;
  import conv_ex_pkg::*;

  localparam int W = 32, PLEN = 32;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [S2_NRX-1:0]       rx_valid = '0;
  logic [W-1:0]            rx_data [S2_NRX];
  logic [S2_NRX-1:0]       rx_ready;
  logic [S2_NTX-1:0]       tx_valid;
  logic [W-1:0]            tx_data [S2_NTX];
  logic [S2_NTX-1:0]       tx_ready = '0;
  logic                    path_we = 1'b0;
  logic [$clog2(PLEN)-1:0] path_waddr = '0;
  logic [3:0]              path_wnode = '0;
  logic [$clog2(PLEN):0]   path_len = '0;
  logic [S2_NTHR-1:0]      finished;
  logic [3:0]              cur_node [S2_NTHR];
  logic [S2_NTHR-1:0]      in_node;
  logic                    stat_run_wait, stat_mon_block, stat_q_stall;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  split2_bus_converter dut (.*);

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
    for (int i = 0; i < S2_NRX; i++) rx_data[i] = '0;
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  int path [] = '{NODE_B, NODE_F, NODE_E, NODE_C, NODE_D, NODE_A, NODE_D, NODE_B, NODE_E};
  logic [W-1:0] rd_m0 [$], rd_m1 [$];
  int t_req, t_split, t_grant, n_read = 0;

  task automatic slave_read(input int st, input int c1, input int c2, ref logic [W-1:0] q [$]);
    logic [15:0] h1, h2; logic [W-1:0] d; int at;
    recv(st, d, at);
    h1 = 16'($urandom()); h2 = 16'($urandom());
    q.push_back({h1, h2});
    send(c1, W'(h1), at);
    send(c2, W'(h2), at);
  endtask

  task automatic m_read(input int dat, input int ack, ref logic [W-1:0] q [$]);
    logic [W-1:0] d, w; int at;
    recv(dat, w, at);
    wait (q.size() > 0);
    check(w == q.pop_front(), "merged read data");
    n_read++;
    recv(ack, d, at);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    load_path(path);
    fork
      begin : m0
        logic [W-1:0] d; int at;
        foreach (path[i]) begin
          case (path[i])
            NODE_B: begin send(S2_RX_M0_REQ_B, 1, at); recv(S2_TX_M0_GRANT_B, d, at); end
            NODE_C: begin send(S2_RX_M0_REQ_C, 1, at); recv(S2_TX_M0_NOGRANT_C, d, at); end
            NODE_E: m_read(S2_TX_M0_DATA_E, S2_TX_M0_ACK_E, rd_m0);
            NODE_F: begin
              repeat (10) @(negedge clk);     // m0 is slow to take the split
              recv(S2_TX_M0_SPLIT_F, d, t_split);
              recv(S2_TX_M0_RESUME_F, d, at);
            end
            default: ;
          endcase
        end
      end
      begin : m1
        logic [W-1:0] d; int at;
        foreach (path[i]) begin
          case (path[i])
            NODE_A: begin send(S2_RX_M1_REQ_A, 1, at); recv(S2_TX_M1_GRANT_A, d, at); end
            NODE_C: begin send(S2_RX_M1_REQ_C, 1, at); recv(S2_TX_M1_GRANT_C, d, at); end
            NODE_D: m_read(S2_TX_M1_DATA_D, S2_TX_M1_ACK_D, rd_m1);
            NODE_F: begin
              send(S2_RX_M1_REQ_F, 1, t_req);
              recv(S2_TX_M1_GRANT_F, d, t_grant);
              m_read(S2_TX_M1_DATA_F, S2_TX_M1_ACK_F, rd_m1);
            end
            default: ;
          endcase
        end
      end
      begin : slave
        foreach (path[i]) begin
          case (path[i])
            NODE_D: slave_read(S2_TX_S_START_D, S2_RX_S_D1_D, S2_RX_S_D2_D, rd_m1);
            NODE_E: slave_read(S2_TX_S_START_E, S2_RX_S_D1_E, S2_RX_S_D2_E, rd_m0);
            NODE_F: slave_read(S2_TX_S_START_F, S2_RX_S_D1_F, S2_RX_S_D2_F, rd_m1);
            default: ;
          endcase
        end
      end
    join
    repeat (4) @(negedge clk);
    check(t_split > t_req, "split to m0 only after m1's req");
    check(t_grant > t_split, "grant to m1 only after split to m0");
    check(n_read == 5, "five merged reads");
    check(n_mon_block > 0, "the monitor held grant back");
    check(finished == '1, "all threads reached the end of the path");
    $display("mon_block_cycles=%0d", n_mon_block);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
