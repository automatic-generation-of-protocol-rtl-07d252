// tb_rw_overlap_converter: self-checking testbench for rw_overlap_converter.
//
// Runs every request combination once (A E, B F, C G, D H) and G again.
// Checks the 32-to-16-bit chopping of writes and merging of reads, and that
// in the overlapped nodes G and H the slave gets startW only after the
// reading master got done; the reading master is slow so that the monitors
// have to hold startW back.
//
// The components are modelled as concurrent processes, each walking through
// its own view of the nodes on the path; messages are valid/ready handshakes
// driven on the falling clock edge and sampled just before the rising edge.
// A watchdog ends the run with a failure if the exchange does not complete.
`timescale 1ns/1ps
module tb_rw_overlap_converter;
  import conv_pkg::*;
  import conv_ex_pkg::*;

  localparam int W = 32, PLEN = 32;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [RW_NRX-1:0]       rx_valid = '0;
  logic [W-1:0]            rx_data [RW_NRX];
  logic [RW_NRX-1:0]       rx_ready;
  logic [RW_NTX-1:0]       tx_valid;
  logic [W-1:0]            tx_data [RW_NTX];
  logic [RW_NTX-1:0]       tx_ready = '0;
  logic                    path_we = 1'b0;
  logic [$clog2(PLEN)-1:0] path_waddr = '0;
  logic [3:0]              path_wnode = '0;
  logic [$clog2(PLEN):0]   path_len = '0;
  logic [RW_NTHR-1:0]      finished;
  logic [3:0]              cur_node [RW_NTHR];
  logic [RW_NTHR-1:0]      in_node;
  logic                    stat_run_wait, stat_mon_block, stat_q_stall;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  rw_overlap_converter dut (.*);

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
    for (int i = 0; i < RW_NRX; i++) rx_data[i] = '0;
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  int path [] = '{NODE_A, NODE_E, NODE_B, NODE_F, NODE_C, NODE_G, NODE_D, NODE_H,
                  NODE_C, NODE_G};
  logic [W-1:0] wr_m1 [$], wr_m2 [$], rd_m1 [$], rd_m2 [$];
  int t_done_g [$], t_startw_g [$], t_done_h [$], t_startw_h [$];
  int n_chop = 0, n_merge = 0;

  // the slave answers a read with two 16-bit halves
  task automatic slave_read(input int c1, input int c2, ref logic [W-1:0] q [$]);
    logic [15:0] h1, h2; int at;
    h1 = 16'($urandom()); h2 = 16'($urandom());
    q.push_back({h1, h2});
    send(c1, W'(h1), at);
    send(c2, W'(h2), at);
  endtask

  // the slave takes a write as two 16-bit halves
  task automatic slave_write(input int c1, input int c2, input logic [W-1:0] v, input string who);
    logic [W-1:0] d1, d2; int at;
    recv(c1, d1, at);
    recv(c2, d2, at);
    check(d1 == W'(v[31:16]) && d2 == W'(v[15:0]), {"chopped write of ", who});
    n_chop++;
  endtask

  // a master write: ack, data, done
  task automatic m_write(input int ack, input int dat, input int done,
                         ref logic [W-1:0] q [$]);
    logic [W-1:0] d, v; int at;
    recv(ack, d, at);
    v = $urandom(); q.push_back(v);
    send(dat, v, at);
    recv(done, d, at);
  endtask

  // a master read: ack, data, done; checks the merged word
  task automatic m_read(input int ack, input int dat, input int done, input int slow,
                        ref logic [W-1:0] q [$], output int t_done);
    logic [W-1:0] d, w; int at;
    recv(ack, d, at);
    recv(dat, w, at);
    wait (q.size() > 0);
    check(w == q.pop_front(), "merged read data");
    n_merge++;
    repeat (slow) @(negedge clk);
    recv(done, d, t_done);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    load_path(path);
    fork
      begin : m1
        logic [W-1:0] d; int at;
        foreach (path[i]) begin
          case (path[i])
            NODE_A: send(RW_RX_M1_REQW_A, 1, at);
            NODE_B: send(RW_RX_M1_REQR_B, 1, at);
            NODE_C: send(RW_RX_M1_REQW_C, 1, at);
            NODE_D: send(RW_RX_M1_REQR_D, 1, at);
            NODE_E: m_write(RW_TX_M1_ACK_E, RW_RX_M1_DATA_E, RW_TX_M1_DONE_E, wr_m1);
            NODE_F: m_read(RW_TX_M1_ACK_F, RW_TX_M1_DATA_F, RW_TX_M1_DONE_F, 0, rd_m1, at);
            NODE_G: m_write(RW_TX_M1_ACK_G, RW_RX_M1_DATA_G, RW_TX_M1_DONE_G, wr_m1);
            NODE_H: begin
              m_read(RW_TX_M1_ACK_H, RW_TX_M1_DATA_H, RW_TX_M1_DONE_H, 8, rd_m1, at);
              t_done_h.push_back(at);
            end
            default: ;
          endcase
        end
      end
      begin : m2
        logic [W-1:0] d; int at;
        foreach (path[i]) begin
          case (path[i])
            NODE_A: send(RW_RX_M2_REQW_A, 1, at);
            NODE_B: send(RW_RX_M2_REQR_B, 1, at);
            NODE_C: send(RW_RX_M2_REQR_C, 1, at);
            NODE_D: send(RW_RX_M2_REQW_D, 1, at);
            NODE_E: recv(RW_TX_M2_NOACK_E, d, at);
            NODE_F: recv(RW_TX_M2_NOACK_F, d, at);
            NODE_G: begin
              m_read(RW_TX_M2_ACK_G, RW_TX_M2_DATA_G, RW_TX_M2_DONE_G, 8, rd_m2, at);
              t_done_g.push_back(at);
            end
            NODE_H: m_write(RW_TX_M2_ACK_H, RW_RX_M2_DATA_H, RW_TX_M2_DONE_H, wr_m2);
            default: ;
          endcase
        end
      end
      begin : slave
        logic [W-1:0] d; int at;
        foreach (path[i]) begin
          case (path[i])
            NODE_E: begin
              recv(RW_TX_S_STARTW_E, d, at);
              wait (wr_m1.size() > 0);
              slave_write(RW_TX_S_D1_E, RW_TX_S_D2_E, wr_m1.pop_front(), "m1 in E");
            end
            NODE_F: begin
              recv(RW_TX_S_STARTR_F, d, at);
              slave_read(RW_RX_S_D1_F, RW_RX_S_D2_F, rd_m1);
            end
            NODE_G: begin
              recv(RW_TX_S_STARTR_G, d, at);
              slave_read(RW_RX_S_D1_G, RW_RX_S_D2_G, rd_m2);
              recv(RW_TX_S_STARTW_G, d, at);
              t_startw_g.push_back(at);
              wait (wr_m1.size() > 0);
              slave_write(RW_TX_S_D1_G, RW_TX_S_D2_G, wr_m1.pop_front(), "m1 in G");
            end
            NODE_H: begin
              recv(RW_TX_S_STARTR_H, d, at);
              slave_read(RW_RX_S_D1_H, RW_RX_S_D2_H, rd_m1);
              recv(RW_TX_S_STARTW_H, d, at);
              t_startw_h.push_back(at);
              wait (wr_m2.size() > 0);
              slave_write(RW_TX_S_D1_H, RW_TX_S_D2_H, wr_m2.pop_front(), "m2 in H");
            end
            default: ;
          endcase
        end
      end
    join
    repeat (4) @(negedge clk);
    check(t_done_g.size() == 2 && t_startw_g.size() == 2, "two overlapped G transfers");
    foreach (t_done_g[k])
      check(t_startw_g[k] > t_done_g[k], "G: startW only after done to m2");
    check(t_done_h.size() == 1 && t_startw_h.size() == 1, "one overlapped H transfer");
    foreach (t_done_h[k])
      check(t_startw_h[k] > t_done_h[k], "H: startW only after done to m1");
    check(n_chop == 4 && n_merge == 4, "four chopped writes and four merged reads");
    check(n_mon_block > 0, "a monitor held startW back");
    check(finished == '1, "all threads reached the end of the path");
    $display("chop=%0d merge=%0d mon_block_cycles=%0d", n_chop, n_merge, n_mon_block);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
