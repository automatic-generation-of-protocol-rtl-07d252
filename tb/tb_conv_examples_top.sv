// tb_conv_examples_top: end-to-end testbench for conv_examples_top.
//
// Runs all six example converters at once, at the top's default size (no
// parameter is overridden), each with components modelled as concurrent
// processes walking through their views of an HMSC path:
//   P/Q            four exchanges, Q slower each round
//   Ack-Nack/Pull  transfers with error recoveries, a slow receiver
//   split bus      transfers, splits and resumes; the slave stalls in node D
//                  while the master runs ahead of it
//   priority bus   the document's path B D A D C E A D
//   r/w overlap    all four request combinations, overlapped G and H
//   split2 bus     grant, split by the higher-priority master, resume
// Each scenario checks message contents and orders as in the converter's
// own testbench.  On top of that the testbench counts, at the top's ports,
// every mechanism the converters are built from and fails if one of them
// never happened: relaying an important message, chopping one into halves,
// merging two halves, generating control messages, a monitor holding an
// action back, a thread waiting for an earlier copy of a node to end,
// threads inside different nodes at the same time, branching of the path,
// a control message generated before the message it stands for arrived,
// and every thread finishing its path.  It also checks that no queue ever
// filled up.
// Handshakes are driven on the falling edge and sampled 1 ns later.  A
// watchdog ends a stuck run with a failure.
`timescale 1ns/1ps
module tb_conv_examples_top;
  import conv_pkg::*;
  import conv_ex_pkg::*;

  localparam int W = 32, PLEN = 32;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [PQ_NRX-1:0]       pq_rx_valid = '0;
  logic [W-1:0]            pq_rx_data [PQ_NRX];
  logic [PQ_NRX-1:0]       pq_rx_ready;
  logic [PQ_NTX-1:0]       pq_tx_valid;
  logic [W-1:0]            pq_tx_data [PQ_NTX];
  logic [PQ_NTX-1:0]       pq_tx_ready = '0;
  logic                    pq_path_we = 1'b0;
  logic [$clog2(PLEN)-1:0] pq_path_waddr = '0;
  logic [3:0]              pq_path_wnode = '0;
  logic [$clog2(PLEN):0]   pq_path_len = '0;
  logic [PQ_NTHR-1:0]      pq_finished;
  logic [3:0]              pq_cur_node [PQ_NTHR];
  logic [PQ_NTHR-1:0]      pq_in_node;
  logic [2:0]              pq_stat;
  logic [AP_NRX-1:0]       ap_rx_valid = '0;
  logic [W-1:0]            ap_rx_data [AP_NRX];
  logic [AP_NRX-1:0]       ap_rx_ready;
  logic [AP_NTX-1:0]       ap_tx_valid;
  logic [W-1:0]            ap_tx_data [AP_NTX];
  logic [AP_NTX-1:0]       ap_tx_ready = '0;
  logic                    ap_path_we = 1'b0;
  logic [$clog2(PLEN)-1:0] ap_path_waddr = '0;
  logic [3:0]              ap_path_wnode = '0;
  logic [$clog2(PLEN):0]   ap_path_len = '0;
  logic [AP_NTHR-1:0]      ap_finished;
  logic [3:0]              ap_cur_node [AP_NTHR];
  logic [AP_NTHR-1:0]      ap_in_node;
  logic [2:0]              ap_stat;
  logic [SB_NRX-1:0]       sb_rx_valid = '0;
  logic [W-1:0]            sb_rx_data [SB_NRX];
  logic [SB_NRX-1:0]       sb_rx_ready;
  logic [SB_NTX-1:0]       sb_tx_valid;
  logic [W-1:0]            sb_tx_data [SB_NTX];
  logic [SB_NTX-1:0]       sb_tx_ready = '0;
  logic                    sb_path_we = 1'b0;
  logic [$clog2(PLEN)-1:0] sb_path_waddr = '0;
  logic [3:0]              sb_path_wnode = '0;
  logic [$clog2(PLEN):0]   sb_path_len = '0;
  logic [SB_NTHR-1:0]      sb_finished;
  logic [3:0]              sb_cur_node [SB_NTHR];
  logic [SB_NTHR-1:0]      sb_in_node;
  logic [2:0]              sb_stat;
  logic [PB_NRX-1:0]       pb_rx_valid = '0;
  logic [W-1:0]            pb_rx_data [PB_NRX];
  logic [PB_NRX-1:0]       pb_rx_ready;
  logic [PB_NTX-1:0]       pb_tx_valid;
  logic [W-1:0]            pb_tx_data [PB_NTX];
  logic [PB_NTX-1:0]       pb_tx_ready = '0;
  logic                    pb_path_we = 1'b0;
  logic [$clog2(PLEN)-1:0] pb_path_waddr = '0;
  logic [3:0]              pb_path_wnode = '0;
  logic [$clog2(PLEN):0]   pb_path_len = '0;
  logic [PB_NTHR-1:0]      pb_finished;
  logic [3:0]              pb_cur_node [PB_NTHR];
  logic [PB_NTHR-1:0]      pb_in_node;
  logic [2:0]              pb_stat;
  logic [RW_NRX-1:0]       rw_rx_valid = '0;
  logic [W-1:0]            rw_rx_data [RW_NRX];
  logic [RW_NRX-1:0]       rw_rx_ready;
  logic [RW_NTX-1:0]       rw_tx_valid;
  logic [W-1:0]            rw_tx_data [RW_NTX];
  logic [RW_NTX-1:0]       rw_tx_ready = '0;
  logic                    rw_path_we = 1'b0;
  logic [$clog2(PLEN)-1:0] rw_path_waddr = '0;
  logic [3:0]              rw_path_wnode = '0;
  logic [$clog2(PLEN):0]   rw_path_len = '0;
  logic [RW_NTHR-1:0]      rw_finished;
  logic [3:0]              rw_cur_node [RW_NTHR];
  logic [RW_NTHR-1:0]      rw_in_node;
  logic [2:0]              rw_stat;
  logic [S2_NRX-1:0]       s2_rx_valid = '0;
  logic [W-1:0]            s2_rx_data [S2_NRX];
  logic [S2_NRX-1:0]       s2_rx_ready;
  logic [S2_NTX-1:0]       s2_tx_valid;
  logic [W-1:0]            s2_tx_data [S2_NTX];
  logic [S2_NTX-1:0]       s2_tx_ready = '0;
  logic                    s2_path_we = 1'b0;
  logic [$clog2(PLEN)-1:0] s2_path_waddr = '0;
  logic [3:0]              s2_path_wnode = '0;
  logic [$clog2(PLEN):0]   s2_path_len = '0;
  logic [S2_NTHR-1:0]      s2_finished;
  logic [3:0]              s2_cur_node [S2_NTHR];
  logic [S2_NTHR-1:0]      s2_in_node;
  logic [2:0]              s2_stat;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  conv_examples_top dut (
    .clk, .rst_n,
    .pq_rx_valid,
    .pq_rx_data,
    .pq_rx_ready,
    .pq_tx_valid,
    .pq_tx_data,
    .pq_tx_ready,
    .pq_path_we,
    .pq_path_waddr,
    .pq_path_wnode,
    .pq_path_len,
    .pq_finished,
    .pq_cur_node,
    .pq_in_node,
    .pq_stat,
    .ap_rx_valid,
    .ap_rx_data,
    .ap_rx_ready,
    .ap_tx_valid,
    .ap_tx_data,
    .ap_tx_ready,
    .ap_path_we,
    .ap_path_waddr,
    .ap_path_wnode,
    .ap_path_len,
    .ap_finished,
    .ap_cur_node,
    .ap_in_node,
    .ap_stat,
    .sb_rx_valid,
    .sb_rx_data,
    .sb_rx_ready,
    .sb_tx_valid,
    .sb_tx_data,
    .sb_tx_ready,
    .sb_path_we,
    .sb_path_waddr,
    .sb_path_wnode,
    .sb_path_len,
    .sb_finished,
    .sb_cur_node,
    .sb_in_node,
    .sb_stat,
    .pb_rx_valid,
    .pb_rx_data,
    .pb_rx_ready,
    .pb_tx_valid,
    .pb_tx_data,
    .pb_tx_ready,
    .pb_path_we,
    .pb_path_waddr,
    .pb_path_wnode,
    .pb_path_len,
    .pb_finished,
    .pb_cur_node,
    .pb_in_node,
    .pb_stat,
    .rw_rx_valid,
    .rw_rx_data,
    .rw_rx_ready,
    .rw_tx_valid,
    .rw_tx_data,
    .rw_tx_ready,
    .rw_path_we,
    .rw_path_waddr,
    .rw_path_wnode,
    .rw_path_len,
    .rw_finished,
    .rw_cur_node,
    .rw_in_node,
    .rw_stat,
    .s2_rx_valid,
    .s2_rx_data,
    .s2_rx_ready,
    .s2_tx_valid,
    .s2_tx_data,
    .s2_tx_ready,
    .s2_path_we,
    .s2_path_waddr,
    .s2_path_wnode,
    .s2_path_len,
    .s2_finished,
    .s2_cur_node,
    .s2_in_node,
    .s2_stat
  );

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (cycle %0d)", what, cycle);
    end
  endtask

  // ----------------------------------------------------------------------
  // mechanism counters at the top's ports
  // ----------------------------------------------------------------------
  int n_relay = 0, n_chop = 0, n_merge = 0, n_ctrl = 0;
  always @(posedge clk) begin
      if (pq_tx_valid[PQ_TX_Q_MSG] && pq_tx_ready[PQ_TX_Q_MSG]) n_relay++;
      if (ap_tx_valid[AP_TX_R_DATA] && ap_tx_ready[AP_TX_R_DATA]) n_relay++;
      if (sb_tx_valid[SB_TX_S_TRANSFER_C] && sb_tx_ready[SB_TX_S_TRANSFER_C]) n_relay++;
      if (pb_tx_valid[PB_TX_S_TRANSFER_D] && pb_tx_ready[PB_TX_S_TRANSFER_D]) n_relay++;
      if (pb_tx_valid[PB_TX_S_TRANSFER_E] && pb_tx_ready[PB_TX_S_TRANSFER_E]) n_relay++;
      if (rw_tx_valid[RW_TX_S_D1_E] && rw_tx_ready[RW_TX_S_D1_E]) n_chop++;
      if (rw_tx_valid[RW_TX_S_D2_E] && rw_tx_ready[RW_TX_S_D2_E]) n_chop++;
      if (rw_tx_valid[RW_TX_S_D1_G] && rw_tx_ready[RW_TX_S_D1_G]) n_chop++;
      if (rw_tx_valid[RW_TX_S_D2_G] && rw_tx_ready[RW_TX_S_D2_G]) n_chop++;
      if (rw_tx_valid[RW_TX_S_D1_H] && rw_tx_ready[RW_TX_S_D1_H]) n_chop++;
      if (rw_tx_valid[RW_TX_S_D2_H] && rw_tx_ready[RW_TX_S_D2_H]) n_chop++;
      if (rw_tx_valid[RW_TX_M1_DATA_F] && rw_tx_ready[RW_TX_M1_DATA_F]) n_merge++;
      if (rw_tx_valid[RW_TX_M1_DATA_H] && rw_tx_ready[RW_TX_M1_DATA_H]) n_merge++;
      if (rw_tx_valid[RW_TX_M2_DATA_G] && rw_tx_ready[RW_TX_M2_DATA_G]) n_merge++;
      if (s2_tx_valid[S2_TX_M0_DATA_E] && s2_tx_ready[S2_TX_M0_DATA_E]) n_merge++;
      if (s2_tx_valid[S2_TX_M1_DATA_D] && s2_tx_ready[S2_TX_M1_DATA_D]) n_merge++;
      if (s2_tx_valid[S2_TX_M1_DATA_F] && s2_tx_ready[S2_TX_M1_DATA_F]) n_merge++;
      if (sb_tx_valid[SB_TX_M_SPLIT_E] && sb_tx_ready[SB_TX_M_SPLIT_E]) n_ctrl++;
      if (sb_tx_valid[SB_TX_M_RESUME_H] && sb_tx_ready[SB_TX_M_RESUME_H]) n_ctrl++;
      if (sb_tx_valid[SB_TX_M_OK_D] && sb_tx_ready[SB_TX_M_OK_D]) n_ctrl++;
      if (pq_tx_valid[PQ_TX_P_ACK] && pq_tx_ready[PQ_TX_P_ACK]) n_ctrl++;
      if (ap_tx_valid[AP_TX_S_NACK] && ap_tx_ready[AP_TX_S_NACK]) n_ctrl++;
      if (pb_tx_valid[PB_TX_M1_GRANT_D] && pb_tx_ready[PB_TX_M1_GRANT_D]) n_ctrl++;
      if (pb_tx_valid[PB_TX_M2_GRANT_E] && pb_tx_ready[PB_TX_M2_GRANT_E]) n_ctrl++;
      if (s2_tx_valid[S2_TX_M0_SPLIT_F] && s2_tx_ready[S2_TX_M0_SPLIT_F]) n_ctrl++;
  end

  // ======================================================================
  // PQ: its own handshake tasks, counters and scenario
  // ======================================================================
  if (1) begin : g_pq
    logic done = 1'b0;

    task automatic send(input int ch, input logic [W-1:0] d, output int at);
      bit hs;
      @(negedge clk);
      pq_rx_valid[ch] = 1'b1;
      pq_rx_data[ch]  = d;
      do begin
        #1 hs = pq_rx_ready[ch];
        at = cycle;
        @(negedge clk);
      end while (!hs);
      pq_rx_valid[ch] = 1'b0;
    endtask

    task automatic recv(input int ch, output logic [W-1:0] d, output int at);
      bit hs;
      @(negedge clk);
      pq_tx_ready[ch] = 1'b1;
      do begin
        #1 hs = pq_tx_valid[ch];
        d  = pq_tx_data[ch];
        at = cycle;
        @(negedge clk);
      end while (!hs);
      pq_tx_ready[ch] = 1'b0;
    endtask

    task automatic load_path(input int nodes[]);
      foreach (nodes[i]) begin
        @(negedge clk);
        pq_path_we    = 1'b1;
        pq_path_waddr = ($clog2(PLEN))'(i);
        pq_path_wnode = 4'(nodes[i]);
      end
      @(negedge clk);
      pq_path_we  = 1'b0;
      pq_path_len = ($clog2(PLEN)+1)'(nodes.size());
    endtask

    int n_run_wait = 0, n_mon_block = 0, n_q_stall = 0, n_ahead = 0, n_succ = 0;
    bit seen [16][16];
    logic [3:0] last0 = '0;
    bit     have0 = 1'b0;
    logic   in0_q = 1'b0;
    always @(posedge clk) begin
      if (pq_stat[0]) n_run_wait  <= n_run_wait + 1;
      if (pq_stat[1]) n_mon_block <= n_mon_block + 1;
      if (pq_stat[2]) n_q_stall   <= n_q_stall + 1;
      // threads inside different nodes at the same time
      for (int a = 0; a < PQ_NTHR; a++)
        for (int b = a + 1; b < PQ_NTHR; b++)
          if (pq_in_node[a] && pq_in_node[b] && pq_cur_node[a] != pq_cur_node[b])
            n_ahead <= n_ahead + 1;
      // node successions taken by thread 0
      in0_q <= pq_in_node[0];
      if (pq_in_node[0] && !in0_q) begin
        if (have0 && !seen[last0][pq_cur_node[0]]) begin
          seen[last0][pq_cur_node[0]] = 1'b1;
          n_succ <= n_succ + 1;
        end
        last0 <= pq_cur_node[0];
        have0 <= 1'b1;
      end
    end

    // number of distinct nodes followed by two or more different nodes
    function automatic int branch_points();
      int n = 0;
      for (int a = 0; a < 16; a++) begin
        int k = 0;
        for (int b = 0; b < 16; b++) if (seen[a][b]) k++;
        if (k > 1) n++;
      end
      return n;
    endfunction

    initial for (int i = 0; i < PQ_NRX; i++) pq_rx_data[i] = '0;

    localparam int N = 4;
    logic [W-1:0] vals [N];
    int t_data [N], t_msg [N], t_pack [N];
    int early_ack = 0;

    initial begin
      for (int k = 0; k < N; k++) vals[k] = $urandom();
      wait (rst_n);
      @(negedge clk);
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
            check(d == vals[k], $sformatf("[pq] msg %0d carries P's data", k));
            recv(PQ_TX_Q_FINISH, d, at);
            check(d == 1, "finish is a control message");
            send(PQ_RX_Q_ACK, 1, at);
          end
        end
      join
      repeat (4) @(negedge clk);
      for (int k = 0; k < N; k++) begin
        check(t_msg[k] > t_data[k], $sformatf("[pq] msg %0d only after data received", k));
        if (t_pack[k] < t_msg[k]) early_ack++;
      end
      check(pq_finished == '1, "both threads reached the end of the path");
      check(early_ack > 0, "P got its ack before Q got msg at least once");
      check(n_run_wait > 0, "thread P waited for Q to leave the earlier copy of the node");
      $display("[pq] early_ack=%0d run_wait_cycles=%0d", early_ack, n_run_wait);
      done = 1'b1;
    end

  end

  // ======================================================================
  // AP: its own handshake tasks, counters and scenario
  // ======================================================================
  if (1) begin : g_ap
    logic done = 1'b0;

    task automatic send(input int ch, input logic [W-1:0] d, output int at);
      bit hs;
      @(negedge clk);
      ap_rx_valid[ch] = 1'b1;
      ap_rx_data[ch]  = d;
      do begin
        #1 hs = ap_rx_ready[ch];
        at = cycle;
        @(negedge clk);
      end while (!hs);
      ap_rx_valid[ch] = 1'b0;
    endtask

    task automatic recv(input int ch, output logic [W-1:0] d, output int at);
      bit hs;
      @(negedge clk);
      ap_tx_ready[ch] = 1'b1;
      do begin
        #1 hs = ap_tx_valid[ch];
        d  = ap_tx_data[ch];
        at = cycle;
        @(negedge clk);
      end while (!hs);
      ap_tx_ready[ch] = 1'b0;
    endtask

    task automatic load_path(input int nodes[]);
      foreach (nodes[i]) begin
        @(negedge clk);
        ap_path_we    = 1'b1;
        ap_path_waddr = ($clog2(PLEN))'(i);
        ap_path_wnode = 4'(nodes[i]);
      end
      @(negedge clk);
      ap_path_we  = 1'b0;
      ap_path_len = ($clog2(PLEN)+1)'(nodes.size());
    endtask

    int n_run_wait = 0, n_mon_block = 0, n_q_stall = 0, n_ahead = 0, n_succ = 0;
    bit seen [16][16];
    logic [3:0] last0 = '0;
    bit     have0 = 1'b0;
    logic   in0_q = 1'b0;
    always @(posedge clk) begin
      if (ap_stat[0]) n_run_wait  <= n_run_wait + 1;
      if (ap_stat[1]) n_mon_block <= n_mon_block + 1;
      if (ap_stat[2]) n_q_stall   <= n_q_stall + 1;
      // threads inside different nodes at the same time
      for (int a = 0; a < AP_NTHR; a++)
        for (int b = a + 1; b < AP_NTHR; b++)
          if (ap_in_node[a] && ap_in_node[b] && ap_cur_node[a] != ap_cur_node[b])
            n_ahead <= n_ahead + 1;
      // node successions taken by thread 0
      in0_q <= ap_in_node[0];
      if (ap_in_node[0] && !in0_q) begin
        if (have0 && !seen[last0][ap_cur_node[0]]) begin
          seen[last0][ap_cur_node[0]] = 1'b1;
          n_succ <= n_succ + 1;
        end
        last0 <= ap_cur_node[0];
        have0 <= 1'b1;
      end
    end

    // number of distinct nodes followed by two or more different nodes
    function automatic int branch_points();
      int n = 0;
      for (int a = 0; a < 16; a++) begin
        int k = 0;
        for (int b = 0; b < 16; b++) if (seen[a][b]) k++;
        if (k > 1) n++;
      end
      return n;
    endfunction

    initial for (int i = 0; i < AP_NRX; i++) ap_rx_data[i] = '0;

    int path [] = '{AP_SETUP, AP_TRANSFER, AP_RELEASE, AP_SETUP, AP_ERROR, AP_ERROR,
                    AP_TRANSFER, AP_RELEASE, AP_SETUP, AP_TRANSFER, AP_RELEASE};
    logic [W-1:0] sent [$];
    int t_data [$], t_ack [$];
    int n_err = 0;

    initial begin
      wait (rst_n);
      @(negedge clk);
      load_path(path);
      fork
        begin : sender
          logic [W-1:0] d, v; int at;
          foreach (path[i]) begin
            case (path[i])
              AP_TRANSFER: begin
                v = $urandom();
                sent.push_back(v);
                send(AP_RX_S_MSG, v, at);
                recv(AP_TX_S_ACK, d, at);
                t_ack.push_back(at);
                check(d == 1, "ack is a control message");
              end
              AP_ERROR: begin
                send(AP_RX_S_ERR, 1, at);
                recv(AP_TX_S_NACK, d, at);
                check(d == 1, "nack is generated");
                n_err++;
              end
              default: ;
            endcase
          end
        end
        begin : receiver
          logic [W-1:0] d; int at, k;
          k = 0;
          foreach (path[i]) begin
            case (path[i])
              AP_SETUP:    send(AP_RX_R_PULL, 1, at);
              AP_TRANSFER: begin
                repeat (6) @(negedge clk);          // slow receiver
                recv(AP_TX_R_DATA, d, at);
                t_data.push_back(at);
                check(d == sent[k], $sformatf("[ap] data %0d carries the sender's msg", k));
                k++;
              end
              AP_RELEASE:  begin
                recv(AP_TX_R_END, d, at);
                check(d == 1, "end is generated");
              end
              default: ;
            endcase
          end
        end
      join
      repeat (4) @(negedge clk);
      check(t_ack.size() == 3 && t_data.size() == 3, "three transfers");
      foreach (t_ack[k])
        check(t_ack[k] > t_data[k], $sformatf("[ap] ack %0d only after data was delivered", k));
      check(n_err == 2, "two error recoveries");
      check(ap_finished == '1, "both threads reached the end of the path");
      check(n_mon_block > 0, "the monitor held ack back");
      $display("[ap] mon_block_cycles=%0d", n_mon_block);
      done = 1'b1;
    end

  end

  // ======================================================================
  // SB: its own handshake tasks, counters and scenario
  // ======================================================================
  if (1) begin : g_sb
    logic done = 1'b0;

    task automatic send(input int ch, input logic [W-1:0] d, output int at);
      bit hs;
      @(negedge clk);
      sb_rx_valid[ch] = 1'b1;
      sb_rx_data[ch]  = d;
      do begin
        #1 hs = sb_rx_ready[ch];
        at = cycle;
        @(negedge clk);
      end while (!hs);
      sb_rx_valid[ch] = 1'b0;
    endtask

    task automatic recv(input int ch, output logic [W-1:0] d, output int at);
      bit hs;
      @(negedge clk);
      sb_tx_ready[ch] = 1'b1;
      do begin
        #1 hs = sb_tx_valid[ch];
        d  = sb_tx_data[ch];
        at = cycle;
        @(negedge clk);
      end while (!hs);
      sb_tx_ready[ch] = 1'b0;
    endtask

    task automatic load_path(input int nodes[]);
      foreach (nodes[i]) begin
        @(negedge clk);
        sb_path_we    = 1'b1;
        sb_path_waddr = ($clog2(PLEN))'(i);
        sb_path_wnode = 4'(nodes[i]);
      end
      @(negedge clk);
      sb_path_we  = 1'b0;
      sb_path_len = ($clog2(PLEN)+1)'(nodes.size());
    endtask

    int n_run_wait = 0, n_mon_block = 0, n_q_stall = 0, n_ahead = 0, n_succ = 0;
    bit seen [16][16];
    logic [3:0] last0 = '0;
    bit     have0 = 1'b0;
    logic   in0_q = 1'b0;
    always @(posedge clk) begin
      if (sb_stat[0]) n_run_wait  <= n_run_wait + 1;
      if (sb_stat[1]) n_mon_block <= n_mon_block + 1;
      if (sb_stat[2]) n_q_stall   <= n_q_stall + 1;
      // threads inside different nodes at the same time
      for (int a = 0; a < SB_NTHR; a++)
        for (int b = a + 1; b < SB_NTHR; b++)
          if (sb_in_node[a] && sb_in_node[b] && sb_cur_node[a] != sb_cur_node[b])
            n_ahead <= n_ahead + 1;
      // node successions taken by thread 0
      in0_q <= sb_in_node[0];
      if (sb_in_node[0] && !in0_q) begin
        if (have0 && !seen[last0][sb_cur_node[0]]) begin
          seen[last0][sb_cur_node[0]] = 1'b1;
          n_succ <= n_succ + 1;
        end
        last0 <= sb_cur_node[0];
        have0 <= 1'b1;
      end
    end

    // number of distinct nodes followed by two or more different nodes
    function automatic int branch_points();
      int n = 0;
      for (int a = 0; a < 16; a++) begin
        int k = 0;
        for (int b = 0; b < 16; b++) if (seen[a][b]) k++;
        if (k > 1) n++;
      end
      return n;
    endfunction

    initial for (int i = 0; i < SB_NRX; i++) sb_rx_data[i] = '0;

    // The path of the document's simulation run: A B A C E F G F H A B A C D
    int path [] = '{NODE_A, NODE_C, NODE_D,
                    NODE_A, NODE_C, NODE_E, NODE_F, NODE_H, NODE_A, NODE_C, NODE_E, NODE_F, NODE_H,
                    NODE_A, NODE_C, NODE_E, NODE_F, NODE_H, NODE_A, NODE_C, NODE_E, NODE_F, NODE_H,
                    NODE_A, NODE_C, NODE_E, NODE_F, NODE_G, NODE_F, NODE_H, NODE_A, NODE_B};
    logic [W-1:0] xfer [$];
    int m_split_at, s_split_at, m_seq [$];

    initial begin
      wait (rst_n);
      @(negedge clk);
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
                check(d == xfer[k], $sformatf("[sb] transfer %0d relayed to the slave", k));
                k++;
              end
              NODE_D: begin repeat (60) @(negedge clk); send(SB_RX_S_OK_D, 1, at); end
              NODE_E: send(SB_RX_S_SPLIT_E, 1, s_split_at);
              NODE_H: send(SB_RX_S_RESUME_H, 1, at);
              default: ;
            endcase
          end
        end
      join
      repeat (4) @(negedge clk);
      check(m_seq.size() == 19, "master received 19 control messages");
      // the master's control messages come in the order of the path's nodes
      begin
        int k = 0;
        foreach (path[i]) begin
          if (path[i] inside {NODE_B, NODE_C, NODE_D, NODE_E, NODE_G, NODE_H}) begin
            check(k < m_seq.size() && m_seq[k] == path[i],
                  $sformatf("[sb] master control message %0d belongs to node %0d", k, path[i]));
            k++;
          end
        end
      end
      check(m_split_at < s_split_at, "split reached the master before the slave sent it");
      check(sb_finished == '1, "both threads reached the end of the path");
      check(n_run_wait > 0, "master thread waited for an earlier copy of a node");
      done = 1'b1;
    end

  end

  // ======================================================================
  // PB: its own handshake tasks, counters and scenario
  // ======================================================================
  if (1) begin : g_pb
    logic done = 1'b0;

    task automatic send(input int ch, input logic [W-1:0] d, output int at);
      bit hs;
      @(negedge clk);
      pb_rx_valid[ch] = 1'b1;
      pb_rx_data[ch]  = d;
      do begin
        #1 hs = pb_rx_ready[ch];
        at = cycle;
        @(negedge clk);
      end while (!hs);
      pb_rx_valid[ch] = 1'b0;
    endtask

    task automatic recv(input int ch, output logic [W-1:0] d, output int at);
      bit hs;
      @(negedge clk);
      pb_tx_ready[ch] = 1'b1;
      do begin
        #1 hs = pb_tx_valid[ch];
        d  = pb_tx_data[ch];
        at = cycle;
        @(negedge clk);
      end while (!hs);
      pb_tx_ready[ch] = 1'b0;
    endtask

    task automatic load_path(input int nodes[]);
      foreach (nodes[i]) begin
        @(negedge clk);
        pb_path_we    = 1'b1;
        pb_path_waddr = ($clog2(PLEN))'(i);
        pb_path_wnode = 4'(nodes[i]);
      end
      @(negedge clk);
      pb_path_we  = 1'b0;
      pb_path_len = ($clog2(PLEN)+1)'(nodes.size());
    endtask

    int n_run_wait = 0, n_mon_block = 0, n_q_stall = 0, n_ahead = 0, n_succ = 0;
    bit seen [16][16];
    logic [3:0] last0 = '0;
    bit     have0 = 1'b0;
    logic   in0_q = 1'b0;
    always @(posedge clk) begin
      if (pb_stat[0]) n_run_wait  <= n_run_wait + 1;
      if (pb_stat[1]) n_mon_block <= n_mon_block + 1;
      if (pb_stat[2]) n_q_stall   <= n_q_stall + 1;
      // threads inside different nodes at the same time
      for (int a = 0; a < PB_NTHR; a++)
        for (int b = a + 1; b < PB_NTHR; b++)
          if (pb_in_node[a] && pb_in_node[b] && pb_cur_node[a] != pb_cur_node[b])
            n_ahead <= n_ahead + 1;
      // node successions taken by thread 0
      in0_q <= pb_in_node[0];
      if (pb_in_node[0] && !in0_q) begin
        if (have0 && !seen[last0][pb_cur_node[0]]) begin
          seen[last0][pb_cur_node[0]] = 1'b1;
          n_succ <= n_succ + 1;
        end
        last0 <= pb_cur_node[0];
        have0 <= 1'b1;
      end
    end

    // number of distinct nodes followed by two or more different nodes
    function automatic int branch_points();
      int n = 0;
      for (int a = 0; a < 16; a++) begin
        int k = 0;
        for (int b = 0; b < 16; b++) if (seen[a][b]) k++;
        if (k > 1) n++;
      end
      return n;
    endfunction

    initial for (int i = 0; i < PB_NRX; i++) pb_rx_data[i] = '0;

    // The path of the document's simulation run: B D A D C E A D
    int path [] = '{NODE_B, NODE_D, NODE_A, NODE_D, NODE_C, NODE_E, NODE_A, NODE_D};
    logic [W-1:0] exp_d [$], exp_e [$];
    int n_grant1 = 0, n_grant2 = 0, n_nogrant1 = 0, n_nogrant2 = 0;

    initial begin
      wait (rst_n);
      @(negedge clk);
      load_path(path);
      fork
        begin : m1
          logic [W-1:0] d, v; int at;
          foreach (path[i]) begin
            case (path[i])
              NODE_A: send(PB_RX_M1_REQ1_A, 1, at);
              NODE_B: send(PB_RX_M1_REQ1_B, 1, at);
              NODE_C: send(PB_RX_M1_REQ0_C, 1, at);
              NODE_D: begin
                recv(PB_TX_M1_GRANT_D, d, at); n_grant1++;
                v = $urandom(); exp_d.push_back(v);
                send(PB_RX_M1_TRANSFER_D, v, at);
                recv(PB_TX_M1_OK_D, d, at);
              end
              NODE_E: begin recv(PB_TX_M1_NOGRANT_E, d, at); n_nogrant1++; end
              default: ;
            endcase
          end
        end
        begin : m2
          logic [W-1:0] d, v; int at;
          foreach (path[i]) begin
            case (path[i])
              NODE_A: send(PB_RX_M2_REQ1_A, 1, at);
              NODE_B: send(PB_RX_M2_REQ0_B, 1, at);
              NODE_C: send(PB_RX_M2_REQ1_C, 1, at);
              NODE_D: begin recv(PB_TX_M2_NOGRANT_D, d, at); n_nogrant2++; end
              NODE_E: begin
                recv(PB_TX_M2_GRANT_E, d, at); n_grant2++;
                v = $urandom(); exp_e.push_back(v);
                send(PB_RX_M2_TRANSFER_E, v, at);
                recv(PB_TX_M2_OK_E, d, at);
              end
              default: ;
            endcase
          end
        end
        begin : slave
          logic [W-1:0] d; int at, kd, ke;
          kd = 0; ke = 0;
          foreach (path[i]) begin
            case (path[i])
              NODE_D: begin
                repeat (5) @(negedge clk);
                recv(PB_TX_S_TRANSFER_D, d, at);
                check(d == exp_d[kd], $sformatf("[pb] m1 transfer %0d reaches the slave", kd));
                kd++;
                send(PB_RX_S_OK_D, 1, at);
              end
              NODE_E: begin
                recv(PB_TX_S_TRANSFER_E, d, at);
                check(d == exp_e[ke], $sformatf("[pb] m2 transfer %0d reaches the slave", ke));
                ke++;
                send(PB_RX_S_OK_E, 1, at);
              end
              default: ;
            endcase
          end
        end
      join
      repeat (4) @(negedge clk);
      check(n_grant1 == 3 && n_nogrant2 == 3, "m1 granted in the three D nodes");
      check(n_grant2 == 1 && n_nogrant1 == 1, "m2 granted in the E node");
      check(pb_finished == '1, "all threads reached the end of the path");
      done = 1'b1;
    end

  end

  // ======================================================================
  // RW: its own handshake tasks, counters and scenario
  // ======================================================================
  if (1) begin : g_rw
    logic done = 1'b0;

    task automatic send(input int ch, input logic [W-1:0] d, output int at);
      bit hs;
      @(negedge clk);
      rw_rx_valid[ch] = 1'b1;
      rw_rx_data[ch]  = d;
      do begin
        #1 hs = rw_rx_ready[ch];
        at = cycle;
        @(negedge clk);
      end while (!hs);
      rw_rx_valid[ch] = 1'b0;
    endtask

    task automatic recv(input int ch, output logic [W-1:0] d, output int at);
      bit hs;
      @(negedge clk);
      rw_tx_ready[ch] = 1'b1;
      do begin
        #1 hs = rw_tx_valid[ch];
        d  = rw_tx_data[ch];
        at = cycle;
        @(negedge clk);
      end while (!hs);
      rw_tx_ready[ch] = 1'b0;
    endtask

    task automatic load_path(input int nodes[]);
      foreach (nodes[i]) begin
        @(negedge clk);
        rw_path_we    = 1'b1;
        rw_path_waddr = ($clog2(PLEN))'(i);
        rw_path_wnode = 4'(nodes[i]);
      end
      @(negedge clk);
      rw_path_we  = 1'b0;
      rw_path_len = ($clog2(PLEN)+1)'(nodes.size());
    endtask

    int n_run_wait = 0, n_mon_block = 0, n_q_stall = 0, n_ahead = 0, n_succ = 0;
    bit seen [16][16];
    logic [3:0] last0 = '0;
    bit     have0 = 1'b0;
    logic   in0_q = 1'b0;
    always @(posedge clk) begin
      if (rw_stat[0]) n_run_wait  <= n_run_wait + 1;
      if (rw_stat[1]) n_mon_block <= n_mon_block + 1;
      if (rw_stat[2]) n_q_stall   <= n_q_stall + 1;
      // threads inside different nodes at the same time
      for (int a = 0; a < RW_NTHR; a++)
        for (int b = a + 1; b < RW_NTHR; b++)
          if (rw_in_node[a] && rw_in_node[b] && rw_cur_node[a] != rw_cur_node[b])
            n_ahead <= n_ahead + 1;
      // node successions taken by thread 0
      in0_q <= rw_in_node[0];
      if (rw_in_node[0] && !in0_q) begin
        if (have0 && !seen[last0][rw_cur_node[0]]) begin
          seen[last0][rw_cur_node[0]] = 1'b1;
          n_succ <= n_succ + 1;
        end
        last0 <= rw_cur_node[0];
        have0 <= 1'b1;
      end
    end

    // number of distinct nodes followed by two or more different nodes
    function automatic int branch_points();
      int n = 0;
      for (int a = 0; a < 16; a++) begin
        int k = 0;
        for (int b = 0; b < 16; b++) if (seen[a][b]) k++;
        if (k > 1) n++;
      end
      return n;
    endfunction

    initial for (int i = 0; i < RW_NRX; i++) rw_rx_data[i] = '0;

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
      wait (rst_n);
      @(negedge clk);
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
      check(rw_finished == '1, "all threads reached the end of the path");
      $display("[rw] chop=%0d merge=%0d mon_block_cycles=%0d", n_chop, n_merge, n_mon_block);
      done = 1'b1;
    end

  end

  // ======================================================================
  // S2: its own handshake tasks, counters and scenario
  // ======================================================================
  if (1) begin : g_s2
    logic done = 1'b0;

    task automatic send(input int ch, input logic [W-1:0] d, output int at);
      bit hs;
      @(negedge clk);
      s2_rx_valid[ch] = 1'b1;
      s2_rx_data[ch]  = d;
      do begin
        #1 hs = s2_rx_ready[ch];
        at = cycle;
        @(negedge clk);
      end while (!hs);
      s2_rx_valid[ch] = 1'b0;
    endtask

    task automatic recv(input int ch, output logic [W-1:0] d, output int at);
      bit hs;
      @(negedge clk);
      s2_tx_ready[ch] = 1'b1;
      do begin
        #1 hs = s2_tx_valid[ch];
        d  = s2_tx_data[ch];
        at = cycle;
        @(negedge clk);
      end while (!hs);
      s2_tx_ready[ch] = 1'b0;
    endtask

    task automatic load_path(input int nodes[]);
      foreach (nodes[i]) begin
        @(negedge clk);
        s2_path_we    = 1'b1;
        s2_path_waddr = ($clog2(PLEN))'(i);
        s2_path_wnode = 4'(nodes[i]);
      end
      @(negedge clk);
      s2_path_we  = 1'b0;
      s2_path_len = ($clog2(PLEN)+1)'(nodes.size());
    endtask

    int n_run_wait = 0, n_mon_block = 0, n_q_stall = 0, n_ahead = 0, n_succ = 0;
    bit seen [16][16];
    logic [3:0] last0 = '0;
    bit     have0 = 1'b0;
    logic   in0_q = 1'b0;
    always @(posedge clk) begin
      if (s2_stat[0]) n_run_wait  <= n_run_wait + 1;
      if (s2_stat[1]) n_mon_block <= n_mon_block + 1;
      if (s2_stat[2]) n_q_stall   <= n_q_stall + 1;
      // threads inside different nodes at the same time
      for (int a = 0; a < S2_NTHR; a++)
        for (int b = a + 1; b < S2_NTHR; b++)
          if (s2_in_node[a] && s2_in_node[b] && s2_cur_node[a] != s2_cur_node[b])
            n_ahead <= n_ahead + 1;
      // node successions taken by thread 0
      in0_q <= s2_in_node[0];
      if (s2_in_node[0] && !in0_q) begin
        if (have0 && !seen[last0][s2_cur_node[0]]) begin
          seen[last0][s2_cur_node[0]] = 1'b1;
          n_succ <= n_succ + 1;
        end
        last0 <= s2_cur_node[0];
        have0 <= 1'b1;
      end
    end

    // number of distinct nodes followed by two or more different nodes
    function automatic int branch_points();
      int n = 0;
      for (int a = 0; a < 16; a++) begin
        int k = 0;
        for (int b = 0; b < 16; b++) if (seen[a][b]) k++;
        if (k > 1) n++;
      end
      return n;
    endfunction

    initial for (int i = 0; i < S2_NRX; i++) s2_rx_data[i] = '0;

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
      wait (rst_n);
      @(negedge clk);
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
      check(s2_finished == '1, "all threads reached the end of the path");
      $display("[s2] mon_block_cycles=%0d", n_mon_block);
      done = 1'b1;
    end

  end

  initial begin
    int run_wait, mon_block, q_stall, ahead, branches;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (g_pq.done && g_ap.done && g_sb.done && g_pb.done && g_rw.done && g_s2.done);
    run_wait  = g_pq.n_run_wait + g_ap.n_run_wait + g_sb.n_run_wait + g_pb.n_run_wait + g_rw.n_run_wait + g_s2.n_run_wait;
    mon_block = g_pq.n_mon_block + g_ap.n_mon_block + g_sb.n_mon_block + g_pb.n_mon_block + g_rw.n_mon_block + g_s2.n_mon_block;
    q_stall   = g_pq.n_q_stall + g_ap.n_q_stall + g_sb.n_q_stall + g_pb.n_q_stall + g_rw.n_q_stall + g_s2.n_q_stall;
    ahead     = g_pq.n_ahead + g_ap.n_ahead + g_sb.n_ahead + g_pb.n_ahead + g_rw.n_ahead + g_s2.n_ahead;
    branches  = g_pq.branch_points() + g_ap.branch_points() + g_sb.branch_points() +
                g_pb.branch_points() + g_rw.branch_points() + g_s2.branch_points();
    $display("mechanisms: relay=%0d chop=%0d merge=%0d control=%0d mon_block=%0d run_wait=%0d q_stall=%0d ahead=%0d branch_points=%0d",
             n_relay, n_chop, n_merge, n_ctrl, mon_block, run_wait, q_stall, ahead, branches);
    check(n_relay > 0,   "mechanism: relay of an important message");
    check(n_chop > 0,    "mechanism: chop into two halves");
    check(n_merge > 0,   "mechanism: merge of two halves");
    check(n_ctrl > 0,    "mechanism: generated control messages");
    check(mon_block > 0, "mechanism: monitor held an action back");
    check(g_ap.n_mon_block > 0 && g_rw.n_mon_block > 0 && g_s2.n_mon_block > 0,
          "mechanism: every monitored converter was held back by its monitor");
    check(run_wait > 0,  "mechanism: wait for an earlier copy of a node");
    // Cycle-bounded execution never lets more than one message of these
    // examples wait in a queue, so a full queue must never hold a receive
    // back here; the stall itself is exercised in the core's testbench.
    check(q_stall == 0,  "no receive held back by a full queue");
    check(ahead > 0,     "mechanism: threads inside different nodes at once");
    check(branches > 0,  "mechanism: branching path");
    check(g_sb.m_split_at < g_sb.s_split_at, "mechanism: split generated ahead of the slave");
    check(pq_finished == '1 && ap_finished == '1 && sb_finished == '1 &&
          pb_finished == '1 && rw_finished == '1 && s2_finished == '1,
          "every thread of every converter finished its path");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired (done pq=%0d ap=%0d sb=%0d pb=%0d rw=%0d s2=%0d)",
             g_pq.done, g_ap.done, g_sb.done, g_pb.done, g_rw.done, g_s2.done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
