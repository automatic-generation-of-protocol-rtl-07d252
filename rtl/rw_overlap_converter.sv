// rw_overlap_converter: bus controller for two masters with 32-bit data and
// a slave with 16-bit data, where a read of one master and a write of the
// other may overlap on the bus (separate read and write wires).
//
// HMSC nodes: A-D are the request combinations (m1 reqW/reqR with m2
// reqW/reqR), E-H the transfers that follow them:
//   E  m1 writes (ack, data, done); m2 gets noack
//   F  m1 reads  (ack, data, done); m2 gets noack
//   G  m2 reads and m1 writes, overlapped
//   H  m1 reads and m2 writes, overlapped
// Dynamic bus sizing: a master's 32-bit write data is chopped into D1
// (upper half) and D2 (lower half) for the slave, each half through its own
// queue; the slave's D1 and D2 of a read are merged into the master's data.
// startR/startW to the slave and ack/noack/done to the masters are generated.
// Two behavioural specifications keep the overlapped transfers from
// colliding: in G done must reach the reading master m2 before startW goes
// to the slave, in H done must reach the reading master m1 before startW
// goes to the slave (two-state automata: done, then startW, alternating).
//
// Interface: channel numbers RW_RX_*/RW_TX_* in conv_ex_pkg, valid/ready
// pairs with W bits of content (16-bit values in the low half), control
// messages carry 1; at least one clock cycle per action.  Node contents,
// the split into D1/D2 and the two orderings follow the method's example;
// handshake, queue depth and which half is D1 are this design's choice.
`include "conv_prog.svh"

module rw_overlap_converter
  import conv_pkg::*, conv_ex_pkg::*;
#(
  parameter int W      = 32,
  parameter int PLEN   = 32,
  parameter int QDEPTH = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [RW_NRX-1:0]       rx_valid,
  input  logic [W-1:0]            rx_data [RW_NRX],
  output logic [RW_NRX-1:0]       rx_ready,
  output logic [RW_NTX-1:0]       tx_valid,
  output logic [W-1:0]            tx_data [RW_NTX],
  input  logic [RW_NTX-1:0]       tx_ready,
  input  logic                    path_we,
  input  logic [$clog2(PLEN)-1:0] path_waddr,
  input  logic [3:0]              path_wnode,
  input  logic [$clog2(PLEN):0]   path_len,
  output logic [RW_NTHR-1:0]      finished,
  output logic [3:0]              cur_node [RW_NTHR],
  output logic [RW_NTHR-1:0]      in_node,
  output logic                    stat_run_wait,
  output logic                    stat_mon_block,
  output logic                    stat_q_stall
);

  localparam int NT = RW_NTHR, NN = RW_NNODE, NS = RW_NSTEP, NTR = 2;
  // queues: write halves (E, G by m1, H by m2) and read halves (F, G, H)
  localparam int Q_E1 = 0, Q_E2 = 1, Q_F1 = 2, Q_F2 = 3, Q_GR1 = 4, Q_GR2 = 5,
                 Q_GW1 = 6, Q_GW2 = 7, Q_HR1 = 8, Q_HR2 = 9, Q_HW1 = 10, Q_HW2 = 11;

  function automatic logic [NT*NN*NS*ACT_W-1:0] build_prog();
    logic [NT*NN*NS*ACT_W-1:0] r;
    r = '0;   // all steps OP_END
    // master m1
    `PSET(RW_T_M1, NODE_A, 0, a_recv(RW_RX_M1_REQW_A))
    `PSET(RW_T_M1, NODE_B, 0, a_recv(RW_RX_M1_REQR_B))
    `PSET(RW_T_M1, NODE_C, 0, a_recv(RW_RX_M1_REQW_C))
    `PSET(RW_T_M1, NODE_D, 0, a_recv(RW_RX_M1_REQR_D))
    `PSET(RW_T_M1, NODE_E, 0, a_send(RW_TX_M1_ACK_E))
    `PSET(RW_T_M1, NODE_E, 1, a_recv_q2(RW_RX_M1_DATA_E, Q_E1, Q_E2))
    `PSET(RW_T_M1, NODE_E, 2, a_send(RW_TX_M1_DONE_E))
    `PSET(RW_T_M1, NODE_F, 0, a_send(RW_TX_M1_ACK_F))
    `PSET(RW_T_M1, NODE_F, 1, a_send_cat(RW_TX_M1_DATA_F, Q_F1, Q_F2))
    `PSET(RW_T_M1, NODE_F, 2, a_send(RW_TX_M1_DONE_F))
    `PSET(RW_T_M1, NODE_G, 0, a_send(RW_TX_M1_ACK_G))
    `PSET(RW_T_M1, NODE_G, 1, a_recv_q2(RW_RX_M1_DATA_G, Q_GW1, Q_GW2))
    `PSET(RW_T_M1, NODE_G, 2, a_send(RW_TX_M1_DONE_G))
    `PSET(RW_T_M1, NODE_H, 0, a_send(RW_TX_M1_ACK_H))
    `PSET(RW_T_M1, NODE_H, 1, a_send_cat(RW_TX_M1_DATA_H, Q_HR1, Q_HR2))
    `PSET(RW_T_M1, NODE_H, 2, a_mon(a_send(RW_TX_M1_DONE_H), RW_SYM_DONE_H))
    // slave
    `PSET(RW_T_S, NODE_E, 0, a_send(RW_TX_S_STARTW_E))
    `PSET(RW_T_S, NODE_E, 1, a_send_q(RW_TX_S_D1_E, Q_E1, FMT_HI))
    `PSET(RW_T_S, NODE_E, 2, a_send_q(RW_TX_S_D2_E, Q_E2, FMT_LO))
    `PSET(RW_T_S, NODE_F, 0, a_send(RW_TX_S_STARTR_F))
    `PSET(RW_T_S, NODE_F, 1, a_recv_q(RW_RX_S_D1_F, Q_F1))
    `PSET(RW_T_S, NODE_F, 2, a_recv_q(RW_RX_S_D2_F, Q_F2))
    `PSET(RW_T_S, NODE_G, 0, a_send(RW_TX_S_STARTR_G))
    `PSET(RW_T_S, NODE_G, 1, a_recv_q(RW_RX_S_D1_G, Q_GR1))
    `PSET(RW_T_S, NODE_G, 2, a_recv_q(RW_RX_S_D2_G, Q_GR2))
    `PSET(RW_T_S, NODE_G, 3, a_mon(a_send(RW_TX_S_STARTW_G), RW_SYM_STARTW_G))
    `PSET(RW_T_S, NODE_G, 4, a_send_q(RW_TX_S_D1_G, Q_GW1, FMT_HI))
    `PSET(RW_T_S, NODE_G, 5, a_send_q(RW_TX_S_D2_G, Q_GW2, FMT_LO))
    `PSET(RW_T_S, NODE_H, 0, a_send(RW_TX_S_STARTR_H))
    `PSET(RW_T_S, NODE_H, 1, a_recv_q(RW_RX_S_D1_H, Q_HR1))
    `PSET(RW_T_S, NODE_H, 2, a_recv_q(RW_RX_S_D2_H, Q_HR2))
    `PSET(RW_T_S, NODE_H, 3, a_mon(a_send(RW_TX_S_STARTW_H), RW_SYM_STARTW_H))
    `PSET(RW_T_S, NODE_H, 4, a_send_q(RW_TX_S_D1_H, Q_HW1, FMT_HI))
    `PSET(RW_T_S, NODE_H, 5, a_send_q(RW_TX_S_D2_H, Q_HW2, FMT_LO))
    // master m2
    `PSET(RW_T_M2, NODE_A, 0, a_recv(RW_RX_M2_REQW_A))
    `PSET(RW_T_M2, NODE_B, 0, a_recv(RW_RX_M2_REQR_B))
    `PSET(RW_T_M2, NODE_C, 0, a_recv(RW_RX_M2_REQR_C))
    `PSET(RW_T_M2, NODE_D, 0, a_recv(RW_RX_M2_REQW_D))
    `PSET(RW_T_M2, NODE_E, 0, a_send(RW_TX_M2_NOACK_E))
    `PSET(RW_T_M2, NODE_F, 0, a_send(RW_TX_M2_NOACK_F))
    `PSET(RW_T_M2, NODE_G, 0, a_send(RW_TX_M2_ACK_G))
    `PSET(RW_T_M2, NODE_G, 1, a_send_cat(RW_TX_M2_DATA_G, Q_GR1, Q_GR2))
    `PSET(RW_T_M2, NODE_G, 2, a_mon(a_send(RW_TX_M2_DONE_G), RW_SYM_DONE_G))
    `PSET(RW_T_M2, NODE_H, 0, a_send(RW_TX_M2_ACK_H))
    `PSET(RW_T_M2, NODE_H, 1, a_recv_q2(RW_RX_M2_DATA_H, Q_HW1, Q_HW2))
    `PSET(RW_T_M2, NODE_H, 2, a_send(RW_TX_M2_DONE_H))
    return r;
  endfunction

  // monitor 0: node G, monitor 1: node H; each: done, then startW, alternating
  localparam logic [2*NTR*TR_W-1:0] MON = {tr(1, RW_SYM_STARTW_H, 0), tr(0, RW_SYM_DONE_H, 1),
                                           tr(1, RW_SYM_STARTW_G, 0), tr(0, RW_SYM_DONE_G, 1)};

  localparam logic [NT*NN*NS*ACT_W-1:0] PROG = build_prog();

  conv_core #(
    .W(W), .NTHR(NT), .NRX(RW_NRX), .NTX(RW_NTX), .NQ(RW_NQ), .NSYM(4),
    .NNODE(NN), .NSTEP(NS), .NODE_W(4), .PLEN(PLEN), .QDEPTH(QDEPTH),
    .NTR(NTR), .PROG(PROG), .MON_TR(MON)
  ) u_core (
    .clk, .rst_n, .rx_valid, .rx_data, .rx_ready, .tx_valid, .tx_data, .tx_ready,
    .path_we, .path_waddr, .path_wnode, .path_len,
    .finished, .cur_node, .in_node, .stat_run_wait, .stat_mon_block, .stat_q_stall
  );

endmodule
