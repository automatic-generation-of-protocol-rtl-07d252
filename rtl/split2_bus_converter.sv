// split2_bus_converter: bus controller for two masters m0, m1 (m1 higher
// priority) and a slave with 16-bit data, where m1 may interrupt a
// transaction of m0 with a split.
//
// HMSC nodes:
//   A  m1 sends req, gets grant
//   B  m0 sends req, gets grant
//   C  m0 sends req, gets nogrant; m1 sends req, gets grant
//   D  m1 reads: start to the slave, D1 and D2 back, m1 gets data and ack
//   E  m0 reads: start to the slave, D1 and D2 back, m0 gets data and ack
//   F  m1 interrupts: m0 gets split and later resume; m1 sends req, gets
//      grant, and reads as in D
// The slave's D1 (upper half) and D2 (lower half) are merged into the
// master's 32-bit data.  A behavioural specification orders node F: the
// converter must first receive m1's req, then send split to m0, then send
// grant to m1 (three-state cycle req, split, grant).
//
// Interface: channel numbers S2_RX_*/S2_TX_* in conv_ex_pkg, valid/ready
// pairs with W bits of content, control messages carry 1; at least one
// clock cycle per action.  Node contents and the ordering follow the
// method's example; handshake, queue depth, the 16-bit slave width (taken
// from the read/write overlap example, which has "the same setup") and
// which half is D1 are this design's choice.
`include "conv_prog.svh"

module split2_bus_converter
  import conv_pkg::*, conv_ex_pkg::*;
#(
  parameter int W      = 32,
  parameter int PLEN   = 32,
  parameter int QDEPTH = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [S2_NRX-1:0]       rx_valid,
  input  logic [W-1:0]            rx_data [S2_NRX],
  output logic [S2_NRX-1:0]       rx_ready,
  output logic [S2_NTX-1:0]       tx_valid,
  output logic [W-1:0]            tx_data [S2_NTX],
  input  logic [S2_NTX-1:0]       tx_ready,
  input  logic                    path_we,
  input  logic [$clog2(PLEN)-1:0] path_waddr,
  input  logic [3:0]              path_wnode,
  input  logic [$clog2(PLEN):0]   path_len,
  output logic [S2_NTHR-1:0]      finished,
  output logic [3:0]              cur_node [S2_NTHR],
  output logic [S2_NTHR-1:0]      in_node,
  output logic                    stat_run_wait,
  output logic                    stat_mon_block,
  output logic                    stat_q_stall
);

  localparam int NT = S2_NTHR, NN = S2_NNODE, NS = S2_NSTEP, NTR = 3;
  localparam int Q_D1 = 0, Q_D2 = 1, Q_E1 = 2, Q_E2 = 3, Q_F1 = 4, Q_F2 = 5;

  function automatic logic [NT*NN*NS*ACT_W-1:0] build_prog();
    logic [NT*NN*NS*ACT_W-1:0] r;
    r = '0;   // all steps OP_END
    // master m0
    `PSET(S2_T_M0, NODE_B, 0, a_recv(S2_RX_M0_REQ_B))
    `PSET(S2_T_M0, NODE_B, 1, a_send(S2_TX_M0_GRANT_B))
    `PSET(S2_T_M0, NODE_C, 0, a_recv(S2_RX_M0_REQ_C))
    `PSET(S2_T_M0, NODE_C, 1, a_send(S2_TX_M0_NOGRANT_C))
    `PSET(S2_T_M0, NODE_E, 0, a_send_cat(S2_TX_M0_DATA_E, Q_E1, Q_E2))
    `PSET(S2_T_M0, NODE_E, 1, a_send(S2_TX_M0_ACK_E))
    `PSET(S2_T_M0, NODE_F, 0, a_mon(a_send(S2_TX_M0_SPLIT_F), S2_SYM_SPLIT))
    `PSET(S2_T_M0, NODE_F, 1, a_send(S2_TX_M0_RESUME_F))
    // slave
    `PSET(S2_T_S, NODE_D, 0, a_send(S2_TX_S_START_D))
    `PSET(S2_T_S, NODE_D, 1, a_recv_q(S2_RX_S_D1_D, Q_D1))
    `PSET(S2_T_S, NODE_D, 2, a_recv_q(S2_RX_S_D2_D, Q_D2))
    `PSET(S2_T_S, NODE_E, 0, a_send(S2_TX_S_START_E))
    `PSET(S2_T_S, NODE_E, 1, a_recv_q(S2_RX_S_D1_E, Q_E1))
    `PSET(S2_T_S, NODE_E, 2, a_recv_q(S2_RX_S_D2_E, Q_E2))
    `PSET(S2_T_S, NODE_F, 0, a_send(S2_TX_S_START_F))
    `PSET(S2_T_S, NODE_F, 1, a_recv_q(S2_RX_S_D1_F, Q_F1))
    `PSET(S2_T_S, NODE_F, 2, a_recv_q(S2_RX_S_D2_F, Q_F2))
    // master m1
    `PSET(S2_T_M1, NODE_A, 0, a_recv(S2_RX_M1_REQ_A))
    `PSET(S2_T_M1, NODE_A, 1, a_send(S2_TX_M1_GRANT_A))
    `PSET(S2_T_M1, NODE_C, 0, a_recv(S2_RX_M1_REQ_C))
    `PSET(S2_T_M1, NODE_C, 1, a_send(S2_TX_M1_GRANT_C))
    `PSET(S2_T_M1, NODE_D, 0, a_send_cat(S2_TX_M1_DATA_D, Q_D1, Q_D2))
    `PSET(S2_T_M1, NODE_D, 1, a_send(S2_TX_M1_ACK_D))
    `PSET(S2_T_M1, NODE_F, 0, a_mon(a_recv(S2_RX_M1_REQ_F), S2_SYM_REQ))
    `PSET(S2_T_M1, NODE_F, 1, a_mon(a_send(S2_TX_M1_GRANT_F), S2_SYM_GRANT))
    `PSET(S2_T_M1, NODE_F, 2, a_send_cat(S2_TX_M1_DATA_F, Q_F1, Q_F2))
    `PSET(S2_T_M1, NODE_F, 3, a_send(S2_TX_M1_ACK_F))
    return r;
  endfunction

  // +req, then -split, then -grant; the second monitor is unused
  localparam logic [2*NTR*TR_W-1:0] MON = {{(NTR*TR_W){1'b0}}, tr(2, S2_SYM_GRANT, 0), tr(1, S2_SYM_SPLIT, 2),
                                           tr(0, S2_SYM_REQ, 1)};

  localparam logic [NT*NN*NS*ACT_W-1:0] PROG = build_prog();

  conv_core #(
    .W(W), .NTHR(NT), .NRX(S2_NRX), .NTX(S2_NTX), .NQ(S2_NQ), .NSYM(3),
    .NNODE(NN), .NSTEP(NS), .NODE_W(4), .PLEN(PLEN), .QDEPTH(QDEPTH),
    .NTR(NTR), .PROG(PROG), .MON_TR(MON)
  ) u_core (
    .clk, .rst_n, .rx_valid, .rx_data, .rx_ready, .tx_valid, .tx_data, .tx_ready,
    .path_we, .path_waddr, .path_wnode, .path_len,
    .finished, .cur_node, .in_node, .stat_run_wait, .stat_mon_block, .stat_q_stall
  );

endmodule
