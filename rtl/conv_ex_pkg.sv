// conv_ex_pkg: message channel, queue, node and monitor-symbol numbers of the
// example converters.
//
// Every message occurrence of an HMSC node has a channel of its own, named
// after the component, the message and the node (for example M1_GRANT_D is
// the grant that master m1 receives in node D), in the way simulation traces
// of the method tag each message with its node.  RX_* channels carry
// messages from a component to the converter, TX_* channels messages from
// the converter to a component.  Nodes are numbered A=0, B=1, ...
package conv_ex_pkg;

  localparam int NODE_A = 0, NODE_B = 1, NODE_C = 2, NODE_D = 3,
                 NODE_E = 4, NODE_F = 5, NODE_G = 6, NODE_H = 7;

  // ---------------------------------------------------------------------
  // P/Q example: P sends req and data and waits for ack; Q announces ready,
  // waits for msg and finish and answers ack.  data is relayed as msg.
  // ---------------------------------------------------------------------
  localparam int PQ_NTHR = 2, PQ_NRX = 4, PQ_NTX = 3, PQ_NQ = 1, PQ_NNODE = 1, PQ_NSTEP = 4;
  localparam int PQ_T_P = 0, PQ_T_Q = 1;
  localparam int PQ_RX_P_REQ = 0, PQ_RX_P_DATA = 1, PQ_RX_Q_READY = 2, PQ_RX_Q_ACK = 3;
  localparam int PQ_TX_P_ACK = 0, PQ_TX_Q_MSG = 1, PQ_TX_Q_FINISH = 2;

  // ---------------------------------------------------------------------
  // Ack-Nack sender / Pull-End receiver: set-up, transfer, error recovery
  // and release phases.  msg is relayed as data; a monitor lets ack go to
  // the sender only after data has reached the receiver.
  // ---------------------------------------------------------------------
  localparam int AP_NTHR = 2, AP_NRX = 3, AP_NTX = 4, AP_NQ = 1, AP_NNODE = 4, AP_NSTEP = 2;
  localparam int AP_T_SND = 0, AP_T_RCV = 1;
  localparam int AP_SETUP = 0, AP_TRANSFER = 1, AP_ERROR = 2, AP_RELEASE = 3;
  localparam int AP_RX_S_MSG = 0, AP_RX_S_ERR = 1, AP_RX_R_PULL = 2;
  localparam int AP_TX_S_ACK = 0, AP_TX_S_NACK = 1, AP_TX_R_DATA = 2, AP_TX_R_END = 3;
  localparam int AP_SYM_DATA = 0, AP_SYM_ACK = 1;

  // ---------------------------------------------------------------------
  // One master, one slave, split transactions (nodes A-H).
  // ---------------------------------------------------------------------
  localparam int SB_NTHR = 2, SB_NRX = 6, SB_NTX = 7, SB_NQ = 1, SB_NNODE = 8, SB_NSTEP = 2;
  localparam int SB_T_M = 0, SB_T_S = 1;
  localparam int SB_RX_M_REQ_A = 0, SB_RX_M_TRANSFER_C = 1, SB_RX_M_REQ_F = 2,
                 SB_RX_S_OK_D = 3, SB_RX_S_SPLIT_E = 4, SB_RX_S_RESUME_H = 5;
  localparam int SB_TX_M_NOGRANT_B = 0, SB_TX_M_GRANT_C = 1, SB_TX_M_OK_D = 2,
                 SB_TX_M_SPLIT_E = 3, SB_TX_M_NOGRANT_G = 4, SB_TX_M_RESUME_H = 5,
                 SB_TX_S_TRANSFER_C = 6;

  // ---------------------------------------------------------------------
  // Two masters with static priorities, one slave (nodes A-E).
  // ---------------------------------------------------------------------
  localparam int PB_NTHR = 3, PB_NRX = 10, PB_NTX = 8, PB_NQ = 2, PB_NNODE = 5, PB_NSTEP = 3;
  localparam int PB_T_M1 = 0, PB_T_S = 1, PB_T_M2 = 2;
  localparam int PB_RX_M1_REQ1_A = 0, PB_RX_M2_REQ1_A = 1, PB_RX_M1_REQ1_B = 2,
                 PB_RX_M2_REQ0_B = 3, PB_RX_M1_REQ0_C = 4, PB_RX_M2_REQ1_C = 5,
                 PB_RX_M1_TRANSFER_D = 6, PB_RX_S_OK_D = 7, PB_RX_M2_TRANSFER_E = 8,
                 PB_RX_S_OK_E = 9;
  localparam int PB_TX_M1_GRANT_D = 0, PB_TX_M1_OK_D = 1, PB_TX_S_TRANSFER_D = 2,
                 PB_TX_M2_NOGRANT_D = 3, PB_TX_M1_NOGRANT_E = 4, PB_TX_S_TRANSFER_E = 5,
                 PB_TX_M2_GRANT_E = 6, PB_TX_M2_OK_E = 7;

  // ---------------------------------------------------------------------
  // Two 32-bit masters, one 16-bit slave, read/write overlap (nodes A-H).
  // Writes chop data into D1 (upper half) and D2 (lower half); reads merge.
  // ---------------------------------------------------------------------
  localparam int RW_NTHR = 3, RW_NRX = 17, RW_NTX = 29, RW_NQ = 12, RW_NNODE = 8, RW_NSTEP = 8;
  localparam int RW_T_M1 = 0, RW_T_S = 1, RW_T_M2 = 2;
  localparam int RW_RX_M1_REQW_A = 0, RW_RX_M1_REQR_B = 1, RW_RX_M1_REQW_C = 2,
                 RW_RX_M1_REQR_D = 3, RW_RX_M1_DATA_E = 4, RW_RX_M1_DATA_G = 5,
                 RW_RX_M2_REQW_A = 6, RW_RX_M2_REQR_B = 7, RW_RX_M2_REQR_C = 8,
                 RW_RX_M2_REQW_D = 9, RW_RX_M2_DATA_H = 10,
                 RW_RX_S_D1_F = 11, RW_RX_S_D2_F = 12, RW_RX_S_D1_G = 13,
                 RW_RX_S_D2_G = 14, RW_RX_S_D1_H = 15, RW_RX_S_D2_H = 16;
  localparam int RW_TX_M1_ACK_E = 0, RW_TX_M1_DONE_E = 1, RW_TX_M1_ACK_F = 2,
                 RW_TX_M1_DATA_F = 3, RW_TX_M1_DONE_F = 4, RW_TX_M1_ACK_G = 5,
                 RW_TX_M1_DONE_G = 6, RW_TX_M1_ACK_H = 7, RW_TX_M1_DATA_H = 8,
                 RW_TX_M1_DONE_H = 9,
                 RW_TX_M2_NOACK_E = 10, RW_TX_M2_NOACK_F = 11, RW_TX_M2_ACK_G = 12,
                 RW_TX_M2_DATA_G = 13, RW_TX_M2_DONE_G = 14, RW_TX_M2_ACK_H = 15,
                 RW_TX_M2_DONE_H = 16,
                 RW_TX_S_STARTW_E = 17, RW_TX_S_D1_E = 18, RW_TX_S_D2_E = 19,
                 RW_TX_S_STARTR_F = 20, RW_TX_S_STARTR_G = 21, RW_TX_S_STARTW_G = 22,
                 RW_TX_S_D1_G = 23, RW_TX_S_D2_G = 24, RW_TX_S_STARTR_H = 25,
                 RW_TX_S_STARTW_H = 26, RW_TX_S_D1_H = 27, RW_TX_S_D2_H = 28;
  localparam int RW_SYM_DONE_G = 0, RW_SYM_STARTW_G = 1, RW_SYM_DONE_H = 2, RW_SYM_STARTW_H = 3;

  // ---------------------------------------------------------------------
  // Two masters, one 16-bit slave; the higher-priority master m1 splits a
  // transaction of m0 (nodes A-F).
  // ---------------------------------------------------------------------
  localparam int S2_NTHR = 3, S2_NRX = 11, S2_NTX = 16, S2_NQ = 6, S2_NNODE = 6, S2_NSTEP = 4;
  localparam int S2_T_M0 = 0, S2_T_S = 1, S2_T_M1 = 2;
  localparam int S2_RX_M0_REQ_B = 0, S2_RX_M0_REQ_C = 1, S2_RX_M1_REQ_A = 2,
                 S2_RX_M1_REQ_C = 3, S2_RX_M1_REQ_F = 4, S2_RX_S_D1_D = 5,
                 S2_RX_S_D2_D = 6, S2_RX_S_D1_E = 7, S2_RX_S_D2_E = 8,
                 S2_RX_S_D1_F = 9, S2_RX_S_D2_F = 10;
  localparam int S2_TX_M0_GRANT_B = 0, S2_TX_M0_NOGRANT_C = 1, S2_TX_M0_DATA_E = 2,
                 S2_TX_M0_ACK_E = 3, S2_TX_M0_SPLIT_F = 4, S2_TX_M0_RESUME_F = 5,
                 S2_TX_M1_GRANT_A = 6, S2_TX_M1_GRANT_C = 7, S2_TX_M1_DATA_D = 8,
                 S2_TX_M1_ACK_D = 9, S2_TX_M1_GRANT_F = 10, S2_TX_M1_DATA_F = 11,
                 S2_TX_M1_ACK_F = 12, S2_TX_S_START_D = 13, S2_TX_S_START_E = 14,
                 S2_TX_S_START_F = 15;
  localparam int S2_SYM_REQ = 0, S2_SYM_SPLIT = 1, S2_SYM_GRANT = 2;

endpackage
