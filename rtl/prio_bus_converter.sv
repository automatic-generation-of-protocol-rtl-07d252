// prio_bus_converter: bus controller for two masters m1, m2 with static
// priorities (m1 higher) and one slave s, obtained as their converter.
//
// HMSC nodes (A, B and C are initial):
//   A  m1 sends req1, m2 sends req1 (both want the bus)
//   B  m1 sends req1, m2 sends req0 (only m1 wants it)
//   C  m1 sends req0, m2 sends req1 (only m2 wants it)
//   D  m1 gets grant, sends transfer, gets ok; m2 gets nogrant;
//      s gets m1's transfer and answers ok
//   E  m1 gets nogrant; m2 gets grant, sends transfer, gets ok;
//      s gets m2's transfer and answers ok
// The converter consumes the requests, generates grant/nogrant and the ok
// to the master, relays each transfer to the slave through its own queue,
// and consumes the slave's ok.  Which of D and E follows A, B or C is the
// choice of the environment's path: priorities are encoded in the HMSC.
// The three threads (m1, s, m2) are independent except for the queues.
//
// Interface: channel numbers PB_RX_*/PB_TX_* in conv_ex_pkg, valid/ready
// pairs with W bits of content, control messages carry 1; at least one clock
// cycle per action.  Node contents follow the method's example; handshake,
// widths and queue depth are this design's choice.
`include "conv_prog.svh"

module prio_bus_converter
  import conv_pkg::*, conv_ex_pkg::*;
#(
  parameter int W      = 32,
  parameter int PLEN   = 32,
  parameter int QDEPTH = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [PB_NRX-1:0]       rx_valid,
  input  logic [W-1:0]            rx_data [PB_NRX],
  output logic [PB_NRX-1:0]       rx_ready,
  output logic [PB_NTX-1:0]       tx_valid,
  output logic [W-1:0]            tx_data [PB_NTX],
  input  logic [PB_NTX-1:0]       tx_ready,
  input  logic                    path_we,
  input  logic [$clog2(PLEN)-1:0] path_waddr,
  input  logic [3:0]              path_wnode,
  input  logic [$clog2(PLEN):0]   path_len,
  output logic [PB_NTHR-1:0]      finished,
  output logic [3:0]              cur_node [PB_NTHR],
  output logic [PB_NTHR-1:0]      in_node,
  output logic                    stat_run_wait,
  output logic                    stat_mon_block,
  output logic                    stat_q_stall
);

  localparam int NT = PB_NTHR, NN = PB_NNODE, NS = PB_NSTEP, NTR = 2;
  localparam int Q_M1 = 0, Q_M2 = 1;

  function automatic logic [NT*NN*NS*ACT_W-1:0] build_prog();
    logic [NT*NN*NS*ACT_W-1:0] r;
    r = '0;   // all steps OP_END
    `PSET(PB_T_M1, NODE_A, 0, a_recv(PB_RX_M1_REQ1_A))
    `PSET(PB_T_M1, NODE_B, 0, a_recv(PB_RX_M1_REQ1_B))
    `PSET(PB_T_M1, NODE_C, 0, a_recv(PB_RX_M1_REQ0_C))
    `PSET(PB_T_M1, NODE_D, 0, a_send(PB_TX_M1_GRANT_D))
    `PSET(PB_T_M1, NODE_D, 1, a_recv_q(PB_RX_M1_TRANSFER_D, Q_M1))
    `PSET(PB_T_M1, NODE_D, 2, a_send(PB_TX_M1_OK_D))
    `PSET(PB_T_M1, NODE_E, 0, a_send(PB_TX_M1_NOGRANT_E))
    `PSET(PB_T_S,  NODE_D, 0, a_send_q(PB_TX_S_TRANSFER_D, Q_M1, FMT_FULL))
    `PSET(PB_T_S,  NODE_D, 1, a_recv(PB_RX_S_OK_D))
    `PSET(PB_T_S,  NODE_E, 0, a_send_q(PB_TX_S_TRANSFER_E, Q_M2, FMT_FULL))
    `PSET(PB_T_S,  NODE_E, 1, a_recv(PB_RX_S_OK_E))
    `PSET(PB_T_M2, NODE_A, 0, a_recv(PB_RX_M2_REQ1_A))
    `PSET(PB_T_M2, NODE_B, 0, a_recv(PB_RX_M2_REQ0_B))
    `PSET(PB_T_M2, NODE_C, 0, a_recv(PB_RX_M2_REQ1_C))
    `PSET(PB_T_M2, NODE_D, 0, a_send(PB_TX_M2_NOGRANT_D))
    `PSET(PB_T_M2, NODE_E, 0, a_send(PB_TX_M2_GRANT_E))
    `PSET(PB_T_M2, NODE_E, 1, a_recv_q(PB_RX_M2_TRANSFER_E, Q_M2))
    `PSET(PB_T_M2, NODE_E, 2, a_send(PB_TX_M2_OK_E))
    return r;
  endfunction

  localparam logic [NT*NN*NS*ACT_W-1:0] PROG = build_prog();

  conv_core #(
    .W(W), .NTHR(NT), .NRX(PB_NRX), .NTX(PB_NTX), .NQ(PB_NQ), .NSYM(2),
    .NNODE(NN), .NSTEP(NS), .NODE_W(4), .PLEN(PLEN), .QDEPTH(QDEPTH),
    .NTR(NTR), .PROG(PROG), .MON_TR('0)
  ) u_core (
    .clk, .rst_n, .rx_valid, .rx_data, .rx_ready, .tx_valid, .tx_data, .tx_ready,
    .path_we, .path_waddr, .path_wnode, .path_len,
    .finished, .cur_node, .in_node, .stat_run_wait, .stat_mon_block, .stat_q_stall
  );

endmodule
