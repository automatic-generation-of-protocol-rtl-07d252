// split_bus_converter: bus controller for one master and one slave with split
// transactions, obtained as the converter between their two views.
//
// HMSC nodes and what the converter does in each:
//   A  master sends req                  -> consume it
//   B  master waits for nogrant           -> generate it
//   C  master gets grant, sends transfer; slave gets transfer
//                                         -> grant, queue transfer, relay it
//   D  slave commits and sends ok; master waits for ok
//                                         -> consume ok, generate ok
//   E  slave sends split; master waits for split -> consume, generate
//   F  master sends req (ignored while split)    -> consume
//   G  master waits for nogrant                  -> generate
//   H  slave sends resume; master waits for resume -> consume, generate
// Only transfer is relayed; all control messages are generated or consumed
// independently by the master thread and the slave thread, so the master
// side may run ahead of the slave side by whole nodes.  The grant/nogrant
// decisions are those of the path the environment supplies.
//
// Interface: channel numbers SB_RX_*/SB_TX_* in conv_ex_pkg, valid/ready
// pairs with W bits of content, control messages carry 1; at least one clock
// cycle per action.  Node contents follow the method's example; handshake,
// widths and queue depth are this design's choice.
`include "conv_prog.svh"

module split_bus_converter
  import conv_pkg::*, conv_ex_pkg::*;
#(
  parameter int W      = 32,
  parameter int PLEN   = 32,
  parameter int QDEPTH = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [SB_NRX-1:0]       rx_valid,
  input  logic [W-1:0]            rx_data [SB_NRX],
  output logic [SB_NRX-1:0]       rx_ready,
  output logic [SB_NTX-1:0]       tx_valid,
  output logic [W-1:0]            tx_data [SB_NTX],
  input  logic [SB_NTX-1:0]       tx_ready,
  input  logic                    path_we,
  input  logic [$clog2(PLEN)-1:0] path_waddr,
  input  logic [3:0]              path_wnode,
  input  logic [$clog2(PLEN):0]   path_len,
  output logic [SB_NTHR-1:0]      finished,
  output logic [3:0]              cur_node [SB_NTHR],
  output logic [SB_NTHR-1:0]      in_node,
  output logic                    stat_run_wait,
  output logic                    stat_mon_block,
  output logic                    stat_q_stall
);

  localparam int NT = SB_NTHR, NN = SB_NNODE, NS = SB_NSTEP, NTR = 2;
  localparam int Q_TRANSFER = 0;

  function automatic logic [NT*NN*NS*ACT_W-1:0] build_prog();
    logic [NT*NN*NS*ACT_W-1:0] r;
    r = '0;   // all steps OP_END
    `PSET(SB_T_M, NODE_A, 0, a_recv(SB_RX_M_REQ_A))
    `PSET(SB_T_M, NODE_B, 0, a_send(SB_TX_M_NOGRANT_B))
    `PSET(SB_T_M, NODE_C, 0, a_send(SB_TX_M_GRANT_C))
    `PSET(SB_T_M, NODE_C, 1, a_recv_q(SB_RX_M_TRANSFER_C, Q_TRANSFER))
    `PSET(SB_T_M, NODE_D, 0, a_send(SB_TX_M_OK_D))
    `PSET(SB_T_M, NODE_E, 0, a_send(SB_TX_M_SPLIT_E))
    `PSET(SB_T_M, NODE_F, 0, a_recv(SB_RX_M_REQ_F))
    `PSET(SB_T_M, NODE_G, 0, a_send(SB_TX_M_NOGRANT_G))
    `PSET(SB_T_M, NODE_H, 0, a_send(SB_TX_M_RESUME_H))
    `PSET(SB_T_S, NODE_C, 0, a_send_q(SB_TX_S_TRANSFER_C, Q_TRANSFER, FMT_FULL))
    `PSET(SB_T_S, NODE_D, 0, a_recv(SB_RX_S_OK_D))
    `PSET(SB_T_S, NODE_E, 0, a_recv(SB_RX_S_SPLIT_E))
    `PSET(SB_T_S, NODE_H, 0, a_recv(SB_RX_S_RESUME_H))
    return r;
  endfunction

  localparam logic [NT*NN*NS*ACT_W-1:0] PROG = build_prog();

  conv_core #(
    .W(W), .NTHR(NT), .NRX(SB_NRX), .NTX(SB_NTX), .NQ(SB_NQ), .NSYM(2),
    .NNODE(NN), .NSTEP(NS), .NODE_W(4), .PLEN(PLEN), .QDEPTH(QDEPTH),
    .NTR(NTR), .PROG(PROG), .MON_TR('0)
  ) u_core (
    .clk, .rst_n, .rx_valid, .rx_data, .rx_ready, .tx_valid, .tx_data, .tx_ready,
    .path_we, .path_waddr, .path_wnode, .path_len,
    .finished, .cur_node, .in_node, .stat_run_wait, .stat_mon_block, .stat_q_stall
  );

endmodule
