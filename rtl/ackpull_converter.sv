// ackpull_converter: converter between a sender that uses an Ack-Nack
// protocol and a receiver that uses a Pull-End protocol.
//
// The exchange goes through four phases (HMSC nodes):
//   set-up     the receiver sends pull;
//   transfer   the sender sends msg and waits for ack; the receiver waits
//              for data, which is the content of msg;
//   error      the sender sends err and waits for nack (repeatable);
//   release    the receiver waits for end.
// The converter consumes pull and err and generates nack and end on its own,
// relays msg as data through a queue, and sends ack only under a behavioural
// specification: a two-state automaton over {data, ack} that starts with
// data and then alternates, so ack reaches the sender only after data has
// been delivered and at most one message is in transit.
//   sender thread:    transfer: ?msg (queue), !ack (monitored)
//                     error:    ?err, !nack
//   receiver thread:  set-up: ?pull   transfer: !data (queue, monitored)
//                     release: !end
// The environment's path chooses between transfer and error recovery.
//
// Interface: channel numbers AP_RX_*/AP_TX_* in conv_ex_pkg, valid/ready
// pairs with W bits of content, control messages carry 1; at least one
// clock cycle per action.  Phases, messages and the automaton follow the
// method; the handshake, widths and queue depth are this design's choice.
`include "conv_prog.svh"

module ackpull_converter
  import conv_pkg::*, conv_ex_pkg::*;
#(
  parameter int W      = 32,
  parameter int PLEN   = 32,
  parameter int QDEPTH = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [AP_NRX-1:0]       rx_valid,
  input  logic [W-1:0]            rx_data [AP_NRX],
  output logic [AP_NRX-1:0]       rx_ready,
  output logic [AP_NTX-1:0]       tx_valid,
  output logic [W-1:0]            tx_data [AP_NTX],
  input  logic [AP_NTX-1:0]       tx_ready,
  input  logic                    path_we,
  input  logic [$clog2(PLEN)-1:0] path_waddr,
  input  logic [3:0]              path_wnode,
  input  logic [$clog2(PLEN):0]   path_len,
  output logic [AP_NTHR-1:0]      finished,
  output logic [3:0]              cur_node [AP_NTHR],
  output logic [AP_NTHR-1:0]      in_node,
  output logic                    stat_run_wait,
  output logic                    stat_mon_block,
  output logic                    stat_q_stall
);

  localparam int NT = AP_NTHR, NN = AP_NNODE, NS = AP_NSTEP, NTR = 2;
  localparam int Q_MSG = 0;

  function automatic logic [NT*NN*NS*ACT_W-1:0] build_prog();
    logic [NT*NN*NS*ACT_W-1:0] r;
    r = '0;   // all steps OP_END
    `PSET(AP_T_SND, AP_TRANSFER, 0, a_recv_q(AP_RX_S_MSG, Q_MSG))
    `PSET(AP_T_SND, AP_TRANSFER, 1, a_mon(a_send(AP_TX_S_ACK), AP_SYM_ACK))
    `PSET(AP_T_SND, AP_ERROR,    0, a_recv(AP_RX_S_ERR))
    `PSET(AP_T_SND, AP_ERROR,    1, a_send(AP_TX_S_NACK))
    `PSET(AP_T_RCV, AP_SETUP,    0, a_recv(AP_RX_R_PULL))
    `PSET(AP_T_RCV, AP_TRANSFER, 0, a_mon(a_send_q(AP_TX_R_DATA, Q_MSG, FMT_FULL), AP_SYM_DATA))
    `PSET(AP_T_RCV, AP_RELEASE,  0, a_send(AP_TX_R_END))
    return r;
  endfunction

  // data first, then ack, alternating; the second monitor is unused
  localparam logic [2*NTR*TR_W-1:0] MON = {{(NTR*TR_W){1'b0}}, tr(1, AP_SYM_ACK, 0), tr(0, AP_SYM_DATA, 1)};

  localparam logic [NT*NN*NS*ACT_W-1:0] PROG = build_prog();

  conv_core #(
    .W(W), .NTHR(NT), .NRX(AP_NRX), .NTX(AP_NTX), .NQ(AP_NQ), .NSYM(2),
    .NNODE(NN), .NSTEP(NS), .NODE_W(4), .PLEN(PLEN), .QDEPTH(QDEPTH),
    .NTR(NTR), .PROG(PROG), .MON_TR(MON)
  ) u_core (
    .clk, .rst_n, .rx_valid, .rx_data, .rx_ready, .tx_valid, .tx_data, .tx_ready,
    .path_we, .path_waddr, .path_wnode, .path_len,
    .finished, .cur_node, .in_node, .stat_run_wait, .stat_mon_block, .stat_q_stall
  );

endmodule
