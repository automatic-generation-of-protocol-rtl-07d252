// pq_converter: converter between a process P and a process Q whose views of
// one exchange differ.
//
// P's view: P sends req, sends data, then waits for ack.
// Q's view: Q sends ready, waits for msg and then finish, then sends ack.
// The content of P's data must reach Q as msg; every other message is
// generated or consumed by the converter on its own.  The converter has one
// thread per process:
//   thread P:  ?req, ?data (append to the queue), !ack
//   thread Q:  ?ready, !msg (take the head of the queue), !finish, ?ack
// The two threads run independently except that !msg waits for the queue, so
// any interleaving of the two sides is possible; in particular P may get its
// ack before Q has received msg.  The HMSC has this single node, which the
// environment's path lists once per exchange.
//
// Interface: see conv_ex_pkg for the channel numbers (PQ_RX_*, PQ_TX_*);
// each channel is a valid/ready pair with W bits of content, and control
// messages carry the value 1.  Each action of a thread takes at least one
// clock cycle.  The thread programs follow the method; the cycle-level
// handshake and the queue depth are this design's choice.
`include "conv_prog.svh"

module pq_converter
  import conv_pkg::*, conv_ex_pkg::*;
#(
  parameter int W      = 32,
  parameter int PLEN   = 32,
  parameter int QDEPTH = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [PQ_NRX-1:0]       rx_valid,
  input  logic [W-1:0]            rx_data [PQ_NRX],
  output logic [PQ_NRX-1:0]       rx_ready,
  output logic [PQ_NTX-1:0]       tx_valid,
  output logic [W-1:0]            tx_data [PQ_NTX],
  input  logic [PQ_NTX-1:0]       tx_ready,
  input  logic                    path_we,
  input  logic [$clog2(PLEN)-1:0] path_waddr,
  input  logic [3:0]              path_wnode,
  input  logic [$clog2(PLEN):0]   path_len,
  output logic [PQ_NTHR-1:0]      finished,
  output logic [3:0]              cur_node [PQ_NTHR],
  output logic [PQ_NTHR-1:0]      in_node,
  output logic                    stat_run_wait,
  output logic                    stat_mon_block,
  output logic                    stat_q_stall
);

  localparam int NT = PQ_NTHR, NN = PQ_NNODE, NS = PQ_NSTEP, NTR = 2;
  localparam int Q_DATA = 0;

  function automatic logic [NT*NN*NS*ACT_W-1:0] build_prog();
    logic [NT*NN*NS*ACT_W-1:0] r;
    r = '0;   // all steps OP_END
    `PSET(PQ_T_P, 0, 0, a_recv(PQ_RX_P_REQ))
    `PSET(PQ_T_P, 0, 1, a_recv_q(PQ_RX_P_DATA, Q_DATA))
    `PSET(PQ_T_P, 0, 2, a_send(PQ_TX_P_ACK))
    `PSET(PQ_T_Q, 0, 0, a_recv(PQ_RX_Q_READY))
    `PSET(PQ_T_Q, 0, 1, a_send_q(PQ_TX_Q_MSG, Q_DATA, FMT_FULL))
    `PSET(PQ_T_Q, 0, 2, a_send(PQ_TX_Q_FINISH))
    `PSET(PQ_T_Q, 0, 3, a_recv(PQ_RX_Q_ACK))
    return r;
  endfunction

  localparam logic [NT*NN*NS*ACT_W-1:0] PROG = build_prog();

  conv_core #(
    .W(W), .NTHR(NT), .NRX(PQ_NRX), .NTX(PQ_NTX), .NQ(PQ_NQ), .NSYM(2),
    .NNODE(NN), .NSTEP(NS), .NODE_W(4), .PLEN(PLEN), .QDEPTH(QDEPTH),
    .NTR(NTR), .PROG(PROG), .MON_TR('0)
  ) u_core (
    .clk, .rst_n, .rx_valid, .rx_data, .rx_ready, .tx_valid, .tx_data, .tx_ready,
    .path_we, .path_waddr, .path_wnode, .path_len,
    .finished, .cur_node, .in_node, .stat_run_wait, .stat_mon_block, .stat_q_stall
  );

endmodule
