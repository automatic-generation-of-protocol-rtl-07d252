// conv_core: the fixed skeleton of a generated protocol converter.
//
// A converter between NTHR components has one thread per component
// (conv_thread), NQ buffers for the important messages that travel from one
// thread to another (msg_queue), a RUN channel that hands every thread the
// next HMSC node of the environment's path (run_channel) and two monitors for
// behavioural specifications (behav_monitor).  What differs from one
// converter to the next is only data: the program of every thread for every
// node (PROG, thread-major, then node, then step) and the monitor transition
// tables (MON_TR, NTR entries per monitor).
//
// Every receive channel, send channel and queue belongs to exactly one thread
// (the one whose program names it), so the per-thread outputs are simply
// OR-ed together.  Monitored symbols are numbered across the converter; each
// symbol is in the alphabet of one monitor.
//
// Interface: rx_* are the messages the components send, tx_* those they
// receive (valid/ready, W-bit content); path_* load the environment's path;
// finished, cur_node and the stat_* flags show progress: stat_run_wait (some
// thread held back because an earlier copy of its next node is still
// active), stat_mon_block (some action held back by a monitor) and
// stat_q_stall (some receive held back by a full queue).
module conv_core
  import conv_pkg::*;
#(
  parameter int W      = 32,
  parameter int NTHR   = 2,
  parameter int NRX    = 4,
  parameter int NTX    = 4,
  parameter int NQ     = 2,
  parameter int NSYM   = 8,
  parameter int NNODE  = 4,
  parameter int NSTEP  = 8,
  parameter int NODE_W = 4,
  parameter int PLEN   = 32,
  parameter int QDEPTH = 4,
  parameter int NTR    = 4,
  parameter logic [NTHR*NNODE*NSTEP*ACT_W-1:0] PROG   = '0,
  parameter logic [2*NTR*TR_W-1:0]             MON_TR = '0
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [NRX-1:0]          rx_valid,
  input  logic [W-1:0]            rx_data [NRX],
  output logic [NRX-1:0]          rx_ready,
  output logic [NTX-1:0]          tx_valid,
  output logic [W-1:0]            tx_data [NTX],
  input  logic [NTX-1:0]          tx_ready,
  input  logic                    path_we,
  input  logic [$clog2(PLEN)-1:0] path_waddr,
  input  logic [NODE_W-1:0]       path_wnode,
  input  logic [$clog2(PLEN):0]   path_len,
  output logic [NTHR-1:0]         finished,
  output logic [NODE_W-1:0]       cur_node [NTHR],
  output logic [NTHR-1:0]         in_node,
  output logic                    stat_run_wait,
  output logic                    stat_mon_block,
  output logic                    stat_q_stall
);

  localparam int PSZ = NNODE * NSTEP * ACT_W;   // program bits per thread

  // per-thread signals
  logic [NRX-1:0]    t_rx_ready [NTHR];
  logic [NTX-1:0]    t_tx_valid [NTHR];
  logic [W-1:0]      t_tx_data  [NTHR];
  logic [NQ-1:0]     t_q_push   [NTHR];
  logic [W-1:0]      t_q_pdata  [NTHR];
  logic [NQ-1:0]     t_q_pop    [NTHR];
  logic [NSYM-1:0]   t_mon_req  [NTHR];
  logic [NSYM-1:0]   t_mon_fire [NTHR];
  logic [NTHR-1:0]   t_fired, t_q_stall;

  logic [NTHR-1:0]   run_req, run_gnt, run_done, run_wait;
  logic [NODE_W-1:0] run_node [NTHR];

  logic [NQ-1:0]     q_push, q_pop, q_full, q_empty;
  logic [W-1:0]      q_pdata [NQ];
  logic [W-1:0]      q_head  [NQ];

  logic [NSYM-1:0]   mon_req, mon_fire, mon_allow;
  logic [NSYM-1:0]   allow0, allow1;

  run_channel #(.NTHR(NTHR), .PLEN(PLEN), .NODE_W(NODE_W)) u_run (
    .clk, .rst_n, .path_we, .path_waddr, .path_wnode, .path_len,
    .req(run_req), .gnt(run_gnt), .node(run_node), .done(run_done), .wait_o(run_wait)
  );

  for (genvar t = 0; t < NTHR; t++) begin : g_thr
    conv_thread #(
      .W(W), .NRX(NRX), .NTX(NTX), .NQ(NQ), .NSYM(NSYM), .NNODE(NNODE),
      .NSTEP(NSTEP), .NODE_W(NODE_W), .PROG(PROG[t*PSZ +: PSZ])
    ) u_thr (
      .clk, .rst_n,
      .run_req(run_req[t]), .run_gnt(run_gnt[t]), .run_node(run_node[t]), .run_done(run_done[t]),
      .rx_valid, .rx_data, .rx_ready(t_rx_ready[t]),
      .tx_valid(t_tx_valid[t]), .tx_data(t_tx_data[t]), .tx_ready,
      .q_push(t_q_push[t]), .q_push_data(t_q_pdata[t]), .q_full,
      .q_pop(t_q_pop[t]), .q_empty, .q_head,
      .mon_req(t_mon_req[t]), .mon_allow, .mon_fire(t_mon_fire[t]),
      .in_node(in_node[t]), .cur_node(cur_node[t]), .finished(finished[t]),
      .fired(t_fired[t]), .q_stall(t_q_stall[t])
    );
  end

  always_comb begin
    rx_ready = '0;
    tx_valid = '0;
    q_push   = '0;
    q_pop    = '0;
    for (int c = 0; c < NTX; c++) tx_data[c] = '0;
    for (int q = 0; q < NQ; q++)  q_pdata[q] = '0;
    for (int t = 0; t < NTHR; t++) begin
      rx_ready |= t_rx_ready[t];
      tx_valid |= t_tx_valid[t];
      q_push   |= t_q_push[t];
      q_pop    |= t_q_pop[t];
      for (int c = 0; c < NTX; c++)
        if (t_tx_valid[t][c]) tx_data[c] = t_tx_data[t];
      for (int q = 0; q < NQ; q++)
        if (t_q_push[t][q]) q_pdata[q] = t_q_pdata[t];
    end
  end

  always_comb begin
    mon_req = '0;
    for (int t = 0; t < NTHR; t++) mon_req |= t_mon_req[t];
  end

  always_comb begin
    mon_fire = '0;
    for (int t = 0; t < NTHR; t++) mon_fire |= t_mon_fire[t];
  end

  for (genvar q = 0; q < NQ; q++) begin : g_q
    msg_queue #(.W(W), .DEPTH(QDEPTH)) u_q (
      .clk, .rst_n,
      .push(q_push[q]), .push_data(q_pdata[q]), .full(q_full[q]),
      .pop(q_pop[q]), .empty(q_empty[q]), .head(q_head[q])
    );
  end

  behav_monitor #(.NSYM(NSYM), .NTR(NTR), .TR(MON_TR[0 +: NTR*TR_W])) u_mon0 (
    .clk, .rst_n, .req(mon_req), .allow(allow0), .fire(mon_fire & allow0)
  );
  behav_monitor #(.NSYM(NSYM), .NTR(NTR), .TR(MON_TR[NTR*TR_W +: NTR*TR_W])) u_mon1 (
    .clk, .rst_n, .req(mon_req), .allow(allow1), .fire(mon_fire & allow1)
  );

  // A symbol belongs to one monitor; each monitor only sees its own fires.
  assign mon_allow = allow0 | allow1;

  always_comb begin
    stat_run_wait  = |run_wait;
    stat_mon_block = |(mon_req & ~mon_allow);
    stat_q_stall   = |t_q_stall;
  end

endmodule
