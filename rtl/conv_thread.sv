// conv_thread: one thread of a protocol converter, serving one component.
//
// The thread asks the RUN channel for the next HMSC node, then runs the
// program for that node (PROG, NSTEP actions per node, see conv_pkg) one
// action at a time and asks again when it reaches OP_END or the last step.
// Its actions are the dual of the component's view of the node:
//  * a message the component sends is received (rx_ready high on that
//    channel); if it is important its content is appended to one or two
//    queues, and the action waits while a target queue is full;
//  * a message the component expects is sent (tx_valid high on that
//    channel): a control message is generated at once, an important message
//    waits until its queue heads are present and is built from them
//    (relay, chop into halves, or merge two halves);
//  * an action in a behavioural specification's alphabet additionally waits
//    for the monitor's allow and reports fire when it completes.
// Only this thread's own action waits; other threads go on.
//
// Channels are valid/ready pairs: a message moves in a cycle where both are
// high.  Each action takes at least one clock cycle, so two consecutive
// actions of a thread are at least one cycle apart.  Once raised, tx_valid
// stays high with stable data until tx_ready.
// finished goes high when the RUN channel has no more nodes for the thread;
// fired pulses when an action completes and q_stall flags a receive held
// back by a full queue.
module conv_thread
  import conv_pkg::*;
#(
  parameter int                            W      = 32,
  parameter int                            NRX    = 4,
  parameter int                            NTX    = 4,
  parameter int                            NQ     = 2,
  parameter int                            NSYM   = 8,
  parameter int                            NNODE  = 4,
  parameter int                            NSTEP  = 8,
  parameter int                            NODE_W = 4,
  parameter logic [NNODE*NSTEP*ACT_W-1:0]  PROG   = '0
) (
  input  logic              clk,
  input  logic              rst_n,
  // RUN channel
  output logic              run_req,
  input  logic              run_gnt,
  input  logic [NODE_W-1:0] run_node,
  input  logic              run_done,
  // messages from the component
  input  logic [NRX-1:0]    rx_valid,
  input  logic [W-1:0]      rx_data [NRX],
  output logic [NRX-1:0]    rx_ready,
  // messages to the component
  output logic [NTX-1:0]    tx_valid,
  output logic [W-1:0]      tx_data,
  input  logic [NTX-1:0]    tx_ready,
  // queues
  output logic [NQ-1:0]     q_push,
  output logic [W-1:0]      q_push_data,
  input  logic [NQ-1:0]     q_full,
  output logic [NQ-1:0]     q_pop,
  input  logic [NQ-1:0]     q_empty,
  input  logic [W-1:0]      q_head [NQ],
  // behavioural monitors
  output logic [NSYM-1:0]   mon_req,
  input  logic [NSYM-1:0]   mon_allow,
  output logic [NSYM-1:0]   mon_fire,
  // status
  output logic              in_node,
  output logic [NODE_W-1:0] cur_node,
  output logic              finished,
  output logic              fired,
  output logic              q_stall
);

  localparam int HALF = W / 2;
  localparam int SW   = (NSTEP > 1) ? $clog2(NSTEP) : 1;
  // index widths of the channel, queue and symbol vectors
  localparam int RXW  = (NRX  > 1) ? $clog2(NRX)  : 1;
  localparam int TXW  = (NTX  > 1) ? $clog2(NTX)  : 1;
  localparam int QW   = (NQ   > 1) ? $clog2(NQ)   : 1;
  localparam int YW   = (NSYM > 1) ? $clog2(NSYM) : 1;

  typedef enum logic [1:0] {S_FETCH, S_EXEC, S_HALT} state_e;

  state_e            state;
  logic [NODE_W-1:0] node;
  logic [SW-1:0]     step;
  action_t           act;

  logic qa_ok, qb_ok, mon_ok, can_go, fire;
  logic [W-1:0] qa_head, qb_head;
  logic [RXW-1:0] rxi;
  logic [TXW-1:0] txi;
  logic [QW-1:0]  qai, qbi;
  logic [YW-1:0]  symi;

  assign act      = (state == S_EXEC && int'(node) < NNODE)
                    ? PROG[(int'(node) * NSTEP + int'(step)) * ACT_W +: ACT_W]
                    : a_end();
  assign in_node  = (state == S_EXEC);
  assign cur_node = node;
  assign finished = (state == S_HALT);
  assign run_req  = (state == S_FETCH);

  // The program's fields are sized for the largest converter; cut them to
  // this instance's vectors.
  assign rxi  = RXW'(act.ch);
  assign txi  = TXW'(act.ch);
  assign qai  = QW'(act.qa);
  assign qbi  = QW'(act.qb);
  assign symi = YW'(act.sym);

  assign qa_head = q_head[qai];
  assign qb_head = q_head[qbi];

  // Queue conditions: pushes need room, pops need an entry.
  always_comb begin
    if (act.op == OP_RECV) begin
      qa_ok = !act.qa_en || !q_full[qai];
      qb_ok = !act.qb_en || !q_full[qbi];
    end else begin
      qa_ok = !act.qa_en || !q_empty[qai];
      qb_ok = !act.qb_en || !q_empty[qbi];
    end
  end

  always_comb begin
    mon_ok = !act.mon_en || mon_allow[symi];
    can_go = qa_ok && qb_ok && mon_ok &&
             (act.op == OP_RECV || act.op == OP_SEND);

    rx_ready = '0;
    tx_valid = '0;
    if (can_go && act.op == OP_RECV) rx_ready[rxi] = 1'b1;
    if (can_go && act.op == OP_SEND) tx_valid[txi] = 1'b1;

    fire = can_go && ((act.op == OP_RECV && rx_valid[rxi]) ||
                      (act.op == OP_SEND && tx_ready[txi]));

    case (act.fmt)
      FMT_FULL: tx_data = qa_head;
      FMT_HI:   tx_data = W'(qa_head[W-1:HALF]);
      FMT_LO:   tx_data = W'(qa_head[HALF-1:0]);
      FMT_CAT:  tx_data = {qa_head[HALF-1:0], qb_head[HALF-1:0]};
      default:  tx_data = W'(1);
    endcase

    q_push      = '0;
    q_pop       = '0;
    q_push_data = rx_data[rxi];
    if (fire && act.op == OP_RECV) begin
      if (act.qa_en) q_push[qai] = 1'b1;
      if (act.qb_en) q_push[qbi] = 1'b1;
    end
    if (fire && act.op == OP_SEND) begin
      if (act.qa_en) q_pop[qai] = 1'b1;
      if (act.qb_en) q_pop[qbi] = 1'b1;
    end

  end

  always_comb begin
    mon_req = '0;
    if (state == S_EXEC && act.mon_en && qa_ok && qb_ok) mon_req[symi] = 1'b1;
  end

  always_comb begin
    mon_fire = '0;
    if (fire && act.mon_en) mon_fire[symi] = 1'b1;
  end

  assign fired   = fire;
  assign q_stall = (act.op == OP_RECV) && !(qa_ok && qb_ok);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_FETCH;
      node  <= '0;
      step  <= '0;
    end else begin
      case (state)
        S_FETCH: begin
          if (run_done) begin
            state <= S_HALT;
          end else if (run_gnt) begin
            node  <= run_node;
            step  <= '0;
            state <= S_EXEC;
          end
        end
        S_EXEC: begin
          if (act.op == OP_END) begin
            state <= S_FETCH;
          end else if (fire) begin
            if (int'(step) == NSTEP - 1) begin
              state <= S_FETCH;
            end else begin
              step <= step + 1'b1;
            end
          end
        end
        default: begin
          // The path may be extended while the thread is halted.
          if (!run_done) state <= S_FETCH;
        end
      endcase
    end
  end

  // A message offered to the component is not withdrawn before it is taken.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (|(tx_valid & ~tx_ready)) |=> (tx_valid == $past(tx_valid)))
    else $error("conv_thread: tx_valid withdrawn");

endmodule
