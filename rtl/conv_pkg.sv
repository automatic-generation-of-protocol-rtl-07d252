// conv_pkg: shared types for the scenario-based protocol converters.
//
// A converter is a set of threads, one per component.  For every node of the
// HMSC (a "mode of interaction") each thread runs a short program that is the
// dual of its component's view of that node: where the component sends a
// message the thread receives it, where the component receives one the thread
// sends it.  A step of such a program is an action_t.
//
//  * OP_RECV ch      wait for message ch from the component and consume it.
//                    With qa_en/qb_en the message content is appended to
//                    queue qa (and qb): it is an "important" message that
//                    another thread has to relay.  Two queues are used when
//                    one message is chopped into two.
//  * OP_SEND ch      send message ch to the component.  A control message is
//                    generated on the spot (content 1).  A relayed message is
//                    built from queue heads: FMT_FULL copies qa, FMT_HI and
//                    FMT_LO take one half of qa (chopping), FMT_CAT joins the
//                    low halves of qa and qb (merging).  The heads are popped.
//  * mon_en/sym      the action is in the alphabet of a behavioural
//                    specification; it waits until the monitor allows symbol
//                    sym and reports that it executed.
//  * OP_END          the thread has finished its part of the node.
//
// The action encoding is this design's own; the kinds of action (generate or
// consume control messages, relay, chop, merge, consult a monitor) are the
// ones the converter generation method defines.
package conv_pkg;

  localparam int CH_W  = 5;   // up to 32 receive and 32 send channels
  localparam int Q_W   = 4;   // up to 16 queues
  localparam int SYM_W = 3;   // up to 8 monitored symbols

  typedef enum logic [1:0] {
    OP_END  = 2'd0,
    OP_RECV = 2'd1,
    OP_SEND = 2'd2
  } op_e;

  typedef enum logic [2:0] {
    FMT_CTRL = 3'd0,   // control message, content 1
    FMT_FULL = 3'd1,   // relay head of qa unchanged
    FMT_HI   = 3'd2,   // upper half of head of qa (first part of a chop)
    FMT_LO   = 3'd3,   // lower half of head of qa (second part of a chop)
    FMT_CAT  = 3'd4    // {qa[low half], qb[low half]} (merge of two parts)
  } fmt_e;

  typedef struct packed {
    op_e              op;
    logic [CH_W-1:0]  ch;
    logic             qa_en;
    logic [Q_W-1:0]   qa;
    logic             qb_en;
    logic [Q_W-1:0]   qb;
    fmt_e             fmt;
    logic             mon_en;
    logic [SYM_W-1:0] sym;
  } action_t;

  localparam int ACT_W = $bits(action_t);

  // One transition of a behavioural specification automaton.
  typedef struct packed {
    logic             valid;
    logic [1:0]       from;
    logic [SYM_W-1:0] sym;
    logic [1:0]       to;
  } mon_tr_t;

  localparam int TR_W = $bits(mon_tr_t);

  function automatic action_t a_end();
    action_t a;
    a = '0;
    a.op = OP_END;
    return a;
  endfunction

  // Consume a control message.
  function automatic action_t a_recv(input int ch);
    action_t a;
    a = '0;
    a.op = OP_RECV;
    a.ch = CH_W'(ch);
    return a;
  endfunction

  // Consume an important message and queue it for another thread.
  function automatic action_t a_recv_q(input int ch, input int qa);
    action_t a;
    a = a_recv(ch);
    a.qa_en = 1'b1;
    a.qa = Q_W'(qa);
    return a;
  endfunction

  // Consume a message that is chopped: queue it for two sends.
  function automatic action_t a_recv_q2(input int ch, input int qa, input int qb);
    action_t a;
    a = a_recv_q(ch, qa);
    a.qb_en = 1'b1;
    a.qb = Q_W'(qb);
    return a;
  endfunction

  // Generate a control message.
  function automatic action_t a_send(input int ch);
    action_t a;
    a = '0;
    a.op = OP_SEND;
    a.ch = CH_W'(ch);
    a.fmt = FMT_CTRL;
    return a;
  endfunction

  // Send a message built from the head of one queue.
  function automatic action_t a_send_q(input int ch, input int qa, input fmt_e fmt);
    action_t a;
    a = a_send(ch);
    a.qa_en = 1'b1;
    a.qa = Q_W'(qa);
    a.fmt = fmt;
    return a;
  endfunction

  // Send a message merged from the heads of two queues.
  function automatic action_t a_send_cat(input int ch, input int qa, input int qb);
    action_t a;
    a = a_send_q(ch, qa, FMT_CAT);
    a.qb_en = 1'b1;
    a.qb = Q_W'(qb);
    return a;
  endfunction

  // Put an action under the control of a behavioural monitor.
  function automatic action_t a_mon(input action_t a_in, input int sym);
    action_t a;
    a = a_in;
    a.mon_en = 1'b1;
    a.sym = SYM_W'(sym);
    return a;
  endfunction

  function automatic mon_tr_t tr(input int from, input int sym, input int to);
    mon_tr_t t;
    t.valid = 1'b1;
    t.from = 2'(from);
    t.sym = SYM_W'(sym);
    t.to = 2'(to);
    return t;
  endfunction

endpackage
