// behav_monitor: a behavioural specification run as a monitor of a converter.
//
// A behavioural specification is a finite automaton over some of the
// converter's messages (its alphabet); every state is accepting.  A converter
// action on a message of the alphabet may only execute when the automaton has
// a transition for that message in its current state; executing it moves the
// automaton along that transition.  Actions on other messages are not
// affected, and a blocked action only blocks its own thread.
//
// Interface: a thread raises req[s] while its next action is symbol s, the
// monitor answers allow[s], and the thread raises fire[s] in the cycle the
// action completes (allow[s] must then be high).  The transition table TR
// holds NTR entries {valid, from, sym, to}; the automaton starts in state 0.
// The default table is the simplest useful one, symbol 0 and symbol 1 in
// strict alternation (for example a data delivery before each ack).
//
// Timing: allow is combinational from the state and req; the state changes
// on the clock edge after fire.  If two requested symbols are enabled in the
// same state the lowest index is chosen, and the choice is held until that
// action fires, so that a valid once shown to a component is not withdrawn;
// the arbitration and the hold are this design's choice.
module behav_monitor
  import conv_pkg::*;
#(
  parameter int                    NSYM = 8,
  parameter int                    NTR  = 4,
  parameter logic [NTR*TR_W-1:0]   TR   = (NTR*TR_W)'({tr(1, 1, 0), tr(0, 0, 1)})
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NSYM-1:0] req,
  output logic [NSYM-1:0] allow,
  input  logic [NSYM-1:0] fire
);

  localparam int SI_W = (NSYM > 1) ? $clog2(NSYM) : 1;   // symbol index width

  logic [1:0]      state;
  logic            lock_valid;
  logic [SYM_W-1:0] lock_sym;

  logic [NSYM-1:0] enabled;      // symbols with a transition from state
  logic [1:0]      next_of [NSYM];
  logic [NSYM-1:0] winner;       // one-hot arbitration result

  always_comb begin
    enabled = '0;
    for (int s = 0; s < NSYM; s++) next_of[s] = state;
    for (int t = 0; t < NTR; t++) begin
      mon_tr_t e;
      e = TR[t*TR_W +: TR_W];
      if (e.valid && e.from == state && int'(e.sym) < NSYM) begin
        enabled[SI_W'(e.sym)] = 1'b1;
        next_of[SI_W'(e.sym)] = e.to;
      end
    end
  end

  always_comb begin
    winner = '0;
    for (int s = NSYM - 1; s >= 0; s--) begin
      if (req[s] && enabled[s]) winner = NSYM'(1) << s;
    end
    if (lock_valid) begin
      allow = '0;
      allow[SI_W'(lock_sym)] = 1'b1;
    end else begin
      allow = winner;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= 2'd0;
      lock_valid <= 1'b0;
      lock_sym   <= '0;
    end else begin
      if (|(fire & allow)) begin
        for (int s = 0; s < NSYM; s++) begin
          if (fire[s] && allow[s]) state <= next_of[s];
        end
        lock_valid <= 1'b0;
      end else if (!lock_valid && |winner) begin
        lock_valid <= 1'b1;
        for (int s = 0; s < NSYM; s++) begin
          if (winner[s]) lock_sym <= SYM_W'(s);
        end
      end
    end
  end

  // A thread may only execute a monitored action the monitor allows.
  assert property (@(posedge clk) disable iff (!rst_n) (fire & ~allow) == '0)
    else $error("behav_monitor: action fired without permission");

endmodule
