// run_channel: decides which HMSC node each converter thread enters next.
//
// The HMSC branches, and all threads must take the same branch, so the choice
// is made outside the converter by an environment that supplies a path
// through the HMSC (a list of node numbers).  Nodes are concatenated
// asynchronously: a thread that has finished its part of a node may go on to
// the next node while the others are still busy.  To keep the execution
// cycle-bounded no two copies of one node may be active at once.  A copy (a
// position p in the path) is active from the moment the first thread enters
// it until the last thread has left it, so a thread asking for node n at
// position q must wait (the WAIT answer) while some other thread has not yet
// finished a position p < q that holds n.
//
// Interface: the environment writes the path through path_we/path_waddr/
// path_wnode and sets path_len to its length (entries at or beyond path_len
// are never handed out).  A thread raises req[t] when it needs a node; in the
// same cycle gnt[t] and node[t] answer (combinational), and the thread is
// considered inside that node until it raises req[t] again.  done[t] says
// that the thread has used up the path.  wait_o[t] is high while a request is
// refused because an earlier copy of the node is still active.
//
// The path as a written list follows the reference implementation, whose
// environment is a file holding a finite run, and so does the WAIT rule; the
// write port, the size PLEN and the timing (a thread that asks in the same
// cycle as another counts as having left its node) are this design's choice.
module run_channel #(
  parameter int NTHR   = 3,
  parameter int PLEN   = 32,
  parameter int NODE_W = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     path_we,
  input  logic [$clog2(PLEN)-1:0]  path_waddr,
  input  logic [NODE_W-1:0]        path_wnode,
  input  logic [$clog2(PLEN):0]    path_len,
  input  logic [NTHR-1:0]          req,
  output logic [NTHR-1:0]          gnt,
  output logic [NODE_W-1:0]        node [NTHR],
  output logic [NTHR-1:0]          done,
  output logic [NTHR-1:0]          wait_o
);

  localparam int IW = $clog2(PLEN) + 1;

  logic [NODE_W-1:0] path [PLEN];
  logic [IW-1:0]     idx  [NTHR];   // next path position of each thread
  logic [IW-1:0]     pos  [NTHR];   // path position of the node it is in
  logic [NTHR-1:0]   active;        // thread is inside a node

  // first path position each thread has not finished yet
  logic [IW-1:0] first [NTHR];

  always_comb begin
    for (int j = 0; j < NTHR; j++)
      first[j] = (active[j] && !req[j]) ? pos[j] : idx[j];
  end

  always_comb begin
    for (int t = 0; t < NTHR; t++) begin
      logic blocked;
      node[t] = path[idx[t][IW-2:0]];
      done[t] = (idx[t] >= IW'(path_len));
      blocked = 1'b0;
      // an earlier copy of the node some other thread has not finished
      for (int j = 0; j < NTHR; j++) begin
        if (j != t) begin
          for (int p = 0; p < PLEN; p++) begin
            if (IW'(p) >= first[j] && IW'(p) < idx[t] && path[p] == node[t])
              blocked = 1'b1;
          end
        end
      end
      gnt[t]    = req[t] && !done[t] && !blocked;
      wait_o[t] = req[t] && !done[t] && blocked;
    end
  end

  always_ff @(posedge clk) begin
    if (path_we) path[path_waddr] <= path_wnode;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int t = 0; t < NTHR; t++) begin
        idx[t] <= '0;
        pos[t] <= '0;
      end
      active <= '0;
    end else begin
      for (int t = 0; t < NTHR; t++) begin
        if (gnt[t]) begin
          idx[t]    <= idx[t] + 1'b1;
          pos[t]    <= idx[t];
          active[t] <= 1'b1;
        end else if (req[t]) begin
          active[t] <= 1'b0;
        end
      end
    end
  end

endmodule
