// conv_prog.svh: helper for writing converter thread programs.
//
// Inside a constant function that fills the flat program vector r of a
// converter with NN nodes and NS steps per node, PSET(t, n, s, a) stores
// action a as step s of thread t for node n.
`ifndef CONV_PROG_SVH
`define CONV_PROG_SVH
`define PSET(t, n, s, a) r[((((t) * NN) + (n)) * NS + (s)) * ACT_W +: ACT_W] = (a);
`endif
