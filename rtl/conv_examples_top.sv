// conv_examples_top: the example protocol converters of the scenario-based
// converter synthesis method, side by side.
//
// Each converter sits between components whose protocols do not match and
// lets every component keep its own view of the exchange:
//   pq  P (req, data / ack) and Q (ready / msg, finish / ack)
//   ap  an Ack-Nack sender and a Pull-End receiver, with a monitor that
//       allows ack only after data was delivered
//   sb  one master and one slave with split transactions
//   pb  two masters with static priorities and one slave
//   rw  two 32-bit masters and a 16-bit slave with read/write overlap,
//       chopping and merging data, with two ordering monitors
//   s2  two masters and a 16-bit slave where the higher-priority master
//       splits the other's transaction, with an ordering monitor
// The converters do not interact; each has its own message channels
// (<ex>_rx_* from the components, <ex>_tx_* to them; channel numbers in
// conv_ex_pkg), its own path port through which the environment writes the
// sequence of HMSC nodes to run, and its own status outputs.  All share the
// clock and the synchronous active-low reset.
module conv_examples_top
  import conv_ex_pkg::*;
#(
  parameter int W      = 32,
  parameter int PLEN   = 32,
  parameter int QDEPTH = 4
) (
  input  logic clk,
  input  logic rst_n,
  // pq_converter
  input  logic [PQ_NRX-1:0]       pq_rx_valid,
  input  logic [W-1:0]            pq_rx_data [PQ_NRX],
  output logic [PQ_NRX-1:0]       pq_rx_ready,
  output logic [PQ_NTX-1:0]       pq_tx_valid,
  output logic [W-1:0]            pq_tx_data [PQ_NTX],
  input  logic [PQ_NTX-1:0]       pq_tx_ready,
  input  logic                    pq_path_we,
  input  logic [$clog2(PLEN)-1:0] pq_path_waddr,
  input  logic [3:0]              pq_path_wnode,
  input  logic [$clog2(PLEN):0]   pq_path_len,
  output logic [PQ_NTHR-1:0]      pq_finished,
  output logic [3:0]              pq_cur_node [PQ_NTHR],
  output logic [PQ_NTHR-1:0]      pq_in_node,
  output logic [2:0]              pq_stat,
  // ackpull_converter
  input  logic [AP_NRX-1:0]       ap_rx_valid,
  input  logic [W-1:0]            ap_rx_data [AP_NRX],
  output logic [AP_NRX-1:0]       ap_rx_ready,
  output logic [AP_NTX-1:0]       ap_tx_valid,
  output logic [W-1:0]            ap_tx_data [AP_NTX],
  input  logic [AP_NTX-1:0]       ap_tx_ready,
  input  logic                    ap_path_we,
  input  logic [$clog2(PLEN)-1:0] ap_path_waddr,
  input  logic [3:0]              ap_path_wnode,
  input  logic [$clog2(PLEN):0]   ap_path_len,
  output logic [AP_NTHR-1:0]      ap_finished,
  output logic [3:0]              ap_cur_node [AP_NTHR],
  output logic [AP_NTHR-1:0]      ap_in_node,
  output logic [2:0]              ap_stat,
  // split_bus_converter
  input  logic [SB_NRX-1:0]       sb_rx_valid,
  input  logic [W-1:0]            sb_rx_data [SB_NRX],
  output logic [SB_NRX-1:0]       sb_rx_ready,
  output logic [SB_NTX-1:0]       sb_tx_valid,
  output logic [W-1:0]            sb_tx_data [SB_NTX],
  input  logic [SB_NTX-1:0]       sb_tx_ready,
  input  logic                    sb_path_we,
  input  logic [$clog2(PLEN)-1:0] sb_path_waddr,
  input  logic [3:0]              sb_path_wnode,
  input  logic [$clog2(PLEN):0]   sb_path_len,
  output logic [SB_NTHR-1:0]      sb_finished,
  output logic [3:0]              sb_cur_node [SB_NTHR],
  output logic [SB_NTHR-1:0]      sb_in_node,
  output logic [2:0]              sb_stat,
  // prio_bus_converter
  input  logic [PB_NRX-1:0]       pb_rx_valid,
  input  logic [W-1:0]            pb_rx_data [PB_NRX],
  output logic [PB_NRX-1:0]       pb_rx_ready,
  output logic [PB_NTX-1:0]       pb_tx_valid,
  output logic [W-1:0]            pb_tx_data [PB_NTX],
  input  logic [PB_NTX-1:0]       pb_tx_ready,
  input  logic                    pb_path_we,
  input  logic [$clog2(PLEN)-1:0] pb_path_waddr,
  input  logic [3:0]              pb_path_wnode,
  input  logic [$clog2(PLEN):0]   pb_path_len,
  output logic [PB_NTHR-1:0]      pb_finished,
  output logic [3:0]              pb_cur_node [PB_NTHR],
  output logic [PB_NTHR-1:0]      pb_in_node,
  output logic [2:0]              pb_stat,
  // rw_overlap_converter
  input  logic [RW_NRX-1:0]       rw_rx_valid,
  input  logic [W-1:0]            rw_rx_data [RW_NRX],
  output logic [RW_NRX-1:0]       rw_rx_ready,
  output logic [RW_NTX-1:0]       rw_tx_valid,
  output logic [W-1:0]            rw_tx_data [RW_NTX],
  input  logic [RW_NTX-1:0]       rw_tx_ready,
  input  logic                    rw_path_we,
  input  logic [$clog2(PLEN)-1:0] rw_path_waddr,
  input  logic [3:0]              rw_path_wnode,
  input  logic [$clog2(PLEN):0]   rw_path_len,
  output logic [RW_NTHR-1:0]      rw_finished,
  output logic [3:0]              rw_cur_node [RW_NTHR],
  output logic [RW_NTHR-1:0]      rw_in_node,
  output logic [2:0]              rw_stat,
  // split2_bus_converter
  input  logic [S2_NRX-1:0]       s2_rx_valid,
  input  logic [W-1:0]            s2_rx_data [S2_NRX],
  output logic [S2_NRX-1:0]       s2_rx_ready,
  output logic [S2_NTX-1:0]       s2_tx_valid,
  output logic [W-1:0]            s2_tx_data [S2_NTX],
  input  logic [S2_NTX-1:0]       s2_tx_ready,
  input  logic                    s2_path_we,
  input  logic [$clog2(PLEN)-1:0] s2_path_waddr,
  input  logic [3:0]              s2_path_wnode,
  input  logic [$clog2(PLEN):0]   s2_path_len,
  output logic [S2_NTHR-1:0]      s2_finished,
  output logic [3:0]              s2_cur_node [S2_NTHR],
  output logic [S2_NTHR-1:0]      s2_in_node,
  output logic [2:0]              s2_stat
);

  // <ex>_stat: bit 0 RUN-channel wait, bit 1 monitor block, bit 2 queue-full stall

  pq_converter #(.W(W), .PLEN(PLEN), .QDEPTH(QDEPTH)) u_pq (
    .clk, .rst_n,
    .rx_valid(pq_rx_valid), .rx_data(pq_rx_data), .rx_ready(pq_rx_ready),
    .tx_valid(pq_tx_valid), .tx_data(pq_tx_data), .tx_ready(pq_tx_ready),
    .path_we(pq_path_we), .path_waddr(pq_path_waddr), .path_wnode(pq_path_wnode),
    .path_len(pq_path_len), .finished(pq_finished), .cur_node(pq_cur_node),
    .in_node(pq_in_node), .stat_run_wait(pq_stat[0]), .stat_mon_block(pq_stat[1]),
    .stat_q_stall(pq_stat[2])
  );

  ackpull_converter #(.W(W), .PLEN(PLEN), .QDEPTH(QDEPTH)) u_ap (
    .clk, .rst_n,
    .rx_valid(ap_rx_valid), .rx_data(ap_rx_data), .rx_ready(ap_rx_ready),
    .tx_valid(ap_tx_valid), .tx_data(ap_tx_data), .tx_ready(ap_tx_ready),
    .path_we(ap_path_we), .path_waddr(ap_path_waddr), .path_wnode(ap_path_wnode),
    .path_len(ap_path_len), .finished(ap_finished), .cur_node(ap_cur_node),
    .in_node(ap_in_node), .stat_run_wait(ap_stat[0]), .stat_mon_block(ap_stat[1]),
    .stat_q_stall(ap_stat[2])
  );

  split_bus_converter #(.W(W), .PLEN(PLEN), .QDEPTH(QDEPTH)) u_sb (
    .clk, .rst_n,
    .rx_valid(sb_rx_valid), .rx_data(sb_rx_data), .rx_ready(sb_rx_ready),
    .tx_valid(sb_tx_valid), .tx_data(sb_tx_data), .tx_ready(sb_tx_ready),
    .path_we(sb_path_we), .path_waddr(sb_path_waddr), .path_wnode(sb_path_wnode),
    .path_len(sb_path_len), .finished(sb_finished), .cur_node(sb_cur_node),
    .in_node(sb_in_node), .stat_run_wait(sb_stat[0]), .stat_mon_block(sb_stat[1]),
    .stat_q_stall(sb_stat[2])
  );

  prio_bus_converter #(.W(W), .PLEN(PLEN), .QDEPTH(QDEPTH)) u_pb (
    .clk, .rst_n,
    .rx_valid(pb_rx_valid), .rx_data(pb_rx_data), .rx_ready(pb_rx_ready),
    .tx_valid(pb_tx_valid), .tx_data(pb_tx_data), .tx_ready(pb_tx_ready),
    .path_we(pb_path_we), .path_waddr(pb_path_waddr), .path_wnode(pb_path_wnode),
    .path_len(pb_path_len), .finished(pb_finished), .cur_node(pb_cur_node),
    .in_node(pb_in_node), .stat_run_wait(pb_stat[0]), .stat_mon_block(pb_stat[1]),
    .stat_q_stall(pb_stat[2])
  );

  rw_overlap_converter #(.W(W), .PLEN(PLEN), .QDEPTH(QDEPTH)) u_rw (
    .clk, .rst_n,
    .rx_valid(rw_rx_valid), .rx_data(rw_rx_data), .rx_ready(rw_rx_ready),
    .tx_valid(rw_tx_valid), .tx_data(rw_tx_data), .tx_ready(rw_tx_ready),
    .path_we(rw_path_we), .path_waddr(rw_path_waddr), .path_wnode(rw_path_wnode),
    .path_len(rw_path_len), .finished(rw_finished), .cur_node(rw_cur_node),
    .in_node(rw_in_node), .stat_run_wait(rw_stat[0]), .stat_mon_block(rw_stat[1]),
    .stat_q_stall(rw_stat[2])
  );

  split2_bus_converter #(.W(W), .PLEN(PLEN), .QDEPTH(QDEPTH)) u_s2 (
    .clk, .rst_n,
    .rx_valid(s2_rx_valid), .rx_data(s2_rx_data), .rx_ready(s2_rx_ready),
    .tx_valid(s2_tx_valid), .tx_data(s2_tx_data), .tx_ready(s2_tx_ready),
    .path_we(s2_path_we), .path_waddr(s2_path_waddr), .path_wnode(s2_path_wnode),
    .path_len(s2_path_len), .finished(s2_finished), .cur_node(s2_cur_node),
    .in_node(s2_in_node), .stat_run_wait(s2_stat[0]), .stat_mon_block(s2_stat[1]),
    .stat_q_stall(s2_stat[2])
  );

endmodule
