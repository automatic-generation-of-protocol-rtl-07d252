// tb_ackpull_converter: self-checking testbench for ackpull_converter.
//
// Runs set-up, transfer, release, then set-up with two error recoveries
// before the transfer.  The receiver is slow, so the behavioural monitor has
// to hold the sender's ack until data has been delivered; every ack is
// checked to come after its data and every data to carry the sender's msg.
//
// The components are modelled as concurrent processes, each walking through
// its own view of the nodes on the path; messages are valid/ready handshakes
// driven on the falling clock edge and sampled just before the rising edge.
// A watchdog ends the run with a failure if the exchange does not complete.
`timescale 1ns/1ps
module tb_ackpull_converter;
  import conv_pkg::*;
  import conv_ex_pkg::*;

  localparam int W = 32, PLEN = 32;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [AP_NRX-1:0]       rx_valid = '0;
  logic [W-1:0]            rx_data [AP_NRX];
  logic [AP_NRX-1:0]       rx_ready;
  logic [AP_NTX-1:0]       tx_valid;
  logic [W-1:0]            tx_data [AP_NTX];
  logic [AP_NTX-1:0]       tx_ready = '0;
  logic                    path_we = 1'b0;
  logic [$clog2(PLEN)-1:0] path_waddr = '0;
  logic [3:0]              path_wnode = '0;
  logic [$clog2(PLEN):0]   path_len = '0;
  logic [AP_NTHR-1:0]      finished;
  logic [3:0]              cur_node [AP_NTHR];
  logic [AP_NTHR-1:0]      in_node;
  logic                    stat_run_wait, stat_mon_block, stat_q_stall;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  ackpull_converter dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (cycle %0d)", what, cycle);
    end
  endtask

  // Component sends message ch with content d; returns the cycle it was taken.
  task automatic send(input int ch, input logic [W-1:0] d, output int at);
    bit hs;
    @(negedge clk);
    rx_valid[ch] = 1'b1;
    rx_data[ch]  = d;
    do begin
      #1 hs = rx_ready[ch];
      at = cycle;
      @(negedge clk);
    end while (!hs);
    rx_valid[ch] = 1'b0;
  endtask

  // Component waits for message ch; returns its content and the cycle.
  task automatic recv(input int ch, output logic [W-1:0] d, output int at);
    bit hs;
    @(negedge clk);
    tx_ready[ch] = 1'b1;
    do begin
      #1 hs = tx_valid[ch];
      d  = tx_data[ch];
      at = cycle;
      @(negedge clk);
    end while (!hs);
    tx_ready[ch] = 1'b0;
  endtask

  task automatic load_path(input int nodes[]);
    foreach (nodes[i]) begin
      @(negedge clk);
      path_we    = 1'b1;
      path_waddr = ($clog2(PLEN))'(i);
      path_wnode = 4'(nodes[i]);
    end
    @(negedge clk);
    path_we  = 1'b0;
    path_len = ($clog2(PLEN)+1)'(nodes.size());
  endtask

  int n_run_wait = 0, n_mon_block = 0;
  always @(posedge clk) begin
    if (stat_run_wait)  n_run_wait  <= n_run_wait + 1;
    if (stat_mon_block) n_mon_block <= n_mon_block + 1;
  end

  initial begin
    for (int i = 0; i < AP_NRX; i++) rx_data[i] = '0;
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  int path [] = '{AP_SETUP, AP_TRANSFER, AP_RELEASE, AP_SETUP, AP_ERROR, AP_ERROR,
                  AP_TRANSFER, AP_RELEASE, AP_SETUP, AP_TRANSFER, AP_RELEASE};
  logic [W-1:0] sent [$];
  int t_data [$], t_ack [$];
  int n_err = 0;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    load_path(path);
    fork
      begin : sender
        logic [W-1:0] d, v; int at;
        foreach (path[i]) begin
          case (path[i])
            AP_TRANSFER: begin
              v = $urandom();
              sent.push_back(v);
              send(AP_RX_S_MSG, v, at);
              recv(AP_TX_S_ACK, d, at);
              t_ack.push_back(at);
              check(d == 1, "ack is a control message");
            end
            AP_ERROR: begin
              send(AP_RX_S_ERR, 1, at);
              recv(AP_TX_S_NACK, d, at);
              check(d == 1, "nack is generated");
              n_err++;
            end
            default: ;
          endcase
        end
      end
      begin : receiver
        logic [W-1:0] d; int at, k;
        k = 0;
        foreach (path[i]) begin
          case (path[i])
            AP_SETUP:    send(AP_RX_R_PULL, 1, at);
            AP_TRANSFER: begin
              repeat (6) @(negedge clk);          // slow receiver
              recv(AP_TX_R_DATA, d, at);
              t_data.push_back(at);
              check(d == sent[k], $sformatf("data %0d carries the sender's msg", k));
              k++;
            end
            AP_RELEASE:  begin
              recv(AP_TX_R_END, d, at);
              check(d == 1, "end is generated");
            end
            default: ;
          endcase
        end
      end
    join
    repeat (4) @(negedge clk);
    check(t_ack.size() == 3 && t_data.size() == 3, "three transfers");
    foreach (t_ack[k])
      check(t_ack[k] > t_data[k], $sformatf("ack %0d only after data was delivered", k));
    check(n_err == 2, "two error recoveries");
    check(finished == '1, "both threads reached the end of the path");
    check(n_mon_block > 0, "the monitor held ack back");
    $display("mon_block_cycles=%0d", n_mon_block);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
