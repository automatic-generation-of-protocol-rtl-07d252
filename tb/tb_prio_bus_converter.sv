// tb_prio_bus_converter: self-checking testbench for prio_bus_converter.
//
// Drives the path B D A D C E A D of the document's simulation run.  Checks
// that each master's transfer reaches the slave unchanged and in order, and
// that grant/nogrant go to the master the path's nodes name.
//
// The components are modelled as concurrent processes, each walking through
// its own view of the nodes on the path; messages are valid/ready handshakes
// driven on the falling clock edge and sampled just before the rising edge.
// A watchdog ends the run with a failure if the exchange does not complete.
`timescale 1ns/1ps
module tb_prio_bus_converter;
  import conv_pkg::*;
  import conv_ex_pkg::*;

  localparam int W = 32, PLEN = 32;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [PB_NRX-1:0]       rx_valid = '0;
  logic [W-1:0]            rx_data [PB_NRX];
  logic [PB_NRX-1:0]       rx_ready;
  logic [PB_NTX-1:0]       tx_valid;
  logic [W-1:0]            tx_data [PB_NTX];
  logic [PB_NTX-1:0]       tx_ready = '0;
  logic                    path_we = 1'b0;
  logic [$clog2(PLEN)-1:0] path_waddr = '0;
  logic [3:0]              path_wnode = '0;
  logic [$clog2(PLEN):0]   path_len = '0;
  logic [PB_NTHR-1:0]      finished;
  logic [3:0]              cur_node [PB_NTHR];
  logic [PB_NTHR-1:0]      in_node;
  logic                    stat_run_wait, stat_mon_block, stat_q_stall;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  prio_bus_converter dut (.*);

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
    for (int i = 0; i < PB_NRX; i++) rx_data[i] = '0;
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  // The path of the document's simulation run: B D A D C E A D
  int path [] = '{NODE_B, NODE_D, NODE_A, NODE_D, NODE_C, NODE_E, NODE_A, NODE_D};
  logic [W-1:0] exp_d [$], exp_e [$];
  int n_grant1 = 0, n_grant2 = 0, n_nogrant1 = 0, n_nogrant2 = 0;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    load_path(path);
    fork
      begin : m1
        logic [W-1:0] d, v; int at;
        foreach (path[i]) begin
          case (path[i])
            NODE_A: send(PB_RX_M1_REQ1_A, 1, at);
            NODE_B: send(PB_RX_M1_REQ1_B, 1, at);
            NODE_C: send(PB_RX_M1_REQ0_C, 1, at);
            NODE_D: begin
              recv(PB_TX_M1_GRANT_D, d, at); n_grant1++;
              v = $urandom(); exp_d.push_back(v);
              send(PB_RX_M1_TRANSFER_D, v, at);
              recv(PB_TX_M1_OK_D, d, at);
            end
            NODE_E: begin recv(PB_TX_M1_NOGRANT_E, d, at); n_nogrant1++; end
            default: ;
          endcase
        end
      end
      begin : m2
        logic [W-1:0] d, v; int at;
        foreach (path[i]) begin
          case (path[i])
            NODE_A: send(PB_RX_M2_REQ1_A, 1, at);
            NODE_B: send(PB_RX_M2_REQ0_B, 1, at);
            NODE_C: send(PB_RX_M2_REQ1_C, 1, at);
            NODE_D: begin recv(PB_TX_M2_NOGRANT_D, d, at); n_nogrant2++; end
            NODE_E: begin
              recv(PB_TX_M2_GRANT_E, d, at); n_grant2++;
              v = $urandom(); exp_e.push_back(v);
              send(PB_RX_M2_TRANSFER_E, v, at);
              recv(PB_TX_M2_OK_E, d, at);
            end
            default: ;
          endcase
        end
      end
      begin : slave
        logic [W-1:0] d; int at, kd, ke;
        kd = 0; ke = 0;
        foreach (path[i]) begin
          case (path[i])
            NODE_D: begin
              repeat (5) @(negedge clk);
              recv(PB_TX_S_TRANSFER_D, d, at);
              check(d == exp_d[kd], $sformatf("m1 transfer %0d reaches the slave", kd));
              kd++;
              send(PB_RX_S_OK_D, 1, at);
            end
            NODE_E: begin
              recv(PB_TX_S_TRANSFER_E, d, at);
              check(d == exp_e[ke], $sformatf("m2 transfer %0d reaches the slave", ke));
              ke++;
              send(PB_RX_S_OK_E, 1, at);
            end
            default: ;
          endcase
        end
      end
    join
    repeat (4) @(negedge clk);
    check(n_grant1 == 3 && n_nogrant2 == 3, "m1 granted in the three D nodes");
    check(n_grant2 == 1 && n_nogrant1 == 1, "m2 granted in the E node");
    check(finished == '1, "all threads reached the end of the path");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
