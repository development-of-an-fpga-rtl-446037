// tb_packet_processor: the packet processor with two buses and TIMEOUT = 300,
// its FIFO ports played by queues; the test answers for the servos itself.
//   1. PING to the unknown ID 4: both buses get the packet unchanged; the
//      answer from bus 1 reaches the host and bus 0 is released by timeout.
//   2. two READs to ID 4: only bus 1 gets them (ID 4 was learned), and the
//      second is held back until the first has been answered.
//   3. SYNC_READ of IDs 4 and 8 (8 unknown): bus 0 gets a packet for ID 8,
//      bus 1 one for IDs 4 and 8, each with its own LENGTH and CRC.
//   4. a packet with a bad CRC reaches no bus.
`timescale 1ns/1ps
module tb_packet_processor;
  import dxl_tb_pkg::*;
  localparam int NB = 2, TO = 300;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = !clk;

  logic [7:0]         in_data, out_data;
  logic               in_empty, in_read, out_write, out_full = 1'b0;
  logic [NB-1:0][7:0] tx_data, rx_data;
  logic [NB-1:0]      tx_write, tx_full = '0, rx_empty, rx_read, tx_active = '0, rx_active = '0;
  logic [15:0]        crc_errors, packets_sent, packets_dropped, packets_forwarded, timeouts;

  packet_processor #(.NUM_BUSES(NB), .PKT_DEPTH(64), .INFO_DEPTH(4), .TIMEOUT(TO)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  byte_q_t inq, outlog;
  byte_q_t rxq [NB];
  byte_q_t txlog [NB];
  assign in_empty = inq.size() == 0;
  assign in_data  = in_empty ? 8'h00 : inq[0];
  always_comb for (int k = 0; k < NB; k++) begin
    rx_empty[k] = rxq[k].size() == 0;
    rx_data[k]  = rx_empty[k] ? 8'h00 : rxq[k][0];
  end
  // handshakes are sampled mid-cycle, when they are settled
  logic          in_q = 1'b0;
  logic [NB-1:0] rd_q = '0;
  always @(negedge clk) begin
    in_q = in_read && !rst;
    rd_q = rst ? '0 : rx_read;
  end
  always @(posedge clk) begin
    #1;
    if (in_q) void'(inq.pop_front());
    for (int k = 0; k < NB; k++) if (rd_q[k]) void'(rxq[k].pop_front());
  end
  always @(posedge clk) if (!rst) begin
    if (out_write) outlog.push_back(out_data);
    for (int k = 0; k < NB; k++) if (tx_write[k]) txlog[k].push_back(tx_data[k]);
  end

  task automatic host(byte_q_t q);
    foreach (q[i]) inq.push_back(q[i]);
  endtask
  task automatic answer(int bus, byte_q_t q);
    foreach (q[i]) rxq[bus].push_back(q[i]);
  endtask

  initial begin
    byte_q_t p, s4, s8, rd;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);

    // 1. PING to unknown ID 4
    p = make_packet(8'd4, 8'h01, '{});
    host(p);
    repeat (40) @(negedge clk);
    check(txlog[0] == p && txlog[1] == p, "unknown ID: PING on both buses");
    s4 = make_packet(8'd4, 8'h55, '{8'h00, 8'h06, 8'h04, 8'h26});
    answer(1, s4);
    repeat (40) @(negedge clk);
    check(outlog == s4, "PING answer to host");
    check(dut.bus_busy == 2'b01, "bus 0 still waiting");
    repeat (TO + 20) @(negedge clk);
    check(dut.bus_busy == 2'b00 && timeouts == 1, "bus 0 released by timeout");
    txlog[0] = {}; txlog[1] = {}; outlog = {};

    // 2. two READs to ID 4
    rd = make_packet(8'd4, 8'h02, '{8'd36, 8'd0, 8'd2, 8'd0});
    host(rd);
    host(rd);
    repeat (100) @(negedge clk);
    check(txlog[0].size() == 0, "known ID: nothing on bus 0");
    check(txlog[1] == rd, "first READ sent, second held");
    p = make_packet(8'd4, 8'h55, '{8'h00, 8'h11, 8'h22});
    answer(1, p);
    repeat (60) @(negedge clk);
    check(txlog[1].size() == 2 * rd.size(), "second READ sent after the answer");
    answer(1, p);
    repeat (60) @(negedge clk);
    check(outlog.size() == 2 * p.size() && packets_forwarded == 3, "both answers to host");
    txlog[0] = {}; txlog[1] = {}; outlog = {};

    // 3. SYNC_READ of IDs 4 and 8
    host(make_packet(8'hFE, 8'h82, '{8'd36, 8'd0, 8'd2, 8'd0, 8'd4, 8'd8}));
    repeat (60) @(negedge clk);
    check(txlog[0] == make_packet(8'hFE, 8'h82, '{8'd36, 8'd0, 8'd2, 8'd0, 8'd8}), "bus 0 SYNC_READ");
    check(txlog[1] == make_packet(8'hFE, 8'h82, '{8'd36, 8'd0, 8'd2, 8'd0, 8'd4, 8'd8}), "bus 1 SYNC_READ");
    s8 = make_packet(8'd8, 8'h55, '{8'h00, 8'h33, 8'h44});
    answer(1, p);
    answer(0, s8);
    repeat (100) @(negedge clk);
    check(outlog.size() == p.size() + s8.size(), "SYNC_READ answers to host");
    check(dut.u_state.id_map[8] == 2'b01, "ID 8 learned on bus 0");
    repeat (TO + 20) @(negedge clk);
    txlog[0] = {}; txlog[1] = {}; outlog = {};

    // 4. bad CRC
    p = make_packet(8'd4, 8'h03, '{8'd1, 8'd0, 8'd5});
    p[p.size()-1] ^= 8'h01;
    host(p);
    repeat (60) @(negedge clk);
    check(txlog[0].size() == 0 && txlog[1].size() == 0, "bad CRC reaches no bus");
    check(crc_errors == 1 && packets_dropped == 1, "bad CRC counted");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
