// tb_distributor: presents packet-info records and tagged packet bytes as the
// packet detector would produce them and checks the packets written into the
// four transmit FIFOs against packets built independently:
//   a SYNC_READ of IDs 6 7 8 9 split over the buses (8 unknown, so on all),
//   a READ held back while its bus is busy, a packet with a bad CRC (drained,
//   nothing sent), and a SYNC_WRITE sent while one transmit FIFO is full
//   part of the time. Without stalls a packet of LENGTH L takes L+7 cycles.
`timescale 1ns/1ps
module tb_distributor;
  import dxl_tb_pkg::*;
  localparam int NB = 4;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = !clk;

  logic                info_valid, info_read, info_crc_ok, taken;
  logic [7:0]          info_id;
  logic [15:0]         info_length, packets_sent, packets_dropped;
  logic [NB-1:0]       info_target, bus_busy = '0, tx_write, tx_full = '0;
  logic [NB-1:0][15:0] info_bus_length;
  logic [NB+7:0]       pkt_data;
  logic                pkt_empty, pkt_read;
  logic [NB-1:0][7:0]  tx_data;

  distributor #(.NUM_BUSES(NB)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  typedef struct {
    bit ok; logic [7:0] id; logic [15:0] len; logic [NB-1:0] tgt; logic [NB-1:0][15:0] bl;
  } rec_t;
  rec_t infoq[$];
  logic [NB+7:0] pktq[$];
  assign info_valid      = infoq.size() > 0;
  assign info_crc_ok     = info_valid ? infoq[0].ok  : 1'b0;
  assign info_id         = info_valid ? infoq[0].id  : 8'h00;
  assign info_length     = info_valid ? infoq[0].len : 16'h0;
  assign info_target     = info_valid ? infoq[0].tgt : '0;
  assign info_bus_length = info_valid ? infoq[0].bl  : '0;
  assign pkt_empty       = pktq.size() == 0;
  assign pkt_data        = pkt_empty ? '0 : pktq[0];
  // handshakes are sampled mid-cycle, when they are settled
  logic ri = 1'b0, rp = 1'b0;
  always @(negedge clk) begin
    ri = info_read && !rst;
    rp = pkt_read && !rst;
  end
  always @(posedge clk) begin
    #1;
    if (ri) void'(infoq.pop_front());
    if (rp) void'(pktq.pop_front());
  end

  byte_q_t txlog [NB];
  int n_taken = 0, first_write = -1, last_write = -1, cyc = 0;
  always @(posedge clk) if (!rst) begin
    cyc++;
    if (taken) n_taken++;
    for (int k = 0; k < NB; k++) if (tx_write[k]) begin
      check(!tx_full[k], "no write into a full FIFO");
      txlog[k].push_back(tx_data[k]);
      if (first_write < 0) first_write = cyc;
      last_write = cyc;
    end
  end

  task automatic push(input rec_t r, input logic [NB-1:0] tags[$], input byte_q_t b);
    foreach (b[i]) pktq.push_back({tags[i], b[i]});
    infoq.push_back(r);
  endtask

  task automatic expect_bus(input int k, input byte_q_t p, input string what);
    check(txlog[k] == p, what);
    txlog[k] = {};
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);

    // SYNC_READ split
    push('{1'b1, 8'hFE, 16'd11, 4'b1111, {16'd8, 16'd10, 16'd9, 16'd8}},
         '{4'hF, 4'hF, 4'hF, 4'hF, 4'hF, 4'b0100, 4'b0010, 4'b1111, 4'b0100},
         '{8'h82, 8'd132, 8'd0, 8'd4, 8'd0, 8'd6, 8'd7, 8'd8, 8'd9});
    repeat (40) @(negedge clk);
    expect_bus(0, make_packet(8'hFE, 8'h82, '{8'd132, 8'd0, 8'd4, 8'd0, 8'd8}), "bus 0 SYNC_READ");
    expect_bus(1, make_packet(8'hFE, 8'h82, '{8'd132, 8'd0, 8'd4, 8'd0, 8'd7, 8'd8}), "bus 1 SYNC_READ");
    expect_bus(2, make_packet(8'hFE, 8'h82, '{8'd132, 8'd0, 8'd4, 8'd0, 8'd6, 8'd8, 8'd9}), "bus 2 SYNC_READ");
    expect_bus(3, make_packet(8'hFE, 8'h82, '{8'd132, 8'd0, 8'd4, 8'd0, 8'd8}), "bus 3 SYNC_READ");
    check(last_write - first_write + 1 == 11 + 7, "L+7 cycles");
    check(n_taken == 1, "taken once");

    // READ to bus 2 while bus 2 is busy
    bus_busy = 4'b0100;
    push('{1'b1, 8'd6, 16'd7, 4'b0100, {4{16'd7}}},
         '{4'hF, 4'hF, 4'hF, 4'hF, 4'hF}, '{8'h02, 8'd132, 8'd0, 8'd4, 8'd0});
    repeat (50) @(negedge clk);
    check(txlog[2].size() == 0 && n_taken == 1 && infoq.size() == 1, "held while bus busy");
    bus_busy = 4'b1011;     // other buses busy do not matter
    repeat (30) @(negedge clk);
    expect_bus(2, make_packet(8'd6, 8'h02, '{8'd132, 8'd0, 8'd4, 8'd0}), "READ after release");
    check(txlog[0].size() == 0 && txlog[1].size() == 0 && txlog[3].size() == 0, "READ only on bus 2");
    bus_busy = '0;

    // bad CRC: drained
    push('{1'b0, 8'd6, 16'd6, 4'b0100, {4{16'd6}}}, '{4'hF, 4'hF, 4'hF, 4'hF}, '{8'h03, 8'd1, 8'd0, 8'd5});
    repeat (20) @(negedge clk);
    check(pktq.size() == 0 && infoq.size() == 0 && packets_dropped == 1, "bad packet drained");
    check(txlog[2].size() == 0 && n_taken == 2, "bad packet not sent");

    // SYNC_WRITE with bus 1 FIFO full for a while
    tx_full = 4'b0010;
    push('{1'b1, 8'hFE, 16'd13, 4'b0110, {16'd7, 16'd10, 16'd10, 16'd7}},
         '{4'hF, 4'hF, 4'hF, 4'hF, 4'hF, 4'b0100, 4'b0100, 4'b0100, 4'b0010, 4'b0010, 4'b0010},
         '{8'h83, 8'd10, 8'd0, 8'd2, 8'd0, 8'd6, 8'hA1, 8'hA2, 8'd7, 8'hB1, 8'hB2});
    repeat (30) @(negedge clk);
    check(txlog[2].size() == 0, "stalled while a target FIFO is full");
    tx_full = '0;
    repeat (30) @(negedge clk);
    expect_bus(1, make_packet(8'hFE, 8'h83, '{8'd10, 8'd0, 8'd2, 8'd0, 8'd7, 8'hB1, 8'hB2}), "bus 1 SYNC_WRITE");
    expect_bus(2, make_packet(8'hFE, 8'h83, '{8'd10, 8'd0, 8'd2, 8'd0, 8'd6, 8'hA1, 8'hA2}), "bus 2 SYNC_WRITE");
    check(txlog[0].size() == 0 && txlog[3].size() == 0, "SYNC_WRITE only on buses 1 and 2");
    check(packets_sent == 3, "packets sent");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(negedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
