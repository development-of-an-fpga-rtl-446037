// tb_packet_detector: feeds hand-built packets (with noise between them) to
// the detector, with a fixed ID map (ID 6 and 9 on bus 2, ID 7 on bus 1,
// other IDs unknown), and compares the packet-FIFO bytes with their bus tags
// and the info records with values worked out by hand:
//   PING to unknown ID 5, READ to ID 6, SYNC_READ of IDs 6 7 8 9,
//   SYNC_WRITE of 2 bytes to IDs 6 7, a broadcast PING, a packet with a bad
//   CRC and one with LENGTH 2 (dropped at once).
// With input always available it must take one byte per cycle.
`timescale 1ns/1ps
module tb_packet_detector;
  import dxl_tb_pkg::*;
  localparam int NB = 4;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = !clk;

  logic [7:0]          in_data, lookup_id, info_inst, info_id;
  logic                in_empty, in_read, pkt_write, pkt_full = 1'b0;
  logic [NB+7:0]       pkt_data;
  logic [NB-1:0]       lookup_mask, info_target;
  logic                info_write, info_full = 1'b0, info_crc_ok;
  logic [15:0]         info_length, crc_errors;
  logic [NB-1:0][15:0] info_bus_length;
  logic [NB-1:0][7:0]  info_expect;

  packet_detector #(.NUM_BUSES(NB), .PKT_DEPTH(64)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [7:0] inq[$];
  assign in_empty = (inq.size() == 0);
  assign in_data  = in_empty ? 8'h00 : inq[0];
  int pops = 0;
  // handshakes are sampled mid-cycle, when they are settled
  logic in_read_q = 1'b0;
  always @(negedge clk) in_read_q = in_read && !rst;
  always @(posedge clk) #1 if (in_read_q) begin void'(inq.pop_front()); pops++; end

  always_comb begin
    case (lookup_id)
      8'd6, 8'd9: lookup_mask = 4'b0100;
      8'd7:       lookup_mask = 4'b0010;
      default:    lookup_mask = 4'b0000;
    endcase
  end

  logic [NB+7:0] pkts[$];
  typedef struct {
    bit ok; logic [7:0] inst, id; logic [15:0] len; logic [NB-1:0] tgt;
    logic [NB-1:0][15:0] bl; logic [NB-1:0][7:0] ex;
  } rec_t;
  rec_t infos[$];
  always @(posedge clk) if (!rst) begin
    if (pkt_write) pkts.push_back(pkt_data);
    if (info_write) infos.push_back('{info_crc_ok, info_inst, info_id, info_length,
                                      info_target, info_bus_length, info_expect});
  end

  task automatic expect_bytes(input logic [NB-1:0] tags[$], input byte_q_t bytes, input string what);
    check(pkts.size() == bytes.size(), {what, ": byte count"});
    foreach (bytes[i]) if (i < pkts.size())
      check(pkts[i] == {tags[i], bytes[i]}, {what, ": byte and tag"});
    pkts = {};
  endtask

  task automatic feed(byte_q_t q);
    foreach (q[i]) inq.push_back(q[i]);
    while (inq.size() > 0) @(negedge clk);
    repeat (3) @(negedge clk);
  endtask

  initial begin
    byte_q_t p;
    logic [NB-1:0] t[$];
    int c0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);

    // PING to unknown ID 5, after noise
    feed('{8'h12, 8'hFF, 8'h00, 8'hFF, 8'hFF, 8'h44});
    feed(make_packet(8'd5, 8'h01, '{}));
    check(infos.size() == 1, "PING: one record");
    if (infos.size() > 0)
      check(infos[0] == '{1'b1, 8'h01, 8'd5, 16'd3, 4'b1111, {4{16'd3}}, {4{8'd1}}}, "PING: record");
    expect_bytes('{4'hF}, '{8'h01}, "PING");
    infos = {};

    // READ to ID 6 (bus 2), timed
    p = make_packet(8'd6, 8'h02, '{8'd132, 8'd0, 8'd4, 8'd0});
    foreach (p[i]) inq.push_back(p[i]);
    c0 = pops;
    repeat (p.size()) @(negedge clk);
    #2 check(pops - c0 == p.size(), "one byte per cycle");
    repeat (3) @(negedge clk);
    if (infos.size() > 0)
      check(infos[0] == '{1'b1, 8'h02, 8'd6, 16'd7, 4'b0100, {4{16'd7}}, {4{8'd1}}}, "READ: record");
    expect_bytes('{4'hF, 4'hF, 4'hF, 4'hF, 4'hF}, '{8'h02, 8'd132, 8'd0, 8'd4, 8'd0}, "READ");
    infos = {};

    // SYNC_READ of IDs 6 7 8 9
    feed(make_packet(8'hFE, 8'h82, '{8'd132, 8'd0, 8'd4, 8'd0, 8'd6, 8'd7, 8'd8, 8'd9}));
    if (infos.size() > 0)
      check(infos[0] == '{1'b1, 8'h82, 8'hFE, 16'd11, 4'b1111,
                          {16'd8, 16'd10, 16'd9, 16'd8}, {8'd1, 8'd3, 8'd2, 8'd1}},
            "SYNC_READ: record");
    expect_bytes('{4'hF, 4'hF, 4'hF, 4'hF, 4'hF, 4'b0100, 4'b0010, 4'b1111, 4'b0100},
                 '{8'h82, 8'd132, 8'd0, 8'd4, 8'd0, 8'd6, 8'd7, 8'd8, 8'd9}, "SYNC_READ");
    infos = {};

    // SYNC_WRITE of 2 bytes to IDs 6 7
    feed(make_packet(8'hFE, 8'h83, '{8'd10, 8'd0, 8'd2, 8'd0, 8'd6, 8'hA1, 8'hA2, 8'd7, 8'hB1, 8'hB2}));
    if (infos.size() > 0)
      check(infos[0] == '{1'b1, 8'h83, 8'hFE, 16'd13, 4'b0110,
                          {16'd7, 16'd10, 16'd10, 16'd7}, {4{8'd0}}}, "SYNC_WRITE: record");
    expect_bytes('{4'hF, 4'hF, 4'hF, 4'hF, 4'hF, 4'b0100, 4'b0100, 4'b0100, 4'b0010, 4'b0010, 4'b0010},
                 '{8'h83, 8'd10, 8'd0, 8'd2, 8'd0, 8'd6, 8'hA1, 8'hA2, 8'd7, 8'hB1, 8'hB2}, "SYNC_WRITE");
    infos = {};

    // broadcast PING
    feed(make_packet(8'hFE, 8'h01, '{}));
    if (infos.size() > 0)
      check(infos[0] == '{1'b1, 8'h01, 8'hFE, 16'd3, 4'b1111, {4{16'd3}}, {4{8'hFF}}}, "broadcast PING: record");
    pkts = {};
    infos = {};

    // bad CRC
    p = make_packet(8'd7, 8'h03, '{8'd1, 8'd0, 8'd5});
    p[p.size()-2] ^= 8'h80;
    feed(p);
    check(infos.size() == 1 && !infos[0].ok && crc_errors == 1, "bad CRC flagged");
    pkts = {};
    infos = {};

    // LENGTH 2: dropped, next packet still found
    feed('{8'hFF, 8'hFF, 8'hFD, 8'h00, 8'd7, 8'd2, 8'd0});
    check(infos.size() == 0 && pkts.size() == 0, "short packet dropped");
    feed(make_packet(8'd7, 8'h01, '{}));
    check(infos.size() == 1 && infos[0].ok && infos[0].tgt == 4'b0010, "packet after a dropped one");

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
