// packet_processor: the central block of the controller. It receives the
// byte stream of DXL2 request packets from the host interface, sends each
// packet to the device buses it concerns, and returns the servos' status
// packets to the host interface.
//
// Structure (as the design draws it): packet detector -> packet FIFO ->
// distributor, with the packet info store beside the FIFO feeding both the
// distributor and the collector; the collector keeps the device buses state
// up to date and the distributor consults it. All of the processor's outside
// connections are FIFO ports: the host-side incoming FIFO (read side), the
// host-side outgoing FIFO (write side), and per bus a transmit FIFO (write
// side) and a receive FIFO (read side).
//
// PKT_DEPTH bounds the longest packet (LENGTH-2 instruction and parameter
// bytes); INFO_DEPTH the number of analysed packets waiting. Both depths and
// the response TIMEOUT are this design's own.
module packet_processor #(
  parameter int unsigned NUM_BUSES  = 4,
  parameter int unsigned PKT_DEPTH  = 1024,
  parameter int unsigned INFO_DEPTH = 16,
  parameter int unsigned TIMEOUT    = 50000
) (
  input  logic                      clk,
  input  logic                      rst,
  // host side
  input  logic [7:0]                in_data,
  input  logic                      in_empty,
  output logic                      in_read,
  output logic [7:0]                out_data,
  output logic                      out_write,
  input  logic                      out_full,
  // device bus side
  output logic [NUM_BUSES-1:0][7:0] tx_data,
  output logic [NUM_BUSES-1:0]      tx_write,
  input  logic [NUM_BUSES-1:0]      tx_full,
  input  logic [NUM_BUSES-1:0][7:0] rx_data,
  input  logic [NUM_BUSES-1:0]      rx_empty,
  output logic [NUM_BUSES-1:0]      rx_read,
  input  logic [NUM_BUSES-1:0]      tx_active,
  input  logic [NUM_BUSES-1:0]      rx_active,
  // statistics
  output logic [15:0]               crc_errors,
  output logic [15:0]               packets_sent,
  output logic [15:0]               packets_dropped,
  output logic [15:0]               packets_forwarded,
  output logic [15:0]               timeouts
);
  localparam int unsigned BW = $clog2(NUM_BUSES > 1 ? NUM_BUSES : 2);

  // packet FIFO
  logic [NUM_BUSES+7:0] pw_data, pr_data;
  logic                 pw_write, pw_full, pr_read, pr_empty;
  // ID map
  logic [7:0]           lookup_id;
  logic [NUM_BUSES-1:0] lookup_mask;
  logic                 learn_valid;
  logic [7:0]           learn_id;
  logic [BW-1:0]        learn_bus;
  // packet info
  logic                       iw_write, iw_full, iw_crc_ok;
  logic [7:0]                 iw_inst, iw_id;
  logic [15:0]                iw_length;
  logic [NUM_BUSES-1:0]       iw_target;
  logic [NUM_BUSES-1:0][15:0] iw_bus_length;
  logic [NUM_BUSES-1:0][7:0]  iw_expect;
  logic                       ir_valid, ir_read, ir_crc_ok;
  logic [7:0]                 ir_inst, ir_id;
  logic [15:0]                ir_length;
  logic [NUM_BUSES-1:0]       ir_target;
  logic [NUM_BUSES-1:0][15:0] ir_bus_length;
  logic [NUM_BUSES-1:0][7:0]  ir_expect;
  logic                       taken;
  // device buses state
  logic                       arm_valid;
  logic [NUM_BUSES-1:0]       arm_mask, done, timeout, bus_busy;
  logic [NUM_BUSES-1:0][7:0]  arm_count;

  packet_detector #(.NUM_BUSES(NUM_BUSES), .PKT_DEPTH(PKT_DEPTH)) u_detector (
    .clk, .rst,
    .in_data, .in_empty, .in_read,
    .pkt_data (pw_data), .pkt_write (pw_write), .pkt_full (pw_full),
    .lookup_id, .lookup_mask,
    .info_write (iw_write), .info_full (iw_full), .info_crc_ok (iw_crc_ok),
    .info_inst (iw_inst), .info_id (iw_id), .info_length (iw_length),
    .info_target (iw_target), .info_bus_length (iw_bus_length), .info_expect (iw_expect),
    .crc_errors
  );

  sync_fifo #(.DEPTH(PKT_DEPTH), .ELEMENT_SIZE(NUM_BUSES + 8)) u_pkt_fifo (
    .clk, .rst,
    .write_enable (pw_write), .data_write (pw_data),
    .read_enable  (pr_read),  .data_read  (pr_data),
    .full (pw_full), .empty (pr_empty)
  );

  packet_info_fifo #(.NUM_BUSES(NUM_BUSES), .DEPTH(INFO_DEPTH)) u_info (
    .clk, .rst,
    .write (iw_write), .full (iw_full),
    .w_crc_ok (iw_crc_ok), .w_inst (iw_inst), .w_id (iw_id), .w_length (iw_length),
    .w_target (iw_target), .w_bus_length (iw_bus_length), .w_expect (iw_expect),
    .valid (ir_valid), .read (ir_read),
    .r_crc_ok (ir_crc_ok), .r_inst (ir_inst), .r_id (ir_id), .r_length (ir_length),
    .r_target (ir_target), .r_bus_length (ir_bus_length), .r_expect (ir_expect)
  );

  distributor #(.NUM_BUSES(NUM_BUSES)) u_distributor (
    .clk, .rst,
    .info_valid (ir_valid), .info_read (ir_read), .info_crc_ok (ir_crc_ok),
    .info_id (ir_id), .info_length (ir_length), .info_target (ir_target),
    .info_bus_length (ir_bus_length), .taken,
    .pkt_data (pr_data), .pkt_empty (pr_empty), .pkt_read (pr_read),
    .bus_busy,
    .tx_data, .tx_write, .tx_full,
    .packets_sent, .packets_dropped
  );

  dev_bus_state #(.NUM_BUSES(NUM_BUSES)) u_state (
    .clk, .rst,
    .lookup_id, .lookup_mask,
    .learn_valid, .learn_id, .learn_bus,
    .arm_valid, .arm_mask, .arm_count,
    .done, .timeout, .busy (bus_busy)
  );

  collector #(.NUM_BUSES(NUM_BUSES), .TIMEOUT(TIMEOUT)) u_collector (
    .clk, .rst,
    .rx_data, .rx_empty, .rx_read,
    .tx_active, .rx_active,
    .out_data, .out_write, .out_full,
    .taken, .info_target (ir_target), .info_expect (ir_expect),
    .arm_valid, .arm_mask, .arm_count, .done, .timeout,
    .bus_busy,
    .learn_valid, .learn_id, .learn_bus,
    .packets_forwarded, .timeouts
  );

  // The instruction travels in the packet bytes; the record's copy is unused.
  logic [7:0] unused_inst;
  assign unused_inst = ir_inst;
endmodule
