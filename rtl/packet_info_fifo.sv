// packet_info_fifo: the packet info store between the packet detector and
// the distributor and collector. One record per packet, in packet order.
//
// A record holds the CRC result, instruction, ID, LENGTH, the target bus set
// and, per bus, the LENGTH of that bus's copy of the packet and the number of
// responses it should produce. The fields are packed into one word of a
// sync_fifo of DEPTH records and unpacked on the read side, so both readers
// see the oldest record while valid is high; read pops it.
//
// The store and its two readers are the design's; the record layout and the
// queue (rather than a single register) are this design's own, so the
// detector can analyse the next packet while the previous one is sent.
module packet_info_fifo #(
  parameter int unsigned NUM_BUSES = 4,
  parameter int unsigned DEPTH     = 16
) (
  input  logic                       clk,
  input  logic                       rst,
  // write side
  input  logic                       write,
  output logic                       full,
  input  logic                       w_crc_ok,
  input  logic [7:0]                 w_inst,
  input  logic [7:0]                 w_id,
  input  logic [15:0]                w_length,
  input  logic [NUM_BUSES-1:0]       w_target,
  input  logic [NUM_BUSES-1:0][15:0] w_bus_length,
  input  logic [NUM_BUSES-1:0][7:0]  w_expect,
  // read side
  output logic                       valid,
  input  logic                       read,
  output logic                       r_crc_ok,
  output logic [7:0]                 r_inst,
  output logic [7:0]                 r_id,
  output logic [15:0]                r_length,
  output logic [NUM_BUSES-1:0]       r_target,
  output logic [NUM_BUSES-1:0][15:0] r_bus_length,
  output logic [NUM_BUSES-1:0][7:0]  r_expect
);
  typedef struct packed {
    logic                       crc_ok;
    logic [7:0]                 inst;
    logic [7:0]                 id;
    logic [15:0]                length;
    logic [NUM_BUSES-1:0]       target;
    logic [NUM_BUSES-1:0][15:0] bus_length;
    logic [NUM_BUSES-1:0][7:0]  expect_cnt;
  } info_t;

  info_t w_rec, r_rec;
  logic  empty;

  assign w_rec = '{crc_ok: w_crc_ok, inst: w_inst, id: w_id, length: w_length,
                   target: w_target, bus_length: w_bus_length, expect_cnt: w_expect};

  sync_fifo #(.DEPTH(DEPTH), .ELEMENT_SIZE($bits(info_t))) u_fifo (
    .clk, .rst,
    .write_enable (write),
    .data_write   (w_rec),
    .read_enable  (read),
    .data_read    (r_rec),
    .full         (full),
    .empty        (empty)
  );

  assign valid        = !empty;
  assign r_crc_ok     = r_rec.crc_ok;
  assign r_inst       = r_rec.inst;
  assign r_id         = r_rec.id;
  assign r_length     = r_rec.length;
  assign r_target     = r_rec.target;
  assign r_bus_length = r_rec.bus_length;
  assign r_expect     = r_rec.expect_cnt;
endmodule
