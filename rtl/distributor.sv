// distributor: second stage of the packet processor. It takes one packet at a
// time from the packet FIFO, as described by the oldest packet-info record,
// and writes a complete DXL2 packet into the transmit FIFO of every target
// device bus.
//
// Each bus's copy is rebuilt: header FF FF FD 00, the ID, that bus's LENGTH
// from the info record, the instruction and parameter bytes whose tag names
// the bus, and a CRC16 computed per bus over exactly the bytes that bus got.
// For a packet that is not split, every copy equals the host's packet. A
// packet with a bad CRC, or with no target bus, is read out of the packet
// FIFO and dropped.
//
// Ordering: a packet is started only when none of its target buses is still
// waiting for responses (busy from the device buses state). The info record
// is popped in the cycle the packet starts (taken pulses then, for the
// collector, with crc_ok and the record still visible). One byte is written
// per cycle; the whole write stalls while any target transmit FIFO is full.
// A packet of LENGTH L thus takes L+7 cycles when nothing stalls.
//
// The distributor's role is the design's; the rebuild-per-bus scheme is this
// design's own way of sending each bus only its part of a SYNC packet.
module distributor #(
  parameter int unsigned NUM_BUSES = 4
) (
  input  logic                       clk,
  input  logic                       rst,
  // packet info
  input  logic                       info_valid,
  output logic                       info_read,
  input  logic                       info_crc_ok,
  input  logic [7:0]                 info_id,
  input  logic [15:0]                info_length,
  input  logic [NUM_BUSES-1:0]       info_target,
  input  logic [NUM_BUSES-1:0][15:0] info_bus_length,
  output logic                       taken,
  // packet FIFO, read side: {bus mask, byte}
  input  logic [NUM_BUSES+7:0]       pkt_data,
  input  logic                       pkt_empty,
  output logic                       pkt_read,
  // device buses state
  input  logic [NUM_BUSES-1:0]       bus_busy,
  // transmit FIFOs
  output logic [NUM_BUSES-1:0][7:0]  tx_data,
  output logic [NUM_BUSES-1:0]       tx_write,
  input  logic [NUM_BUSES-1:0]       tx_full,
  // statistics
  output logic [15:0]                packets_sent,
  output logic [15:0]                packets_dropped
);
  import dxl_pkg::*;

  typedef enum logic [3:0] {
    D_IDLE, D_DRAIN, D_H0, D_H1, D_H2, D_RSV, D_ID, D_LEN_L, D_LEN_H, D_BODY, D_CRC_L, D_CRC_H
  } state_e;

  state_e                     state;
  logic [15:0]                left;       // body bytes still to move
  logic [7:0]                 id;
  logic [NUM_BUSES-1:0]       target;
  logic [NUM_BUSES-1:0][15:0] blen;
  logic [NUM_BUSES-1:0][15:0] crc;
  logic                       room, go, start;
  logic [NUM_BUSES-1:0]       wmask;

  assign room  = ((tx_full & target) == '0);
  assign start = (state == D_IDLE) && info_valid && info_crc_ok && (info_target != '0) &&
                 ((bus_busy & info_target) == '0);

  assign info_read = start ||
                     ((state == D_IDLE) && info_valid && (!info_crc_ok || info_target == '0));
  assign taken     = start;

  // byte to write and the buses it goes to
  always_comb begin
    go       = 1'b0;
    wmask    = target;
    pkt_read = 1'b0;
    for (int k = 0; k < NUM_BUSES; k++) tx_data[k] = 8'h00;
    case (state)
      D_H0, D_H1: begin go = room; for (int k = 0; k < NUM_BUSES; k++) tx_data[k] = HDR0; end
      D_H2:       begin go = room; for (int k = 0; k < NUM_BUSES; k++) tx_data[k] = HDR2; end
      D_RSV:      begin go = room; for (int k = 0; k < NUM_BUSES; k++) tx_data[k] = RESERVED; end
      D_ID:       begin go = room; for (int k = 0; k < NUM_BUSES; k++) tx_data[k] = id; end
      D_LEN_L:    begin go = room; for (int k = 0; k < NUM_BUSES; k++) tx_data[k] = blen[k][7:0]; end
      D_LEN_H:    begin go = room; for (int k = 0; k < NUM_BUSES; k++) tx_data[k] = blen[k][15:8]; end
      D_BODY: begin
        go       = room && !pkt_empty;
        pkt_read = go;
        wmask    = target & pkt_data[NUM_BUSES+7:8];
        for (int k = 0; k < NUM_BUSES; k++) tx_data[k] = pkt_data[7:0];
      end
      D_CRC_L:    begin go = room; for (int k = 0; k < NUM_BUSES; k++) tx_data[k] = crc[k][7:0]; end
      D_CRC_H:    begin go = room; for (int k = 0; k < NUM_BUSES; k++) tx_data[k] = crc[k][15:8]; end
      D_DRAIN: begin
        pkt_read = !pkt_empty;
        wmask    = '0;
      end
      default: wmask = '0;
    endcase
    tx_write = (go && state != D_DRAIN) ? wmask : '0;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state           <= D_IDLE;
      left            <= '0;
      id              <= '0;
      target          <= '0;
      blen            <= '0;
      crc             <= '0;
      packets_sent    <= '0;
      packets_dropped <= '0;
    end else begin
      // per-bus CRC over ID .. last parameter
      if (state inside {D_ID, D_LEN_L, D_LEN_H, D_BODY}) begin
        for (int k = 0; k < NUM_BUSES; k++)
          if (tx_write[k]) crc[k] <= crc16_update(crc[k], tx_data[k]);
      end
      case (state)
        D_IDLE: begin
          if (start) begin
            id     <= info_id;
            target <= info_target;
            blen   <= info_bus_length;
            left   <= info_length - 16'd2;
            for (int k = 0; k < NUM_BUSES; k++) crc[k] <= CRC_AFTER_HEADER;
            state  <= D_H0;
          end else if (info_read) begin
            left            <= info_length - 16'd2;
            packets_dropped <= packets_dropped + 1'b1;
            state           <= D_DRAIN;
          end
        end
        D_DRAIN: begin
          if (!pkt_empty) begin
            left <= left - 1'b1;
            if (left == 16'd1) state <= D_IDLE;
          end
        end
        D_H0:    if (go) state <= D_H1;
        D_H1:    if (go) state <= D_H2;
        D_H2:    if (go) state <= D_RSV;
        D_RSV:   if (go) state <= D_ID;
        D_ID:    if (go) state <= D_LEN_L;
        D_LEN_L: if (go) state <= D_LEN_H;
        D_LEN_H: if (go) state <= D_BODY;
        D_BODY: begin
          if (go) begin
            left <= left - 1'b1;
            if (left == 16'd1) state <= D_CRC_L;
          end
        end
        D_CRC_L: if (go) state <= D_CRC_H;
        D_CRC_H: if (go) begin
          packets_sent <= packets_sent + 1'b1;
          state        <= D_IDLE;
        end
        default: state <= D_IDLE;
      endcase
    end
  end
endmodule
