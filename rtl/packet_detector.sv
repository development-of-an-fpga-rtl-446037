// packet_detector: first stage of the packet processor. It finds DXL2 packets
// in the byte stream from the host, checks them, and decides where each one
// goes ("analyze packet to decide type of packet and destination").
//
// Parsing: the header FF FF FD and reserved byte 00 are searched for byte by
// byte (a mismatch restarts the search). ID, LENGTH, instruction, parameters
// and CRC follow. The instruction and the parameters are written into the
// packet FIFO, each byte tagged with the set of buses it is meant for; the
// header, ID, LENGTH and CRC are not stored, because the distributor rebuilds
// them. When the CRC byte pair has arrived, one packet-info record is written:
// CRC result, instruction, ID, LENGTH, target bus set, and per bus the LENGTH
// of the packet that bus will get and the number of responses to expect.
//
// Routing (this design's reading of "distribute packet to its target device
// bus interfaces"):
//  * SYNC_READ / SYNC_WRITE are split: every ID in the parameter list goes,
//    with its data for SYNC_WRITE, only to the bus the device buses state
//    has seen that ID on, or to all buses if it is unknown. The start
//    address and data length go to every bus. Each bus's LENGTH counts only
//    its own IDs; SYNC_READ expects one response per ID on the bus.
//  * Any other instruction to a known ID goes to that ID's bus and expects
//    one response; to an unknown ID it goes to every bus, each expecting one.
//  * The broadcast ID goes to every bus; a broadcast PING expects an unknown
//    number of answers (255), any other broadcast none.
// Packets whose LENGTH is below 3, or too long for the packet FIFO, are
// dropped at once and the search restarts after their LENGTH field.
//
// Timing: one byte per cycle while the input FIFO has data and the packet FIFO
// (or, for the last byte, the info FIFO) has room. Byte stuffing inside the
// parameters is not decoded.
module packet_detector #(
  parameter int unsigned NUM_BUSES = 4,
  parameter int unsigned PKT_DEPTH = 1024
) (
  input  logic                          clk,
  input  logic                          rst,
  // bytes from the host
  input  logic [7:0]                    in_data,
  input  logic                          in_empty,
  output logic                          in_read,
  // packet FIFO, write side: {bus mask, byte}
  output logic [NUM_BUSES+7:0]          pkt_data,
  output logic                          pkt_write,
  input  logic                          pkt_full,
  // ID map lookup
  output logic [7:0]                    lookup_id,
  input  logic [NUM_BUSES-1:0]          lookup_mask,
  // packet info
  output logic                          info_write,
  input  logic                          info_full,
  output logic                          info_crc_ok,
  output logic [7:0]                    info_inst,
  output logic [7:0]                    info_id,
  output logic [15:0]                   info_length,
  output logic [NUM_BUSES-1:0]          info_target,
  output logic [NUM_BUSES-1:0][15:0]    info_bus_length,
  output logic [NUM_BUSES-1:0][7:0]     info_expect,
  // statistics
  output logic [15:0]                   crc_errors
);
  import dxl_pkg::*;

  typedef enum logic [3:0] {
    S_H0, S_H1, S_H2, S_RSV, S_ID, S_LEN_L, S_LEN_H, S_INST, S_PARAM, S_CRC_L, S_CRC_H
  } state_e;

  localparam logic [NUM_BUSES-1:0] ALL = '1;

  state_e               state;
  logic [15:0]          crc;
  logic [7:0]           id;
  logic [7:0]           inst;
  logic [15:0]          length;
  logic [15:0]          params_left;
  logic [15:0]          pidx;          // parameter index
  logic [15:0]          dlen;          // SYNC data length
  logic [16:0]          gpos;          // position inside an ID group
  logic [NUM_BUSES-1:0] id_mask;       // route of a non-SYNC packet
  logic [NUM_BUSES-1:0] group_mask;    // route of the current SYNC group
  logic [NUM_BUSES-1:0] sync_target;
  logic [7:0]           crc_lo;
  logic [NUM_BUSES-1:0][15:0] bus_len;
  logic [NUM_BUSES-1:0][7:0]  bus_exp;
  logic                 is_sync, is_sread;
  logic                 ready, take;
  logic [NUM_BUSES-1:0] this_mask;
  logic [16:0]          group_size;

  assign is_sync  = (inst == INST_SYNC_READ) || (inst == INST_SYNC_WRITE);
  assign is_sread = (inst == INST_SYNC_READ);
  assign group_size = is_sread ? 17'd1 : {1'b0, dlen} + 17'd1;

  assign lookup_id = in_data;
  assign this_mask = (lookup_mask == '0) ? ALL : lookup_mask;

  always_comb begin
    case (state)
      S_INST, S_PARAM: ready = !pkt_full;
      S_CRC_H:         ready = !info_full;
      default:         ready = 1'b1;
    endcase
  end
  assign take    = ready && !in_empty;
  assign in_read = take;

  // packet FIFO write and tag
  always_comb begin
    pkt_write = 1'b0;
    pkt_data  = {ALL, in_data};
    if (take && state == S_INST) pkt_write = 1'b1;
    if (take && state == S_PARAM) begin
      pkt_write = 1'b1;
      if (is_sync && pidx >= 16'd4)
        pkt_data = {(gpos == 17'd0) ? this_mask : group_mask, in_data};
    end
  end

  // info record
  always_comb begin
    info_write  = take && (state == S_CRC_H);
    info_crc_ok = ({in_data, crc_lo} == crc);
    info_inst   = inst;
    info_id     = id;
    info_length = length;
    if (is_sync) begin
      info_target     = sync_target;
      info_bus_length = bus_len;
      info_expect     = bus_exp;
    end else begin
      info_target = (id == BROADCAST_ID) ? ALL : id_mask;
      for (int k = 0; k < NUM_BUSES; k++) begin
        info_bus_length[k] = length;
        if (id == BROADCAST_ID) info_expect[k] = (inst == INST_PING) ? 8'hFF : 8'h00;
        else                    info_expect[k] = 8'h01;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= S_H0;
      crc         <= '0;
      id          <= '0;
      inst        <= '0;
      length      <= '0;
      params_left <= '0;
      pidx        <= '0;
      dlen        <= '0;
      gpos        <= '0;
      id_mask     <= '0;
      group_mask  <= '0;
      sync_target <= '0;
      crc_lo      <= '0;
      bus_len     <= '0;
      bus_exp     <= '0;
      crc_errors  <= '0;
    end else if (take) begin
      case (state)
        S_H0: state <= (in_data == HDR0) ? S_H1 : S_H0;
        S_H1: state <= (in_data == HDR1) ? S_H2 : S_H0;
        S_H2: state <= (in_data == HDR2) ? S_RSV : ((in_data == HDR0) ? S_H2 : S_H0);
        S_RSV: begin
          state <= (in_data == RESERVED) ? S_ID : S_H0;
          crc   <= CRC_AFTER_HEADER;
        end
        S_ID: begin
          id      <= in_data;
          id_mask <= this_mask;
          crc     <= crc16_update(crc, in_data);
          state   <= S_LEN_L;
        end
        S_LEN_L: begin
          length[7:0] <= in_data;
          crc         <= crc16_update(crc, in_data);
          state       <= S_LEN_H;
        end
        S_LEN_H: begin
          length[15:8] <= in_data;
          crc          <= crc16_update(crc, in_data);
          if ({in_data, length[7:0]} < 16'd3 ||
              {in_data, length[7:0]} - 16'd2 > 16'(PKT_DEPTH))
            state <= S_H0;
          else
            state <= S_INST;
        end
        S_INST: begin
          inst        <= in_data;
          crc         <= crc16_update(crc, in_data);
          params_left <= length - 16'd3;
          pidx        <= '0;
          gpos        <= '0;
          sync_target <= '0;
          for (int k = 0; k < NUM_BUSES; k++) begin
            bus_len[k] <= 16'd7;   // instruction, 4 fixed parameters, CRC
            bus_exp[k] <= '0;
          end
          state <= (length == 16'd3) ? S_CRC_L : S_PARAM;
        end
        S_PARAM: begin
          crc         <= crc16_update(crc, in_data);
          params_left <= params_left - 1'b1;
          pidx        <= pidx + 1'b1;
          if (pidx == 16'd2) dlen[7:0]  <= in_data;
          if (pidx == 16'd3) dlen[15:8] <= in_data;
          if (is_sync && pidx >= 16'd4) begin
            if (gpos == 17'd0) begin
              group_mask  <= this_mask;
              sync_target <= sync_target | this_mask;
              for (int k = 0; k < NUM_BUSES; k++) begin
                if (this_mask[k]) begin
                  bus_len[k] <= bus_len[k] + group_size[15:0];
                  if (is_sread && bus_exp[k] != 8'hFE) bus_exp[k] <= bus_exp[k] + 1'b1;
                end
              end
            end
            gpos <= (gpos + 17'd1 == group_size) ? 17'd0 : gpos + 17'd1;
          end
          if (params_left == 16'd1) state <= S_CRC_L;
        end
        S_CRC_L: begin
          crc_lo <= in_data;
          state  <= S_CRC_H;
        end
        S_CRC_H: begin
          if ({in_data, crc_lo} != crc) crc_errors <= crc_errors + 1'b1;
          state <= S_H0;
        end
        default: state <= S_H0;
      endcase
    end
  end
endmodule
