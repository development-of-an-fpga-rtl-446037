// dxl_pkg: protocol handler for Dynamixel protocol 2.0 (DXL2), shared by the
// packet processor blocks.
//
// A DXL2 packet is: header 0xFF 0xFF 0xFD, a reserved byte 0x00, the ID, a
// 16-bit little-endian LENGTH (instruction + parameters + CRC), the
// instruction, LENGTH-3 parameter bytes and a little-endian CRC16 over every
// byte before it. That layout follows the DXL2 packet description this design
// is built around. The instruction codes and the CRC polynomial (0x8005,
// initial value 0, no reflection) are the ones of the public DXL2 protocol;
// they are recorded here, not derived.
//
// Contents: packet constants, instruction codes, crc16_update() (one byte,
// purely combinational).
package dxl_pkg;

  // ---- packet layout ----
  localparam logic [7:0] HDR0         = 8'hFF;
  localparam logic [7:0] HDR1         = 8'hFF;
  localparam logic [7:0] HDR2         = 8'hFD;
  localparam logic [7:0] RESERVED     = 8'h00;
  localparam logic [7:0] BROADCAST_ID = 8'hFE;
  localparam int unsigned MAX_ID      = 252;   // device IDs are 0x00..0xFC

  // ---- instruction codes ----
  typedef enum logic [7:0] {
    INST_PING       = 8'h01,
    INST_READ       = 8'h02,
    INST_WRITE      = 8'h03,
    INST_REG_WRITE  = 8'h04,
    INST_ACTION     = 8'h05,
    INST_RESET      = 8'h06,
    INST_REBOOT     = 8'h08,
    INST_STATUS     = 8'h55,
    INST_SYNC_READ  = 8'h82,
    INST_SYNC_WRITE = 8'h83
  } dxl_inst_e;

  // CRC16 of the header and reserved byte (FF FF FD 00), the constant start
  // of every packet; saves four update steps when a packet is rebuilt.
  localparam logic [15:0] CRC_POLY = 16'h8005;

  // One byte of CRC16 (poly 0x8005, MSB first).
  function automatic logic [15:0] crc16_update(input logic [15:0] crc,
                                               input logic [7:0]  data);
    logic [15:0] c;
    c = crc ^ {data, 8'h00};
    for (int i = 0; i < 8; i++) begin
      c = c[15] ? ((c << 1) ^ CRC_POLY) : (c << 1);
    end
    return c;
  endfunction

  function automatic logic [15:0] crc16_header();
    logic [15:0] c;
    c = crc16_update(16'h0000, HDR0);
    c = crc16_update(c, HDR1);
    c = crc16_update(c, HDR2);
    c = crc16_update(c, RESERVED);
    return c;
  endfunction

  localparam logic [15:0] CRC_AFTER_HEADER = crc16_header();

endpackage
