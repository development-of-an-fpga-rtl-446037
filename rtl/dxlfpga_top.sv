// dxlfpga_top: FPGA controller that connects a host computer over USB (an
// FTDI FT2232H in asynchronous FIFO mode) to NUM_BUSES independent
// half-duplex Dynamixel servo buses, and serves them all in parallel.
//
// Data path: host interface -> incoming host FIFO -> packet processor ->
// per-bus transmit FIFO -> device bus interface -> bus; and back: bus ->
// device bus interface -> per-bus receive FIFO -> packet processor ->
// outgoing host FIFO -> host interface. Every block is decoupled from the
// next by a sync_fifo.
//
// Defaults follow the main configuration of the design (four Dynamixel buses,
// 100 MHz system clock). The bit rate is fixed at synthesis: CLKS_PER_BIT =
// 25 is 4 MBaud, 50 is 2 MBaud, 100 is 1 MBaud at 100 MHz. FIFO depths: 1024
// bytes per bus FIFO, which is one 9-kbit block RAM per FIFO (two per bus);
// host-side and packet FIFOs 1024 as well. The clock comes from outside (a
// PLL on the board); rst is synchronous and active high.
//
// Pins: the FTDI data bus is brought out as ftdi_dbus_i/_o/_oe for an
// external tri-state pad; the strobes are active low. Each servo bus has a
// transmit line, a receive line and a direction output for the TTL/RS485
// transceiver (1 = FPGA drives the bus).
module dxlfpga_top #(
  parameter int unsigned NUM_BUSES       = 4,
  parameter int unsigned CLKS_PER_BIT    = 25,
  parameter int unsigned BUS_FIFO_DEPTH  = 1024,
  parameter int unsigned HOST_FIFO_DEPTH = 1024,
  parameter int unsigned PKT_DEPTH       = 1024,
  parameter int unsigned INFO_DEPTH      = 16,
  parameter int unsigned TIMEOUT         = 50000
) (
  input  logic                 clk,
  input  logic                 rst,
  // FTDI FT2232H asynchronous FIFO
  input  logic [7:0]           ftdi_dbus_i,
  output logic [7:0]           ftdi_dbus_o,
  output logic                 ftdi_dbus_oe,
  input  logic                 ftdi_txe_n,
  output logic                 ftdi_wr_n,
  input  logic                 ftdi_rxif_n,
  output logic                 ftdi_rd_n,
  // Dynamixel buses
  output logic [NUM_BUSES-1:0] dxl_tx,
  input  logic [NUM_BUSES-1:0] dxl_rx,
  output logic [NUM_BUSES-1:0] dxl_dir,
  // statistics
  output logic [15:0]          crc_errors,
  output logic [15:0]          packets_sent,
  output logic [15:0]          packets_dropped,
  output logic [15:0]          packets_forwarded,
  output logic [15:0]          timeouts,
  output logic [NUM_BUSES-1:0][15:0] rx_overflows
);
  // host FIFOs
  logic [7:0] hin_wdata, hin_rdata, hout_wdata, hout_rdata;
  logic       hin_write, hin_full, hin_read, hin_empty;
  logic       hout_write, hout_full, hout_read, hout_empty;
  // bus FIFOs
  logic [NUM_BUSES-1:0][7:0] tx_wdata, tx_rdata, rx_wdata, rx_rdata;
  logic [NUM_BUSES-1:0]      tx_write, tx_full, tx_read, tx_empty;
  logic [NUM_BUSES-1:0]      rx_write, rx_full, rx_read, rx_empty;
  logic [NUM_BUSES-1:0]      tx_active, rx_active;

  ftdi_async_if u_host_if (
    .clk, .rst,
    .dbus_i (ftdi_dbus_i), .dbus_o (ftdi_dbus_o), .dbus_oe (ftdi_dbus_oe),
    .txe_n (ftdi_txe_n), .wr_n (ftdi_wr_n), .rxif_n (ftdi_rxif_n), .rd_n (ftdi_rd_n),
    .to_host_data (hout_rdata), .to_host_empty (hout_empty), .to_host_read (hout_read),
    .from_host_data (hin_wdata), .from_host_write (hin_write), .from_host_full (hin_full)
  );

  sync_fifo #(.DEPTH(HOST_FIFO_DEPTH), .ELEMENT_SIZE(8)) u_host_in_fifo (
    .clk, .rst,
    .write_enable (hin_write), .data_write (hin_wdata),
    .read_enable (hin_read), .data_read (hin_rdata),
    .full (hin_full), .empty (hin_empty)
  );

  sync_fifo #(.DEPTH(HOST_FIFO_DEPTH), .ELEMENT_SIZE(8)) u_host_out_fifo (
    .clk, .rst,
    .write_enable (hout_write), .data_write (hout_wdata),
    .read_enable (hout_read), .data_read (hout_rdata),
    .full (hout_full), .empty (hout_empty)
  );

  packet_processor #(
    .NUM_BUSES (NUM_BUSES), .PKT_DEPTH (PKT_DEPTH),
    .INFO_DEPTH (INFO_DEPTH), .TIMEOUT (TIMEOUT)
  ) u_proc (
    .clk, .rst,
    .in_data (hin_rdata), .in_empty (hin_empty), .in_read (hin_read),
    .out_data (hout_wdata), .out_write (hout_write), .out_full (hout_full),
    .tx_data (tx_wdata), .tx_write, .tx_full,
    .rx_data (rx_rdata), .rx_empty, .rx_read,
    .tx_active, .rx_active,
    .crc_errors, .packets_sent, .packets_dropped, .packets_forwarded, .timeouts
  );

  for (genvar k = 0; k < NUM_BUSES; k++) begin : g_bus
    sync_fifo #(.DEPTH(BUS_FIFO_DEPTH), .ELEMENT_SIZE(8)) u_tx_fifo (
      .clk, .rst,
      .write_enable (tx_write[k]), .data_write (tx_wdata[k]),
      .read_enable (tx_read[k]), .data_read (tx_rdata[k]),
      .full (tx_full[k]), .empty (tx_empty[k])
    );

    sync_fifo #(.DEPTH(BUS_FIFO_DEPTH), .ELEMENT_SIZE(8)) u_rx_fifo (
      .clk, .rst,
      .write_enable (rx_write[k]), .data_write (rx_wdata[k]),
      .read_enable (rx_read[k]), .data_read (rx_rdata[k]),
      .full (rx_full[k]), .empty (rx_empty[k])
    );

    dxl_bus_if #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_bus_if (
      .clk, .rst,
      .tx_data (tx_rdata[k]), .tx_empty (tx_empty[k]), .tx_read (tx_read[k]),
      .rx_data (rx_wdata[k]), .rx_write (rx_write[k]), .rx_full (rx_full[k]),
      .dxl_tx (dxl_tx[k]), .dxl_rx (dxl_rx[k]), .dxl_dir (dxl_dir[k]),
      .tx_active (tx_active[k]), .rx_active (rx_active[k]),
      .rx_overflow (rx_overflows[k])
    );
  end
endmodule
