// dxl_bus_if: device bus interface, the link between one pair of byte FIFOs
// and one half-duplex Dynamixel bus (TTL or RS485 through an external
// transceiver).
//
// Outgoing: whenever the transmit FIFO holds a byte and the transmitter is
// free, the byte is popped and sent (8 data bits, one stop bit). dxl_dir is
// high, turning the transceiver towards the bus, while bytes are queued or
// being sent: from the cycle the first byte is queued until the stop bit of
// the last one has ended. Incoming: while
// dxl_dir is low the receiver is enabled and every byte received is pushed
// into the receive FIFO; a byte that finds the FIFO full is dropped and
// counted in rx_overflow. The block knows nothing of packets: framing is left
// to the packet processor.
//
// tx_active (equal to dxl_dir) tells the collector that a request is
// still going out, so its response timeout does not run. rx_active is high
// while a byte is being received.
//
// The half-duplex byte transport follows the design; the direction-control
// rule, the drop-on-full policy and the fixed bit rate (CLKS_PER_BIT, 25 =
// 4 MBaud at 100 MHz) are this design's own.
module dxl_bus_if #(
  parameter int unsigned CLKS_PER_BIT = 25
) (
  input  logic       clk,
  input  logic       rst,
  // transmit FIFO, read side
  input  logic [7:0] tx_data,
  input  logic       tx_empty,
  output logic       tx_read,
  // receive FIFO, write side
  output logic [7:0] rx_data,
  output logic       rx_write,
  input  logic       rx_full,
  // bus pins
  output logic       dxl_tx,
  input  logic       dxl_rx,
  output logic       dxl_dir,
  // status
  output logic       tx_active,
  output logic       rx_active,
  output logic [15:0] rx_overflow
);
  logic       utx_ready, utx_busy;
  logic       urx_valid, urx_ferr;
  logic [7:0] urx_data;

  assign tx_read = !tx_empty && utx_ready;

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst,
    .valid (tx_read),
    .data  (tx_data),
    .ready (utx_ready),
    .busy  (utx_busy),
    .txd   (dxl_tx)
  );

  assign dxl_dir   = utx_busy || !tx_empty;
  assign tx_active = dxl_dir;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk, .rst,
    .enable    (!dxl_dir),
    .rxd       (dxl_rx),
    .valid     (urx_valid),
    .data      (urx_data),
    .frame_err (urx_ferr),
    .active    (rx_active)
  );

  assign rx_data  = urx_data;
  assign rx_write = urx_valid && !rx_full;

  always_ff @(posedge clk) begin
    if (rst)                         rx_overflow <= '0;
    else if (urx_valid && rx_full)   rx_overflow <= rx_overflow + 1'b1;
  end

  // A frame error leaves no byte behind; nothing else to do with it here.
  logic unused_ferr;
  assign unused_ferr = urx_ferr;
endmodule
