// uart_tx: asynchronous serial transmitter for the servo bus, one start bit,
// 8 data bits LSB first, one stop bit (the Dynamixel frame: "8 bit + one stop
// bit").
//
// A byte is taken when valid && ready; ready is high while idle and in the
// last cycle of a stop bit, so queued bytes go out back to back. Each bit
// lasts CLKS_PER_BIT clock cycles; the default of 25 gives 4 MBaud at the
// 100 MHz system clock, the highest rate the servos support. busy stays high
// from the cycle after a byte is taken until the end of its stop bit, so a
// frame takes 10*CLKS_PER_BIT cycles. txd idles high. The bit-counter structure is
// this design's own.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 25
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       valid,
  input  logic [7:0] data,
  output logic       ready,
  output logic       busy,
  output logic       txd
);
  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  logic [8:0]    shreg;      // stop, data[7:0]; shifted out LSB first
  logic [3:0]    bits_left;
  logic [CW-1:0] clk_cnt;

  logic last_tick;   // final cycle of the stop bit: the next byte may start

  assign last_tick = (bits_left == 4'd1) && (clk_cnt == CW'(CLKS_PER_BIT - 1));
  assign busy      = (bits_left != 0);
  assign ready     = !busy || last_tick;

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg     <= '1;
      bits_left <= '0;
      clk_cnt   <= '0;
      txd       <= 1'b1;
    end else if (valid && ready) begin
      shreg     <= {1'b1, data};
      bits_left <= 4'd10;
      clk_cnt   <= '0;
      txd       <= 1'b0;             // start bit
    end else if (!busy) begin
      txd <= 1'b1;
    end else if (clk_cnt == CW'(CLKS_PER_BIT - 1)) begin
      clk_cnt   <= '0;
      bits_left <= bits_left - 1'b1;
      shreg     <= {1'b1, shreg[8:1]};
      txd       <= (bits_left == 4'd1) ? 1'b1 : shreg[0];
    end else begin
      clk_cnt <= clk_cnt + 1'b1;
    end
  end
endmodule
