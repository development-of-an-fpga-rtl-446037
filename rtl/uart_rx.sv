// uart_rx: asynchronous serial receiver for the servo bus, one start bit,
// 8 data bits LSB first, one stop bit.
//
// rxd passes a two-flop synchronizer. A falling edge while idle starts a
// frame; the start bit is re-checked half a bit later and every further bit
// is sampled in its middle, CLKS_PER_BIT cycles apart. After the stop bit
// sample, valid pulses for one cycle with the byte on data if the stop bit
// was high, otherwise frame_err pulses. enable low (the bus is being driven
// by this side) holds the receiver idle. active is high during a frame.
// Mid-bit sampling and the synchronizer are this design's own choices.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 25
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       enable,
  input  logic       rxd,
  output logic       valid,
  output logic [7:0] data,
  output logic       frame_err,
  output logic       active
);
  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  logic          rxd_meta, rxd_sync, rxd_prev;
  logic [3:0]    bit_idx;    // 0 = start bit, 1..8 data, 9 stop
  logic [CW-1:0] clk_cnt;
  logic [7:0]    shreg;

  always_ff @(posedge clk) begin
    if (rst) begin
      rxd_meta <= 1'b1;
      rxd_sync <= 1'b1;
      rxd_prev <= 1'b1;
    end else begin
      rxd_meta <= rxd;
      rxd_sync <= rxd_meta;
      rxd_prev <= rxd_sync;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      active    <= 1'b0;
      bit_idx   <= '0;
      clk_cnt   <= '0;
      shreg     <= '0;
      data      <= '0;
      valid     <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      valid     <= 1'b0;
      frame_err <= 1'b0;
      if (!active) begin
        if (enable && rxd_prev && !rxd_sync) begin
          active  <= 1'b1;
          bit_idx <= '0;
          clk_cnt <= CW'(CLKS_PER_BIT / 2);
        end
      end else if (!enable) begin
        active <= 1'b0;
      end else if (clk_cnt == CW'(CLKS_PER_BIT - 1)) begin
        clk_cnt <= '0;
        if (bit_idx == 4'd0) begin
          if (rxd_sync) active <= 1'b0;      // glitch, not a start bit
          bit_idx <= 4'd1;
        end else if (bit_idx == 4'd9) begin
          active <= 1'b0;
          if (rxd_sync) begin
            valid <= 1'b1;
            data  <= shreg;
          end else begin
            frame_err <= 1'b1;
          end
        end else begin
          shreg   <= {rxd_sync, shreg[7:1]};
          bit_idx <= bit_idx + 1'b1;
        end
      end else begin
        clk_cnt <= clk_cnt + 1'b1;
      end
    end
  end
endmodule
