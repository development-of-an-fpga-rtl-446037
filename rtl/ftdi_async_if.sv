// ftdi_async_if: host interface to an FTDI FT2232H channel in asynchronous
// FIFO mode, the USB link to the host computer.
//
// The FTDI side is an 8-bit half-duplex data bus (dbus) and four strobes:
// txe_n (the FTDI can accept a byte for the host), wr_n (write dbus to the
// host), rxif_n (a byte from the host is waiting) and rd_n (put the next
// received byte on dbus). All four are active low as on the FT2232H. dbus is
// split into dbus_i, dbus_o and dbus_oe; the tri-state pad is outside.
//
// One transfer at a time. Outgoing bytes have priority: when txe_n is low and
// the outgoing FIFO holds a byte, it is popped, driven on dbus for one setup
// cycle, wr_n is pulsed low for WR_CYCLES and dbus is held one more cycle.
// Otherwise, when rxif_n is low and the incoming FIFO has room, rd_n is held
// low for RD_CYCLES and dbus is sampled in the last of them and pushed. After
// each transfer the block waits RECOVER_CYCLES so that the FTDI flags, seen
// through two-flop synchronizers, have settled. With the defaults one byte
// takes 15 (write) or 13 (read) cycles at 100 MHz.
//
// The signal set and the priority of outgoing data follow the design; the
// cycle counts are this design's own, chosen from the FT2232H timing (RD#
// and WR# pulses of at least 30 ns, data valid 14 ns after RD# falls).
module ftdi_async_if #(
  parameter int unsigned RD_CYCLES      = 5,
  parameter int unsigned WR_CYCLES      = 5,
  parameter int unsigned RECOVER_CYCLES = 8
) (
  input  logic       clk,
  input  logic       rst,
  // FTDI pins
  input  logic [7:0] dbus_i,
  output logic [7:0] dbus_o,
  output logic       dbus_oe,
  input  logic       txe_n,
  output logic       wr_n,
  input  logic       rxif_n,
  output logic       rd_n,
  // bytes to the host (outgoing FIFO, read side)
  input  logic [7:0] to_host_data,
  input  logic       to_host_empty,
  output logic       to_host_read,
  // bytes from the host (incoming FIFO, write side)
  output logic [7:0] from_host_data,
  output logic       from_host_write,
  input  logic       from_host_full
);
  typedef enum logic [2:0] {IDLE, WR_SETUP, WR_PULSE, WR_HOLD, RD_PULSE, RECOVER} state_e;

  localparam int unsigned MAXC = (RD_CYCLES > WR_CYCLES) ?
                                 ((RD_CYCLES > RECOVER_CYCLES) ? RD_CYCLES : RECOVER_CYCLES) :
                                 ((WR_CYCLES > RECOVER_CYCLES) ? WR_CYCLES : RECOVER_CYCLES);
  localparam int unsigned CW = $clog2(MAXC + 1);

  state_e        state;
  logic [CW-1:0] cnt;
  logic [1:0]    txe_sync, rxf_sync;
  logic          can_write, can_read;

  always_ff @(posedge clk) begin
    if (rst) begin
      txe_sync <= 2'b11;
      rxf_sync <= 2'b11;
    end else begin
      txe_sync <= {txe_sync[0], txe_n};
      rxf_sync <= {rxf_sync[0], rxif_n};
    end
  end

  assign can_write = !txe_sync[1] && !to_host_empty;
  assign can_read  = !rxf_sync[1] && !from_host_full;

  assign to_host_read = (state == IDLE) && can_write;

  always_ff @(posedge clk) begin
    if (rst) begin
      state           <= IDLE;
      cnt             <= '0;
      dbus_o          <= '0;
      dbus_oe         <= 1'b0;
      wr_n            <= 1'b1;
      rd_n            <= 1'b1;
      from_host_data  <= '0;
      from_host_write <= 1'b0;
    end else begin
      from_host_write <= 1'b0;
      case (state)
        IDLE: begin
          if (can_write) begin
            dbus_o  <= to_host_data;
            dbus_oe <= 1'b1;
            state   <= WR_SETUP;
          end else if (can_read) begin
            rd_n  <= 1'b0;
            cnt   <= '0;
            state <= RD_PULSE;
          end
        end
        WR_SETUP: begin
          wr_n  <= 1'b0;
          cnt   <= '0;
          state <= WR_PULSE;
        end
        WR_PULSE: begin
          if (cnt == CW'(WR_CYCLES - 1)) begin
            wr_n  <= 1'b1;
            state <= WR_HOLD;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        WR_HOLD: begin
          dbus_oe <= 1'b0;
          cnt     <= '0;
          state   <= RECOVER;
        end
        RD_PULSE: begin
          if (cnt == CW'(RD_CYCLES - 1)) begin
            rd_n            <= 1'b1;
            from_host_data  <= dbus_i;
            from_host_write <= 1'b1;
            cnt             <= '0;
            state           <= RECOVER;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        RECOVER: begin
          if (cnt == CW'(RECOVER_CYCLES - 1)) state <= IDLE;
          else                                cnt   <= cnt + 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end

  // Only one strobe at a time, and dbus driven only around a write.
  a_one_strobe: assert property (@(posedge clk) disable iff (rst) !(!wr_n && !rd_n));
  a_oe_on_wr:   assert property (@(posedge clk) disable iff (rst) !wr_n |-> dbus_oe);
endmodule
