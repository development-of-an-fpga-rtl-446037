// collector: last stage of the packet processor. It collects the status
// packets the servos send back on the device buses and passes them, whole and
// one after the other, into the FIFO towards the host.
//
// Forwarding: when idle, the collector picks, round robin, a bus whose receive
// FIFO holds data and locks onto it. It searches that bus's bytes for the
// header FF FF FD 00 (anything else is discarded), then writes the header,
// the ID, LENGTH and LENGTH further bytes to the host FIFO, and unlocks. The
// ID of every status packet is written into the device buses state (learn_*)
// as being on this bus; completing a packet pulses done for the bus. If a
// locked bus delivers no byte for TIMEOUT cycles the packet is abandoned.
//
// Responses awaited: when the distributor starts a packet (taken), the
// collector arms the device buses state with the packet info's expected
// response counts for the target buses. A per-bus timer runs while the bus
// is waiting, nothing is being sent or received on it and its receive FIFO
// is empty; after TIMEOUT cycles the bus is released (timeout pulses). Only
// broadcast pings, unknown IDs and absent servos end this way.
//
// The collector's role is the design's; packet framing, round robin, and the
// timeout (TIMEOUT = 50000 cycles, 500 us at 100 MHz) are this design's own.
module collector #(
  parameter int unsigned NUM_BUSES = 4,
  parameter int unsigned TIMEOUT   = 50000
) (
  input  logic                       clk,
  input  logic                       rst,
  // receive FIFOs
  input  logic [NUM_BUSES-1:0][7:0]  rx_data,
  input  logic [NUM_BUSES-1:0]       rx_empty,
  output logic [NUM_BUSES-1:0]       rx_read,
  // device bus activity
  input  logic [NUM_BUSES-1:0]       tx_active,
  input  logic [NUM_BUSES-1:0]       rx_active,
  // towards the host
  output logic [7:0]                 out_data,
  output logic                       out_write,
  input  logic                       out_full,
  // packet info of the packet the distributor starts
  input  logic                       taken,
  input  logic [NUM_BUSES-1:0]       info_target,
  input  logic [NUM_BUSES-1:0][7:0]  info_expect,
  // device buses state
  output logic                       arm_valid,
  output logic [NUM_BUSES-1:0]       arm_mask,
  output logic [NUM_BUSES-1:0][7:0]  arm_count,
  output logic [NUM_BUSES-1:0]       done,
  output logic [NUM_BUSES-1:0]       timeout,
  input  logic [NUM_BUSES-1:0]       bus_busy,
  output logic                       learn_valid,
  output logic [7:0]                 learn_id,
  output logic [$clog2(NUM_BUSES > 1 ? NUM_BUSES : 2)-1:0] learn_bus,
  // statistics
  output logic [15:0]                packets_forwarded,
  output logic [15:0]                timeouts
);
  import dxl_pkg::*;

  localparam int unsigned BW = $clog2(NUM_BUSES > 1 ? NUM_BUSES : 2);
  localparam int unsigned TW = $clog2(TIMEOUT + 1);

  typedef enum logic [3:0] {
    C_IDLE, C_H0, C_H1, C_H2, C_RSV, C_E0, C_E1, C_E2, C_E3, C_ID, C_LEN_L, C_LEN_H, C_BODY
  } state_e;

  state_e        state;
  logic [BW-1:0] cur, rr;
  logic [15:0]   left;
  logic [7:0]    len_lo;
  logic [TW-1:0] stall;
  logic [TW-1:0] wait_cnt [NUM_BUSES];
  logic [7:0]    byte_in;
  logic          have, consume, emit;
  logic [BW-1:0] pick;
  logic          pick_ok;

  assign arm_valid = taken;
  assign arm_mask  = info_target;
  assign arm_count = info_expect;

  assign byte_in = rx_data[cur];
  assign have    = !rx_empty[cur];

  // round-robin choice of the next bus with data
  always_comb begin
    pick    = rr;
    pick_ok = 1'b0;
    for (int i = NUM_BUSES - 1; i >= 0; i--) begin
      logic [BW-1:0] b;
      b = BW'((int'(rr) + i) % NUM_BUSES);
      if (!rx_empty[b]) begin
        pick    = b;
        pick_ok = 1'b1;
      end
    end
  end

  // byte movement of the locked bus
  always_comb begin
    consume  = 1'b0;
    emit     = 1'b0;
    out_data = byte_in;
    case (state)
      C_H0, C_H1, C_H2, C_RSV: consume = have;
      C_E0, C_E1: begin emit = 1'b1; out_data = HDR0; end
      C_E2:       begin emit = 1'b1; out_data = HDR2; end
      C_E3:       begin emit = 1'b1; out_data = RESERVED; end
      C_ID, C_LEN_L, C_LEN_H, C_BODY: begin
        emit    = have;
        consume = have && !out_full;
      end
      default: ;
    endcase
    out_write = emit && !out_full;
    rx_read   = '0;
    rx_read[cur] = consume;
  end

  assign learn_valid = (state == C_ID) && consume;
  assign learn_id    = byte_in;
  assign learn_bus   = cur;

  always_ff @(posedge clk) begin
    done <= '0;
    if (rst) begin
      state             <= C_IDLE;
      cur               <= '0;
      rr                <= '0;
      left              <= '0;
      len_lo            <= '0;
      stall             <= '0;
      packets_forwarded <= '0;
    end else begin
      if (state != C_IDLE && !consume && !(state inside {C_E0, C_E1, C_E2, C_E3}) && !have)
        stall <= stall + 1'b1;
      else
        stall <= '0;

      if (state != C_IDLE && stall == TW'(TIMEOUT - 1)) begin
        state <= C_IDLE;                        // bus went quiet mid-packet
      end else begin
        case (state)
          C_IDLE: if (pick_ok) begin
            cur   <= pick;
            rr    <= (pick == BW'(NUM_BUSES - 1)) ? '0 : pick + 1'b1;
            state <= C_H0;
          end
          C_H0:  if (have) state <= (byte_in == HDR0) ? C_H1 : C_IDLE;
          C_H1:  if (have) state <= (byte_in == HDR1) ? C_H2 : C_IDLE;
          C_H2:  if (have) state <= (byte_in == HDR2) ? C_RSV :
                                    ((byte_in == HDR0) ? C_H2 : C_IDLE);
          C_RSV: if (have) state <= (byte_in == RESERVED) ? C_E0 : C_IDLE;
          C_E0:  if (!out_full) state <= C_E1;
          C_E1:  if (!out_full) state <= C_E2;
          C_E2:  if (!out_full) state <= C_E3;
          C_E3:  if (!out_full) state <= C_ID;
          C_ID:    if (consume) state <= C_LEN_L;
          C_LEN_L: if (consume) begin len_lo <= byte_in; state <= C_LEN_H; end
          C_LEN_H: if (consume) begin
            left  <= {byte_in, len_lo};
            state <= ({byte_in, len_lo} == 16'd0) ? C_IDLE : C_BODY;
          end
          C_BODY: if (consume) begin
            left <= left - 1'b1;
            if (left == 16'd1) begin
              done[cur]         <= 1'b1;
              packets_forwarded <= packets_forwarded + 1'b1;
              state             <= C_IDLE;
            end
          end
          default: state <= C_IDLE;
        endcase
      end
    end
  end

  // per-bus response timers
  always_ff @(posedge clk) begin
    timeout <= '0;
    if (rst) begin
      timeouts <= '0;
      for (int k = 0; k < NUM_BUSES; k++) wait_cnt[k] <= '0;
    end else begin
      for (int k = 0; k < NUM_BUSES; k++) begin
        if (!bus_busy[k] || tx_active[k] || rx_active[k] || !rx_empty[k] ||
            (state != C_IDLE && cur == BW'(k)) || timeout[k]) begin
          wait_cnt[k] <= '0;
        end else if (wait_cnt[k] == TW'(TIMEOUT - 1)) begin
          wait_cnt[k] <= '0;
          timeout[k]  <= 1'b1;
        end else begin
          wait_cnt[k] <= wait_cnt[k] + 1'b1;
        end
      end
      if (timeout != '0) timeouts <= timeouts + 1'b1;
    end
  end
endmodule
