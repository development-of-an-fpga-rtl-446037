// dev_bus_state: device buses state of the packet processor. It records, for
// every servo ID, on which device bus it has answered, and for every bus how
// many response packets are still awaited.
//
// ID map: one NUM_BUSES-bit one-hot entry per ID (all zero = not yet seen).
// The collector writes it (learn_*) with the bus each status packet came in
// on; the packet detector reads it combinationally (lookup_id/lookup_mask) to
// route requests. A later answer on another bus overwrites the entry.
//
// Pending responses: one counter per bus. arm_valid loads arm_count[k] into
// every bus k selected by arm_mask when a request starts out; done[k]
// decrements bus k by one when a complete status packet has been passed on;
// timeout[k] clears it. busy[k] is high while the counter is non-zero, and the
// distributor holds back the next request to a busy bus. A count of 255 marks
// "unknown number" (broadcast ping) and is ended only by the timeout.
//
// The block's name and place between collector and distributor are the
// design's; what it holds and how is this design's own reading of it.
module dev_bus_state #(
  parameter int unsigned NUM_BUSES = 4
) (
  input  logic                       clk,
  input  logic                       rst,
  // ID map
  input  logic [7:0]                 lookup_id,
  output logic [NUM_BUSES-1:0]       lookup_mask,
  input  logic                       learn_valid,
  input  logic [7:0]                 learn_id,
  input  logic [$clog2(NUM_BUSES > 1 ? NUM_BUSES : 2)-1:0] learn_bus,
  // pending responses
  input  logic                       arm_valid,
  input  logic [NUM_BUSES-1:0]       arm_mask,
  input  logic [NUM_BUSES-1:0][7:0]  arm_count,
  input  logic [NUM_BUSES-1:0]       done,
  input  logic [NUM_BUSES-1:0]       timeout,
  output logic [NUM_BUSES-1:0]       busy
);
  import dxl_pkg::*;

  logic [NUM_BUSES-1:0] id_map [256];
  logic [7:0]           pending [NUM_BUSES];

  assign lookup_mask = id_map[lookup_id];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 256; i++) id_map[i] <= '0;
    end else if (learn_valid && learn_id <= 8'(MAX_ID)) begin
      id_map[learn_id] <= NUM_BUSES'(1) << learn_bus;
    end
  end

  always_ff @(posedge clk) begin
    for (int k = 0; k < NUM_BUSES; k++) begin
      if (rst || timeout[k]) begin
        pending[k] <= '0;
      end else if (arm_valid && arm_mask[k]) begin
        pending[k] <= arm_count[k];
      end else if (done[k] && pending[k] != 0 && pending[k] != 8'hFF) begin
        pending[k] <= pending[k] - 1'b1;
      end
    end
  end

  always_comb begin
    for (int k = 0; k < NUM_BUSES; k++) busy[k] = (pending[k] != 0);
  end

  // A request is only armed on a bus that is not waiting any more.
  a_arm_idle: assert property (@(posedge clk) disable iff (rst)
                               arm_valid |-> ((arm_mask & busy) == '0));
endmodule
