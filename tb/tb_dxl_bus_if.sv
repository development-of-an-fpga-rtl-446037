// tb_dxl_bus_if: the device bus interface at CLKS_PER_BIT = 8.
// Transmit: 40 random bytes are queued; an independent sampler on dxl_tx
// decodes the frames (start bit low, 8 bits LSB first, stop bit high) while
// dxl_dir is high, and the time for the burst is checked against 10 bit times
// per byte; the wire echoes the burst back, and none of it may be received.
// dir must fall after the last stop bit. Receive: with dir low, a
// bit-banged sender at the far end of the wire sends 40 bytes; each must appear on rx_write.
// With rx_full held, bytes are dropped and counted in rx_overflow.
`timescale 1ns/1ps
module tb_dxl_bus_if;
  localparam int CPB = 8;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = !clk;

  logic [7:0]  tx_data, rx_data;
  logic        tx_empty, tx_read, rx_write, rx_full = 1'b0;
  logic        dxl_tx, dxl_rx, dxl_dir, tx_active, rx_active;
  logic        far_end = 1'b1;
  // one shared wire, as on the real bus: while the transceiver drives, the
  // receiver hears its own transmission
  assign dxl_rx = dxl_dir ? dxl_tx : far_end;
  logic [15:0] rx_overflow;

  dxl_bus_if #(.CLKS_PER_BIT(CPB)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // transmit FIFO stand-in
  logic [7:0] txq[$];
  assign tx_empty = (txq.size() == 0);
  assign tx_data  = tx_empty ? 8'h00 : txq[0];
  // handshakes are sampled mid-cycle, when they are settled
  logic tx_read_q = 1'b0;
  always @(negedge clk) tx_read_q = tx_read && !rst;
  always @(posedge clk) #1 if (tx_read_q) void'(txq.pop_front());      // after the DUT has taken the byte

  // receive side log
  logic [7:0] rxlog[$];
  always @(posedge clk) if (rx_write && !rst) rxlog.push_back(rx_data);

  // independent line decoder
  logic [7:0] seen[$];
  int dir_low_during_frame = 0;
  initial begin
    wait (!rst);
    forever begin
      logic [7:0] b;
      @(negedge dxl_tx);
      repeat (CPB / 2) @(posedge clk);
      if (dxl_tx != 1'b0) failures++;
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        b[i] = dxl_tx;
        if (!dxl_dir) dir_low_during_frame++;
      end
      repeat (CPB) @(posedge clk);
      check(dxl_tx == 1'b1, "stop bit");
      seen.push_back(b);
    end
  end

  task automatic send_rx(input logic [7:0] b);
    far_end = 1'b0;
    repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin far_end = b[i]; repeat (CPB) @(posedge clk); end
    far_end = 1'b1;
    repeat (CPB) @(posedge clk);
  endtask

  initial begin
    logic [7:0] sent[$];
    int t0, t1, cyc;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    repeat (3) @(posedge clk);
    check(!dxl_dir && dxl_tx, "idle: released, line high");
    // transmit burst
    @(negedge clk);
    for (int i = 0; i < 40; i++) begin sent.push_back(8'($urandom)); txq.push_back(sent[i]); end
    cyc = 0;
    @(posedge clk);
    while (dxl_dir) begin @(posedge clk); cyc++; end
    repeat (CPB) @(posedge clk);
    check(seen.size() == 40, "all bytes on the line");
    foreach (sent[i]) if (i < seen.size()) check(seen[i] == sent[i], "byte on line");
    if (cyc < 40 * 10 * CPB || cyc > 40 * 10 * CPB + 5) $display("burst took %0d cycles", cyc);
    check(cyc >= 40 * 10 * CPB && cyc <= 40 * 10 * CPB + 5, "10 bit times per byte, back to back");
    check(dir_low_during_frame == 0, "dir high while sending");
    check(rxlog.size() == 0, "own transmission not received");
    // receive
    sent = {};
    for (int i = 0; i < 40; i++) begin
      sent.push_back(8'($urandom));
      send_rx(sent[i]);
      if (i % 7 == 3) repeat (13) @(posedge clk);
    end
    repeat (3 * CPB) @(posedge clk);
    check(rxlog.size() == 40, "all bytes received");
    foreach (sent[i]) if (i < rxlog.size()) begin
      check(rxlog[i] == sent[i], "received byte");
    end
    // overflow
    rx_full = 1'b1;
    send_rx(8'h3C);
    send_rx(8'hC3);
    repeat (3 * CPB) @(posedge clk);
    check(rx_overflow == 2 && rxlog.size() == 40, "bytes dropped when full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
