// tb_dxlfpga_top: end-to-end test of the controller at its default
// parameters (four buses, 4 MBaud, 1024-byte FIFOs, 500 us response timeout).
//
// Twenty model servos, IDs 1..20, hang on the four buses, five per bus (ID i
// on bus (i-1) % 4). A model FT2232H plays the host. The test sends, through
// the FTDI model:
//   1. a PING with a corrupted CRC                  -> dropped, no answer
//   2. a PING to ID 3 before any ID is known        -> sent to every bus,
//                                                      one answer, the other
//                                                      buses time out
//   3. a broadcast PING                             -> 20 answers; the
//                                                      controller learns
//                                                      which bus each ID is on
//   4. a SYNC_WRITE of 4 bytes to all 20 servos     -> split per bus; every
//                                                      servo stores its bytes
//   5. a SYNC_READ of those 4 bytes from all 20     -> split per bus, 20
//                                                      answers with the data
//   6. a READ from ID 7 and a WRITE to ID 3 (same   -> routed to that bus;
//      bus)                                         the WRITE waits for
//                                                      the READ's answer
// Every answer is parsed from the byte stream the host receives, its CRC and
// contents are checked against the servo models' tables, and the mechanisms
// (CRC drop, flooding of an unknown ID, timeout, broadcast ping, SYNC split,
// buses transmitting at the same time, collector arbitration between buses,
// distributor waiting for a busy bus) are counted; each must occur. The
// SYNC_WRITE + SYNC_READ cycle time is reported and compared with the bus
// bit time bound.
`timescale 1ns/1ps
module tb_dxlfpga_top;
  import dxl_tb_pkg::*;

  localparam int NB  = 4;
  localparam int CPB = 25;
  localparam int NSERVO = 20;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = !clk;

  logic [7:0] dbus_i, dbus_o;
  logic       dbus_oe, txe_n, wr_n, rxif_n, rd_n;
  logic [NB-1:0] dxl_tx, dxl_rx, dxl_dir;
  logic [15:0] crc_errors, packets_sent, packets_dropped, packets_forwarded, timeouts;
  logic [NB-1:0][15:0] rx_overflows;

  dxlfpga_top dut (
    .clk, .rst,
    .ftdi_dbus_i (dbus_i), .ftdi_dbus_o (dbus_o), .ftdi_dbus_oe (dbus_oe),
    .ftdi_txe_n (txe_n), .ftdi_wr_n (wr_n), .ftdi_rxif_n (rxif_n), .ftdi_rd_n (rd_n),
    .dxl_tx, .dxl_rx, .dxl_dir,
    .crc_errors, .packets_sent, .packets_dropped, .packets_forwarded, .timeouts,
    .rx_overflows
  );

  ftdi_model ftdi (
    .dbus_to_fpga (dbus_i), .dbus_from_fpga (dbus_o), .dbus_oe,
    .txe_n, .wr_n, .rxif_n, .rd_n
  );

  // bus lines: the FPGA drives when dir is high, otherwise the servos
  logic [NSERVO-1:0] servo_drive;
  logic [NB-1:0]     line;
  always_comb begin
    for (int b = 0; b < NB; b++) begin
      logic l;
      l = 1'b1;
      for (int s = 0; s < NSERVO; s++) if (s % NB == b) l &= servo_drive[s];
      line[b] = dxl_dir[b] ? dxl_tx[b] : l;
    end
  end
  assign dxl_rx = line;

  int         req_seen [NSERVO];
  int         wr_seen  [NSERVO];
  logic [7:0] ctrl_116 [NSERVO][4];
  logic [7:0] ctrl_10  [NSERVO];

  for (genvar s = 0; s < NSERVO; s++) begin : g_servo
    dxl_servo_model #(.ID(8'(s + 1)), .CLKS_PER_BIT(CPB)) u (
      .clk, .line (line[s % NB]), .drive (servo_drive[s])
    );
    always @(posedge clk) begin
      req_seen[s] <= u.requests_seen;
      wr_seen[s]  <= u.writes_seen;
      for (int j = 0; j < 4; j++) ctrl_116[s][j] <= u.ctrl[116 + j];
      ctrl_10[s]  <= u.ctrl[10];
    end
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- mechanism counters ----
  int n_parallel = 0, n_arbitration = 0, n_busy_wait = 0, n_split = 0;
  always @(posedge clk) if (!rst) begin
    if ($countones(dxl_dir) >= 2) n_parallel++;
    if (dut.u_proc.u_collector.state != 0 &&
        $countones(~dut.u_proc.rx_empty) >= 2) n_arbitration++;
    if (dut.u_proc.u_distributor.state == 0 && dut.u_proc.ir_valid &&
        dut.u_proc.ir_crc_ok && !dut.u_proc.taken) n_busy_wait++;
    if (dut.u_proc.taken && dut.u_proc.ir_inst inside {8'h82, 8'h83}) begin
      for (int b = 0; b < NB; b++)
        if (dut.u_proc.ir_target[b] && dut.u_proc.ir_bus_length[b] < dut.u_proc.ir_length)
          n_split++;
    end
  end

  // ---- host side helpers ----
  int rx_pos = 0;
  byte_q_t got[$];

  task automatic send(byte_q_t q);
    foreach (q[i]) ftdi.to_fpga.push_back(q[i]);
  endtask

  // Parse whole packets out of the host's received bytes.
  task automatic parse();
    forever begin
      int n, len;
      n = ftdi.from_fpga.size() - rx_pos;
      if (n < 7) return;
      len = {ftdi.from_fpga[rx_pos + 6], ftdi.from_fpga[rx_pos + 5]};
      if (n < 7 + len) return;
      begin
        byte_q_t p;
        p = sub(ftdi.from_fpga, rx_pos, rx_pos + 6 + len);
        got.push_back(p);
      end
      rx_pos += 7 + len;
    end
  endtask

  task automatic wait_packets(input int n, input int max_cycles);
    for (int c = 0; c < max_cycles; c++) begin
      @(posedge clk);
      parse();
      if (got.size() >= n) return;
    end
  endtask

  function automatic int bus_of(int id);
    return (id - 1) % NB;
  endfunction

  longint cycle = 0;
  always @(posedge clk) cycle++;

  initial begin
    byte_q_t p, params;
    longint t0, t1;
    int seen [NSERVO+1];

    repeat (10) @(posedge clk);
    rst = 1'b0;
    repeat (10) @(posedge clk);

    // 1. corrupted PING
    p = make_packet(8'd3, 8'h01, '{});
    p[p.size()-1] ^= 8'h01;
    send(p);
    repeat (2000) @(posedge clk);
    check(crc_errors == 1 && packets_dropped == 1, "bad CRC packet dropped");
    check(ftdi.from_fpga.size() == 0, "no answer to a bad packet");

    // 2. PING to an unknown ID: every bus gets it, one answer
    send(make_packet(8'd3, 8'h01, '{}));
    wait_packets(1, 20000);
    check(got.size() == 1, "one answer to unicast PING");
    if (got.size() >= 1)
      check(got[0] == make_packet(8'd3, 8'h55, '{8'h00, 8'h06, 8'h04, 8'h26}),
            "PING status from ID 3 forwarded unchanged");
    for (int s = 0; s < NSERVO; s++)
      if (s != 2) check(req_seen[s] == 0, "only ID 3 answered");
    check(packets_sent == 1, "unicast PING sent once");
    repeat (60000) @(posedge clk);
    check(timeouts >= 1, "buses without ID 3 released by timeout");
    got = {};

    // 3. broadcast PING
    send(make_packet(8'hFE, 8'h01, '{}));
    wait_packets(NSERVO, 400000);
    check(got.size() == NSERVO, "20 answers to broadcast PING");
    foreach (seen[i]) seen[i] = 0;
    foreach (got[i]) begin
      check(crc_good(got[i]) && got[i][7] == 8'h55, "broadcast PING answer well formed");
      if (got[i][4] >= 1 && got[i][4] <= NSERVO) seen[got[i][4]]++;
    end
    for (int id = 1; id <= NSERVO; id++) check(seen[id] == 1, "each ID answered once");
    for (int id = 1; id <= NSERVO; id++)
      check(dut.u_proc.u_state.id_map[id] == NB'(1 << bus_of(id)), "ID map learned");
    wait (dut.u_proc.u_state.busy == '0);
    got = {};

    // 4. SYNC_WRITE to address 116, 4 bytes each
    t0 = cycle;
    params = '{8'd116, 8'd0, 8'd4, 8'd0};
    for (int id = 1; id <= NSERVO; id++) begin
      params.push_back(8'(id));
      for (int j = 0; j < 4; j++) params.push_back(8'(id * 16 + j));
    end
    send(make_packet(8'hFE, 8'h83, params));

    // 5. SYNC_READ of the same bytes
    params = '{8'd116, 8'd0, 8'd4, 8'd0};
    for (int id = 1; id <= NSERVO; id++) params.push_back(8'(id));
    send(make_packet(8'hFE, 8'h82, params));
    wait_packets(NSERVO, 200000);
    t1 = cycle;
    check(got.size() == NSERVO, "20 answers to SYNC_READ");
    for (int s = 0; s < NSERVO; s++) begin
      check(wr_seen[s] == 1, "SYNC_WRITE reached each servo once");
      for (int j = 0; j < 4; j++)
        check(ctrl_116[s][j] == 8'((s + 1) * 16 + j), "SYNC_WRITE data stored");
    end
    foreach (seen[i]) seen[i] = 0;
    foreach (got[i]) begin
      int id;
      id = got[i][4];
      check(crc_good(got[i]), "SYNC_READ answer CRC");
      check(got[i].size() == 7 + 8 && got[i][8] == 8'h00, "SYNC_READ answer length");
      if (id >= 1 && id <= NSERVO) begin
        seen[id]++;
        for (int j = 0; j < 4; j++)
          check(got[i][9 + j] == 8'(id * 16 + j), "SYNC_READ data");
      end
    end
    for (int id = 1; id <= NSERVO; id++) check(seen[id] == 1, "each ID read once");
    $display("SYNC_WRITE + SYNC_READ of %0d servos on %0d buses: %0d cycles (%0.1f Hz at 100 MHz)",
             NSERVO, NB, t1 - t0, 1.0e8 / real'(t1 - t0));
    // One bus carries 5 servos: its requests (SYNC_WRITE 12+5*5 bytes with
    // header, SYNC_READ 14+5 bytes) and 5 answers of 15 bytes are 131 bytes at
    // 10 bits of CPB cycles; the controller cannot be faster than that.
    check(t1 - t0 >= 131 * 10 * CPB, "cycle time not below the bus bit-time bound");
    check(t1 - t0 < 4 * 131 * 10 * CPB, "buses served in parallel");
    got = {};

    // 6. READ from ID 7 (address 0, 2 bytes) and WRITE to ID 9
    send(make_packet(8'd7, 8'h02, '{8'd0, 8'd0, 8'd2, 8'd0}));
    send(make_packet(8'd3, 8'h03, '{8'd10, 8'd0, 8'hAB}));
    wait_packets(2, 40000);
    check(got.size() == 2, "answers to READ and WRITE");
    foreach (got[i]) begin
      if (got[i][4] == 8'd7)
        check(got[i] == make_packet(8'd7, 8'h55, '{8'h00, table_value(8'd7, 0), table_value(8'd7, 1)}),
              "READ answer");
      else
        check(got[i] == make_packet(8'd3, 8'h55, '{8'h00}), "WRITE answer");
    end
    check(ctrl_10[2] == 8'hAB, "WRITE stored");
    check(req_seen[2] == 5 && req_seen[6] == 4, "READ and WRITE reached their servos");
    for (int s = 0; s < NSERVO; s++)
      if (s != 6 && s != 2) check(req_seen[s] == 3, "unicast requests reach only their servo");

    // mechanisms
    check(ftdi.violations == 0, "FTDI strobe protocol");
    check(rx_overflows == '0, "no receive overflow");
    $display("mechanisms: crc_drop=%0d timeouts=%0d split=%0d parallel=%0d arbitration=%0d busy_wait=%0d",
             packets_dropped, timeouts, n_split, n_parallel, n_arbitration, n_busy_wait);
    check(packets_dropped > 0, "mechanism: CRC drop");
    check(timeouts > 0, "mechanism: response timeout");
    check(n_split > 0, "mechanism: SYNC split per bus");
    check(n_parallel > 0, "mechanism: buses transmitting together");
    check(n_arbitration > 0, "mechanism: collector arbitration");
    check(n_busy_wait > 0, "mechanism: distributor waits for busy bus");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
