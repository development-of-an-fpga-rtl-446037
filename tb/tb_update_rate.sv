// tb_update_rate: the evaluation workload of the controller. A host control
// loop sends a SYNC_WRITE (4 bytes to each of 20 servos) and then a SYNC_READ
// (10 bytes from each) and waits for the 20 answers before the next cycle.
// The controller is built at its defaults (4 buses, 4 MBaud); the 20 model
// servos are spread over the first 1, 2, 3 and then all 4 buses (ID i on bus
// (i-1) mod k), one set-up after the other with a reset in between. In each a
// broadcast PING first lets the controller learn where the IDs are.
//
// For each set-up it prints the update rate reached. It checks that all
// answers arrive well formed with no timeout, that the cycle is not shorter
// than the bus-time bound of the busiest bus (its request and answer bytes at
// 10 bits each, plus the servos' return delay), that the controller adds less
// than 15% to that bound, and that more buses give a higher rate. The 1 and
// 2 MBaud cases differ only in CLKS_PER_BIT (100, 50), which doubles or
// quadruples every bus time; they are not run here.
`timescale 1ns/1ps
module tb_update_rate;
  import dxl_tb_pkg::*;
  localparam int NB     = 4;
  localparam int CPB    = 25;
  localparam int NSERVO = 20;
  localparam int RDELAY = 200;
  localparam int WBYTES = 4;
  localparam int RBYTES = 10;
  localparam int CYCLES = 2;

  logic clk = 1'b0, rst = 1'b1;
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
    .crc_errors, .packets_sent, .packets_dropped, .packets_forwarded, .timeouts, .rx_overflows
  );

  ftdi_model ftdi (
    .dbus_to_fpga (dbus_i), .dbus_from_fpga (dbus_o), .dbus_oe, .txe_n, .wr_n, .rxif_n, .rd_n
  );

  // number of buses the servos are spread over in the current set-up
  int k = 1;
  logic [NSERVO-1:0] servo_drive;
  logic [NB-1:0]     line;
  always_comb begin
    for (int b = 0; b < NB; b++) begin
      logic l;
      l = 1'b1;
      for (int s = 0; s < NSERVO; s++) if (s % k == b) l &= servo_drive[s];
      line[b] = dxl_dir[b] ? dxl_tx[b] : l;
    end
  end
  assign dxl_rx = line;

  for (genvar s = 0; s < NSERVO; s++) begin : g_servo
    dxl_servo_model #(.ID(8'(s + 1)), .CLKS_PER_BIT(CPB), .RETURN_DELAY(RDELAY)) u (
      .clk, .line (line[s % k]), .drive (servo_drive[s])
    );
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // count whole answers in the host's byte stream, checking their CRC
  int rx_pos = 0, got = 0, bad = 0;
  always @(posedge clk) begin
    int n, len;
    n = ftdi.from_fpga.size() - rx_pos;
    if (n >= 7) begin
      len = {ftdi.from_fpga[rx_pos + 6], ftdi.from_fpga[rx_pos + 5]};
      if (n >= 7 + len) begin
        if (!crc_good(sub(ftdi.from_fpga, rx_pos, rx_pos + 6 + len))) bad++;
        rx_pos += 7 + len;
        got++;
      end
    end
  end

  longint cyc = 0;
  always @(posedge clk) cyc++;

  longint mean [NB];

  initial begin
    byte_q_t wr, rd;
    longint t0, bound;
    int n, to0;
    for (int setup = 1; setup <= NB; setup++) begin
      rst = 1'b1;
      k = setup;
      repeat (5) @(posedge clk);
      rst = 1'b0;
      repeat (5) @(posedge clk);
      got = 0;
      wr = make_packet(8'hFE, 8'h01, '{});
      foreach (wr[i]) ftdi.to_fpga.push_back(wr[i]);
      wait (got == NSERVO);
      // let the broadcast's wait for further answers run out
      wait (dut.u_proc.u_state.busy == '0);
      got = 0;
      bad = 0;
      to0 = int'(timeouts);
      t0 = cyc;
      for (int c = 0; c < CYCLES; c++) begin
        wr = '{8'd116, 8'd0, 8'(WBYTES), 8'd0};
        rd = '{8'd132, 8'd0, 8'(RBYTES), 8'd0};
        for (int id = 1; id <= NSERVO; id++) begin
          wr.push_back(8'(id));
          for (int j = 0; j < WBYTES; j++) wr.push_back(8'($urandom));
          rd.push_back(8'(id));
        end
        wr = make_packet(8'hFE, 8'h83, wr);
        rd = make_packet(8'hFE, 8'h82, rd);
        foreach (wr[i]) ftdi.to_fpga.push_back(wr[i]);
        foreach (rd[i]) ftdi.to_fpga.push_back(rd[i]);
        wait (got == NSERVO * (c + 1));
      end
      mean[setup - 1] = (cyc - t0) / CYCLES;
      // busiest bus: ceil(20 / k) servos
      n = (NSERVO + setup - 1) / setup;
      bound = longint'((14 + (1 + WBYTES) * n) + (14 + n) + (11 + RBYTES) * n) * 10 * CPB
              + longint'(n) * RDELAY;
      $display("%0d bus(es), 4 MBaud: %0d cycles per update, %0.0f Hz (bus-time bound %0.0f Hz)",
               setup, mean[setup - 1], 1.0e8 / real'(mean[setup - 1]), 1.0e8 / real'(bound));
      check(bad == 0, "answers well formed");
      check(int'(timeouts) == to0, "no timeout during the control loop");
      check(mean[setup - 1] >= bound, "not faster than the bus allows");
      check(real'(mean[setup - 1]) < 1.15 * real'(bound), "controller overhead below 15%");
      if (setup > 1) check(mean[setup - 1] < mean[setup - 2], "more buses, higher rate");
      repeat (100) @(posedge clk);
    end
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
