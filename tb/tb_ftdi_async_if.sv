// tb_ftdi_async_if: the host interface against the FT2232H model.
// 50 bytes from the host and 50 bytes to the host are offered at the same
// time; all must arrive in order, the first transfer must be a write
// (outgoing data has priority), and a write and a read must take 16 and 14
// cycles with the default timing. The incoming FIFO is then held full, and
// no byte may be read from the FTDI until it has room again.
`timescale 1ns/1ps
module tb_ftdi_async_if;
  import dxl_tb_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = !clk;

  logic [7:0] dbus_i, dbus_o, to_host_data, from_host_data;
  logic       dbus_oe, txe_n, wr_n, rxif_n, rd_n;
  logic       to_host_empty, to_host_read, from_host_write, from_host_full = 1'b0;

  ftdi_async_if dut (.*);

  ftdi_model ftdi (
    .dbus_to_fpga (dbus_i), .dbus_from_fpga (dbus_o), .dbus_oe,
    .txe_n, .wr_n, .rxif_n, .rd_n
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [7:0] outq[$], inlog[$];
  assign to_host_empty = (outq.size() == 0);
  assign to_host_data  = to_host_empty ? 8'h00 : outq[0];
  // handshakes are sampled mid-cycle, when they are settled
  logic to_host_read_q = 1'b0;
  always @(negedge clk) to_host_read_q = to_host_read && !rst;
  always @(posedge clk) #1 if (to_host_read_q) void'(outq.pop_front());     // after the DUT has taken the byte
  always @(posedge clk) if (from_host_write && !rst) inlog.push_back(from_host_data);

  // strobe timing
  int first_wr = -1, first_rd = -1, cyc = 0;
  int wr_starts[$], rd_starts[$];
  logic wr_q = 1'b1, rd_q = 1'b1;
  always @(posedge clk) begin
    cyc++;
    if (wr_q && !wr_n) wr_starts.push_back(cyc);
    if (rd_q && !rd_n) rd_starts.push_back(cyc);
    wr_q <= wr_n;
    rd_q <= rd_n;
  end

  initial begin
    byte_q_t up, down;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    @(negedge clk);
    for (int i = 0; i < 50; i++) begin
      up.push_back(8'($urandom));
      down.push_back(8'($urandom));
    end
    foreach (up[i]) ftdi.to_fpga.push_back(up[i]);
    foreach (down[i]) outq.push_back(down[i]);
    repeat (3000) @(posedge clk);
    check(ftdi.from_fpga.size() == 50, "all bytes to host");
    check(inlog.size() == 50, "all bytes from host");
    foreach (down[i]) if (i < ftdi.from_fpga.size()) check(ftdi.from_fpga[i] == down[i], "byte to host");
    foreach (up[i]) if (i < inlog.size()) check(inlog[i] == up[i], "byte from host");
    check(wr_starts.size() > 0 && rd_starts.size() > 0 && wr_starts[0] < rd_starts[0],
          "outgoing first");
    check(rd_starts[0] > wr_starts[wr_starts.size()-1], "no read while bytes wait to go out");
    check(wr_starts[1] - wr_starts[0] == 16, "16 cycles per write");
    check(rd_starts[1] - rd_starts[0] == 14, "14 cycles per read");
    check(ftdi.violations == 0, "FTDI protocol");
    // back-pressure
    from_host_full = 1'b1;
    ftdi.to_fpga.push_back(8'h77);
    repeat (200) @(posedge clk);
    check(inlog.size() == 50 && ftdi.to_fpga.size() == 1, "no read while full");
    from_host_full = 1'b0;
    repeat (200) @(posedge clk);
    check(inlog.size() == 51 && inlog[50] == 8'h77, "read after room");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
