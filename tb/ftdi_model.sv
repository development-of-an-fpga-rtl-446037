// ftdi_model: behavioural model of one FT2232H channel in asynchronous FIFO
// mode, for simulation only (kind: behavioural model; the real part is a USB
// bridge chip).
//
// The testbench queues host-to-device bytes in to_fpga; rxif_n is low while a
// byte is waiting. A falling rd_n puts the byte on dbus 14 ns later; the
// rising rd_n pops it and holds rxif_n high for 50 ns. txe_n is low when the
// model can take a byte; the byte on dbus_from_fpga is taken at the rising
// edge of wr_n, appended to from_fpga, and txe_n goes high for 50 ns. The
// model checks that dbus is driven during wr_n and counts violations.
module ftdi_model (
  output logic [7:0] dbus_to_fpga,
  input  logic [7:0] dbus_from_fpga,
  input  logic       dbus_oe,
  output logic       txe_n,
  input  logic       wr_n,
  output logic       rxif_n,
  input  logic       rd_n
);
  import dxl_tb_pkg::*;

  byte_q_t to_fpga;
  byte_q_t from_fpga;
  int      violations = 0;
  logic    rx_hold = 1'b0;
  logic    tx_hold = 1'b0;
  logic    rd_low  = 1'b0;   // a strobe must fall before its rise counts
  logic    wr_low  = 1'b0;

  initial dbus_to_fpga = 8'h00;

  always_comb rxif_n = !(to_fpga.size() > 0 && !rx_hold);
  always_comb txe_n  = tx_hold;

  always @(negedge rd_n) begin
    rd_low = 1'b1;
    if (rxif_n) violations++;
    #14 dbus_to_fpga = (to_fpga.size() > 0) ? to_fpga[0] : 8'h00;
  end

  always @(posedge rd_n) begin
    if (rd_low) begin
      rd_low = 1'b0;
      if (to_fpga.size() > 0) void'(to_fpga.pop_front());
      rx_hold = 1'b1;
      #50 rx_hold = 1'b0;
    end
  end

  always @(negedge wr_n) begin
    wr_low = 1'b1;
    if (txe_n || !dbus_oe) violations++;
  end

  always @(posedge wr_n) begin
    if (wr_low) begin
      wr_low = 1'b0;
      if (!dbus_oe) violations++;
      from_fpga.push_back(dbus_from_fpga);
      tx_hold = 1'b1;
      #50 tx_hold = 1'b0;
    end
  end
endmodule
