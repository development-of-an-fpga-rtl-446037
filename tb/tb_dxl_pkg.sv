// tb_dxl_pkg: checks the protocol package's CRC16 against packet examples
// published for DXL2 (PING, its status answer, a READ) and against the
// bit-serial reference for random byte strings, and checks the precomputed
// header CRC.
`timescale 1ns/1ps
module tb_dxl_pkg;
  import dxl_pkg::*;
  import dxl_tb_pkg::*;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [15:0] crc_rtl(byte_q_t q);
    logic [15:0] c = 16'h0000;
    foreach (q[i]) c = crc16_update(c, q[i]);
    return c;
  endfunction

  initial begin
    byte_q_t q;
    // PING to ID 1: FF FF FD 00 01 03 00 01, CRC 0x4E19
    q = '{8'hFF, 8'hFF, 8'hFD, 8'h00, 8'h01, 8'h03, 8'h00, 8'h01};
    check(crc_rtl(q) == 16'h4E19, "PING example");
    check(crc_ref(q) == 16'h4E19, "reference PING example");
    // its status: model 0x0406, firmware 0x26, CRC 0x5D65
    q = '{8'hFF, 8'hFF, 8'hFD, 8'h00, 8'h01, 8'h07, 8'h00, 8'h55, 8'h00, 8'h06, 8'h04, 8'h26};
    check(crc_rtl(q) == 16'h5D65, "status example");
    // READ of 4 bytes at 132 from ID 1, CRC 0x151D
    q = '{8'hFF, 8'hFF, 8'hFD, 8'h00, 8'h01, 8'h07, 8'h00, 8'h02, 8'h84, 8'h00, 8'h04, 8'h00};
    check(crc_rtl(q) == 16'h151D, "READ example");
    check(CRC_AFTER_HEADER == crc_ref('{8'hFF, 8'hFF, 8'hFD, 8'h00}), "header CRC constant");
    for (int t = 0; t < 200; t++) begin
      q = {};
      for (int i = 0; i < 1 + t % 40; i++) q.push_back(8'($urandom));
      check(crc_rtl(q) == crc_ref(q), "random string");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
