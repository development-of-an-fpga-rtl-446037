// tb_packet_info_fifo: writes random packet-info records, reads them back
// in order while writing, and checks every field and the full/valid flags.
`timescale 1ns/1ps
module tb_packet_info_fifo;
  localparam int NB = 4, DEPTH = 4;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = !clk;

  logic                w_write = 1'b0, full, valid, read = 1'b0;
  logic                w_crc_ok = 1'b0, r_crc_ok;
  logic [7:0]          w_inst = '0, w_id = '0, r_inst, r_id;
  logic [15:0]         w_length = '0, r_length;
  logic [NB-1:0]       w_target = '0, r_target;
  logic [NB-1:0][15:0] w_bus_length = '0, r_bus_length;
  logic [NB-1:0][7:0]  w_expect = '0, r_expect;

  packet_info_fifo #(.NUM_BUSES(NB), .DEPTH(DEPTH)) dut (
    .clk, .rst, .write (w_write), .full, .w_crc_ok, .w_inst, .w_id, .w_length,
    .w_target, .w_bus_length, .w_expect, .valid, .read, .r_crc_ok, .r_inst, .r_id,
    .r_length, .r_target, .r_bus_length, .r_expect
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  typedef struct {
    bit ok; logic [7:0] inst, id; logic [15:0] len; logic [NB-1:0] tgt;
    logic [NB-1:0][15:0] bl; logic [NB-1:0][7:0] ex;
  } rec_t;
  rec_t model[$];

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int t = 0; t < 400; t++) begin
      rec_t r;
      @(negedge clk);
      check(valid == (model.size() > 0), "valid flag");
      check(full == (model.size() == DEPTH), "full flag");
      if (model.size() > 0) begin
        check(r_crc_ok == model[0].ok && r_inst == model[0].inst && r_id == model[0].id &&
              r_length == model[0].len && r_target == model[0].tgt &&
              r_bus_length == model[0].bl && r_expect == model[0].ex, "record fields");
      end
      read = valid && ($urandom % 2);
      w_write = !full && ($urandom % 2);
      r.ok = 1'($urandom); r.inst = 8'($urandom); r.id = 8'($urandom); r.len = 16'($urandom);
      r.tgt = NB'($urandom);
      for (int k = 0; k < NB; k++) begin r.bl[k] = 16'($urandom); r.ex[k] = 8'($urandom); end
      w_crc_ok = r.ok; w_inst = r.inst; w_id = r.id; w_length = r.len; w_target = r.tgt;
      w_bus_length = r.bl; w_expect = r.ex;
      @(posedge clk);
      #1;
      if (read) void'(model.pop_front());
      if (w_write) model.push_back(r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
