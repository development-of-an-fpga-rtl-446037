// tb_sync_fifo: random pushes and pops against a queue model, with DEPTH = 8
// so that full is reached often. Checks data order, show-ahead output,
// full/empty flags, and a simultaneous read and write while full.
`timescale 1ns/1ps
module tb_sync_fifo;
  localparam int DEPTH = 8;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = !clk;

  logic       we = 1'b0, re = 1'b0, full, empty;
  logic [7:0] wd = '0, rd;

  sync_fifo #(.DEPTH(DEPTH), .ELEMENT_SIZE(8)) dut (
    .clk, .rst, .write_enable (we), .data_write (wd), .read_enable (re),
    .data_read (rd), .full, .empty
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [7:0] model[$];
  int n_full = 0, n_both_full = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    @(posedge clk);
    for (int t = 0; t < 4000; t++) begin
      // phases: mostly fill, then mostly drain
      bit fill;
      fill = ((t / 200) % 2) == 0;
      @(negedge clk);
      check(empty == (model.size() == 0), "empty flag");
      check(full  == (model.size() == DEPTH), "full flag");
      if (model.size() > 0) check(rd == model[0], "head data");
      re = (model.size() > 0) && (($urandom % 100) < (fill ? 30 : 80));
      we = (($urandom % 100) < (fill ? 80 : 30)) && (model.size() < DEPTH || re);
      wd = 8'($urandom);
      if (full) n_full++;
      if (full && we && re) n_both_full++;
      @(posedge clk);
      #1;
      if (re) void'(model.pop_front());
      if (we) model.push_back(wd);
    end
    check(n_full > 0 && n_both_full > 0, "full and read+write at full reached");
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
