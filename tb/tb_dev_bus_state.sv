// tb_dev_bus_state: learns IDs onto buses and looks them up, including a
// move to another bus and IDs out of range; arms pending-response counters,
// counts them down with done, clears them with timeout, and checks that 255
// (unknown number) is not counted down.
`timescale 1ns/1ps
module tb_dev_bus_state;
  localparam int NB = 4;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = !clk;

  logic [7:0]          lookup_id = '0, learn_id = '0;
  logic [NB-1:0]       lookup_mask, arm_mask = '0, done = '0, timeout = '0, busy;
  logic                learn_valid = 1'b0, arm_valid = 1'b0;
  logic [1:0]          learn_bus = '0;
  logic [NB-1:0][7:0]  arm_count = '0;

  dev_bus_state #(.NUM_BUSES(NB)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [NB-1:0] model [256];

  task automatic learn(input int id, input int bus);
    @(negedge clk);
    learn_valid = 1'b1; learn_id = 8'(id); learn_bus = 2'(bus);
    @(negedge clk);
    learn_valid = 1'b0;
    if (id <= 252) model[id] = NB'(1 << bus);
  endtask

  initial begin
    foreach (model[i]) model[i] = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int i = 0; i < 60; i++) learn($urandom % 256, $urandom % NB);
    learn(5, 1);
    learn(5, 3);        // moved
    learn(253, 0);      // not a device ID
    for (int id = 0; id < 256; id++) begin
      @(negedge clk);
      lookup_id = 8'(id);
      #1 check(lookup_mask == model[id], "ID map lookup");
    end
    // pending responses
    @(negedge clk);
    arm_valid = 1'b1; arm_mask = 4'b0101;
    arm_count = {8'd9, 8'd2, 8'd7, 8'd3};
    @(negedge clk);
    arm_valid = 1'b0;
    check(busy == 4'b0101, "armed buses busy");
    done = 4'b0001; @(negedge clk); done = 4'b0001; @(negedge clk);
    check(busy == 4'b0101, "bus 0 still waits for a third answer");
    done = 4'b0001; @(negedge clk); done = '0;
    check(busy == 4'b0100, "bus 0 released after three answers");
    timeout = 4'b0100; @(negedge clk); timeout = '0;
    check(busy == 4'b0000, "timeout releases bus 2");
    arm_valid = 1'b1; arm_mask = 4'b1000; arm_count = {8'hFF, 24'h0};
    @(negedge clk); arm_valid = 1'b0;
    for (int i = 0; i < 5; i++) begin done = 4'b1000; @(negedge clk); end
    done = '0;
    check(busy == 4'b1000, "unknown count is not counted down");
    timeout = 4'b1000; @(negedge clk); timeout = '0;
    check(busy == '0, "unknown count ended by timeout");
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
