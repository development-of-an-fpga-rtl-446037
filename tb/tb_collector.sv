// tb_collector: loads receive-FIFO stand-ins with status packets and noise
// and checks the byte stream towards the host, with TIMEOUT = 200:
//   a packet after noise on bus 1 comes out whole, its ID is learned for
//   bus 1 and done pulses; packets waiting on buses 0 and 2 come out one
//   after the other, never interleaved; a busy bus with no traffic times out
//   after TIMEOUT cycles, but not while it is transmitting; a packet cut off
//   mid-way is abandoned after TIMEOUT cycles and the next bus is served;
//   nothing is written while the host FIFO is full; taken arms the state.
`timescale 1ns/1ps
module tb_collector;
  import dxl_tb_pkg::*;
  localparam int NB = 4, TO = 200;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = !clk;

  logic [NB-1:0][7:0] rx_data, info_expect = '0, arm_count;
  logic [NB-1:0]      rx_empty, rx_read, tx_active = '0, rx_active = '0;
  logic [NB-1:0]      info_target = '0, arm_mask, done, timeout, bus_busy = '0;
  logic [7:0]         out_data, learn_id;
  logic               out_write, out_full = 1'b0, taken = 1'b0, arm_valid, learn_valid;
  logic [1:0]         learn_bus;
  logic [15:0]        packets_forwarded, timeouts;

  collector #(.NUM_BUSES(NB), .TIMEOUT(TO)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  byte_q_t rxq [NB];
  always_comb for (int k = 0; k < NB; k++) begin
    rx_empty[k] = rxq[k].size() == 0;
    rx_data[k]  = rx_empty[k] ? 8'h00 : rxq[k][0];
  end
  // handshakes are sampled mid-cycle, when they are settled
  logic [NB-1:0] rd_q = '0;
  always @(negedge clk) rd_q = rst ? '0 : rx_read;
  always @(posedge clk) #1 for (int k = 0; k < NB; k++) if (rd_q[k]) void'(rxq[k].pop_front());

  byte_q_t outlog;
  int n_done [NB], n_to [NB], learned [256], wrote_full = 0;
  always @(posedge clk) if (!rst) begin
    if (out_write) begin outlog.push_back(out_data); if (out_full) wrote_full++; end
    for (int k = 0; k < NB; k++) begin
      if (done[k]) n_done[k]++;
      if (timeout[k]) n_to[k]++;
    end
    if (learn_valid) learned[learn_id] = int'(learn_bus) + 1;
  end

  function automatic byte_q_t status(logic [7:0] id, int n);
    byte_q_t d;
    d = '{8'h00};
    for (int i = 0; i < n; i++) d.push_back(8'(id + i));
    return make_packet(id, 8'h55, d);
  endfunction

  initial begin
    byte_q_t a, b, c, exp_q;
    foreach (n_done[k]) begin n_done[k] = 0; n_to[k] = 0; end
    foreach (learned[i]) learned[i] = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);

    // packet after noise on bus 1
    a = status(8'd5, 4);
    rxq[1] = '{8'h13, 8'hFF, 8'h20};
    foreach (a[i]) rxq[1].push_back(a[i]);
    repeat (60) @(negedge clk);
    check(outlog == a, "packet after noise forwarded whole");
    check(learned[5] == 2, "ID 5 learned on bus 1");
    check(n_done[1] == 1 && packets_forwarded == 1, "done for bus 1");
    outlog = {};

    // two buses at once, with the host FIFO full for a while
    b = status(8'd9, 6);
    c = status(8'd12, 2);
    out_full = 1'b1;
    foreach (b[i]) rxq[0].push_back(b[i]);
    foreach (c[i]) rxq[2].push_back(c[i]);
    repeat (30) @(negedge clk);
    check(outlog.size() == 0, "nothing written while full");
    out_full = 1'b0;
    repeat (80) @(negedge clk);
    exp_q = b; foreach (c[i]) exp_q.push_back(c[i]);
    check(outlog.size() == exp_q.size(), "both packets forwarded");
    begin
      byte_q_t alt;
      alt = c; foreach (b[i]) alt.push_back(b[i]);
      check(outlog == exp_q || outlog == alt, "packets not interleaved");
    end
    check(learned[9] == 1 && learned[12] == 3, "IDs learned per bus");
    check(wrote_full == 0, "no write while full");
    outlog = {};

    // arming
    @(negedge clk);
    taken = 1'b1; info_target = 4'b1010; info_expect = {8'd3, 8'd0, 8'd2, 8'd0};
    #1 check(arm_valid && arm_mask == 4'b1010 && arm_count == {8'd3, 8'd0, 8'd2, 8'd0}, "taken arms the state");
    @(negedge clk);
    taken = 1'b0;

    // response timeout
    bus_busy = 4'b1000;
    tx_active = 4'b1000;
    repeat (2 * TO) @(negedge clk);
    check(n_to[3] == 0, "no timeout while transmitting");
    tx_active = '0;
    repeat (TO - 10) @(negedge clk);
    check(n_to[3] == 0, "no timeout before TIMEOUT cycles");
    repeat (20) @(negedge clk);
    check(n_to[3] == 1 && timeouts == 1, "timeout after TIMEOUT cycles");
    bus_busy = '0;

    // cut-off packet on bus 0, whole one on bus 2
    a = status(8'd20, 4);
    for (int i = 0; i < 9; i++) rxq[0].push_back(a[i]);
    repeat (20) @(negedge clk);
    c = status(8'd21, 1);
    foreach (c[i]) rxq[2].push_back(c[i]);
    repeat (TO + 60) @(negedge clk);
    check(outlog.size() == 9 + c.size(), "cut-off packet abandoned, next bus served");
    for (int i = 0; i < c.size(); i++)
      if (9 + i < outlog.size()) check(outlog[9 + i] == c[i], "packet after abandoned one");
    check(n_done[0] == 1 && n_done[2] == 2, "no done for the abandoned packet");

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
