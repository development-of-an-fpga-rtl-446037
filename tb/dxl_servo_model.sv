// dxl_servo_model: behavioural model of one Dynamixel servo on a half-duplex
// bus line, for simulation only (kind: behavioural model; the real part is an
// ARM microcontroller).
//
// It listens to `line` (8 data bits, one stop bit, CLKS_PER_BIT clock cycles
// per bit), parses DXL2 packets and answers on `drive` (1 = released):
//  PING        status with model number 0x0406 and firmware 0x26
//  READ        status with the requested bytes of its control table
//  WRITE       stores the bytes, status with no data
//  SYNC_READ   if its ID is listed at position p, it waits until p status
//              packets have passed on the line, then answers with its data
//  SYNC_WRITE  stores its own data, no answer
// A broadcast PING is answered after ID x 160 bit times, more than one PING
// answer (14 bytes) takes, so that
// answers do not collide. Answers start RETURN_DELAY cycles after the request
// (or the preceding status). The control table holds table_value(ID, addr)
// until written. Counters report what the model saw.
module dxl_servo_model #(
  parameter logic [7:0] ID           = 8'd1,
  parameter int unsigned CLKS_PER_BIT = 25,
  parameter int unsigned RETURN_DELAY = 200
) (
  input  logic clk,
  input  logic line,
  output logic drive
);
  import dxl_tb_pkg::*;

  logic [7:0] ctrl [256];
  logic       talking = 1'b0;
  int         statuses_seen = 0;
  int         requests_seen = 0;
  int         bad_crc_seen  = 0;
  int         writes_seen   = 0;
  byte_q_t    pkt;

  initial begin
    drive = 1'b1;
    for (int a = 0; a < 256; a++) ctrl[a] = table_value(ID, a);
  end

  task automatic send_byte(input logic [7:0] b);
    drive = 1'b0;
    repeat (CLKS_PER_BIT) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      drive = b[i];
      repeat (CLKS_PER_BIT) @(posedge clk);
    end
    drive = 1'b1;
    repeat (CLKS_PER_BIT) @(posedge clk);
  endtask

  task automatic send_status(input byte_q_t data);
    byte_q_t params, q;
    params = '{8'h00};                       // error field
    foreach (data[i]) params.push_back(data[i]);
    q = make_packet(ID, 8'h55, params);
    talking = 1'b1;
    foreach (q[i]) send_byte(q[i]);
    talking = 1'b0;
  endtask

  task automatic receive_byte(output logic [7:0] b);
    @(negedge line iff !talking);
    repeat (CLKS_PER_BIT / 2) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      repeat (CLKS_PER_BIT) @(posedge clk);
      b[i] = line;
    end
    repeat (CLKS_PER_BIT) @(posedge clk);   // stop bit
  endtask

  // Byte parser: collects one whole packet into pkt.
  task automatic receive_packet();
    logic [7:0] b;
    int unsigned len;
    forever begin
      pkt = {};
      receive_byte(b); if (b != 8'hFF) continue;
      receive_byte(b); if (b != 8'hFF) continue;
      receive_byte(b); if (b != 8'hFD) continue;
      receive_byte(b); if (b != 8'h00) continue;
      pkt = '{8'hFF, 8'hFF, 8'hFD, 8'h00};
      for (int i = 0; i < 3; i++) begin receive_byte(b); pkt.push_back(b); end
      len = {pkt[6], pkt[5]};
      for (int unsigned i = 0; i < len; i++) begin receive_byte(b); pkt.push_back(b); end
      return;
    end
  endtask

  task automatic handle(byte_q_t p);
    logic [7:0]  id, inst;
    int unsigned n, addr, dl, pos;
    byte_q_t     data;
    id   = p[4];
    inst = p[7];
    n    = p.size();
    if (id != ID && id != 8'hFE) return;
    requests_seen++;
    case (inst)
      8'h01: begin
        if (id == 8'hFE) repeat (int'(ID) * 160 * CLKS_PER_BIT) @(posedge clk);
        repeat (RETURN_DELAY) @(posedge clk);
        send_status('{8'h06, 8'h04, 8'h26});
      end
      8'h02: begin
        addr = {p[9], p[8]};
        dl   = {p[11], p[10]};
        data = {};
        for (int unsigned i = 0; i < dl; i++) data.push_back(ctrl[(addr + i) % 256]);
        repeat (RETURN_DELAY) @(posedge clk);
        if (id != 8'hFE) send_status(data);
      end
      8'h03: begin
        addr = {p[9], p[8]};
        for (int unsigned i = 10; i < n - 2; i++) ctrl[(addr + i - 10) % 256] = p[i];
        writes_seen++;
        repeat (RETURN_DELAY) @(posedge clk);
        if (id != 8'hFE) send_status('{});
      end
      8'h82: begin
        addr = {p[9], p[8]};
        dl   = {p[11], p[10]};
        pos  = 0;
        for (int unsigned i = 12; i < n - 2; i++) begin
          if (p[i] == ID) begin
            int base;
            base = statuses_seen;
            data = {};
            for (int unsigned j = 0; j < dl; j++) data.push_back(ctrl[(addr + j) % 256]);
            wait (statuses_seen >= base + int'(pos));
            repeat (RETURN_DELAY) @(posedge clk);
            send_status(data);
            return;
          end
          pos++;
        end
      end
      8'h83: begin
        addr = {p[9], p[8]};
        dl   = {p[11], p[10]};
        for (int unsigned i = 12; i + dl < n - 1; i += dl + 1) begin
          if (p[i] == ID) begin
            for (int unsigned j = 0; j < dl; j++) ctrl[(addr + j) % 256] = p[i + 1 + j];
            writes_seen++;
          end
        end
      end
      default: ;
    endcase
  endtask

  // The receiver keeps listening (and counting status packets of other
  // servos) while the request handler waits to answer.
  mailbox #(byte_q_t) requests = new();

  initial begin
    forever begin
      receive_packet();
      if (!crc_good(pkt))         bad_crc_seen++;
      else if (pkt[7] == 8'h55)   statuses_seen++;
      else                        requests.put(pkt);
    end
  end

  initial begin
    byte_q_t p;
    forever begin
      requests.get(p);
      handle(p);
    end
  end
endmodule
