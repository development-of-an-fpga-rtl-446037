// dxl_tb_pkg: testbench helpers for DXL2 packets, written independently of
// the RTL. The CRC here is computed bit-serially, one message bit at a time
// into a 16-bit LFSR with taps 0x8005, rather than byte-wise as in the RTL;
// tb_dxl_pkg checks it against published packet examples.
package dxl_tb_pkg;

  typedef logic [7:0] byte_q_t[$];

  function automatic logic [15:0] crc_ref(byte_q_t q);
    logic [15:0] c = 16'h0000;
    foreach (q[i]) begin
      for (int b = 7; b >= 0; b--) begin
        logic fb;
        fb = c[15] ^ q[i][b];
        c  = {c[14:0], 1'b0};
        if (fb) c = c ^ 16'h8005;
      end
    end
    return c;
  endfunction

  // Bytes a..b of q.
  function automatic byte_q_t sub(byte_q_t q, int a, int b);
    byte_q_t r;
    for (int i = a; i <= b; i++) r.push_back(q[i]);
    return r;
  endfunction

  // True if the last two bytes of p are the CRC of the rest.
  function automatic bit crc_good(byte_q_t p);
    int n;
    n = p.size();
    if (n < 3) return 1'b0;
    return {p[n-1], p[n-2]} == crc_ref(sub(p, 0, n - 3));
  endfunction

  // Full packet: header, reserved, id, length, instruction, params, CRC.
  function automatic byte_q_t make_packet(logic [7:0] id, logic [7:0] inst, byte_q_t params);
    byte_q_t q;
    logic [15:0] len, c;
    len = 16'(params.size() + 3);
    q = '{8'hFF, 8'hFF, 8'hFD, 8'h00, id, len[7:0], len[15:8], inst};
    foreach (params[i]) q.push_back(params[i]);
    c = crc_ref(q);
    q.push_back(c[7:0]);
    q.push_back(c[15:8]);
    return q;
  endfunction

  // Contents of a model servo's control table: a fixed pattern per ID.
  function automatic logic [7:0] table_value(logic [7:0] id, int unsigned addr);
    return 8'((id * 8'd37) ^ addr[7:0] ^ 8'h5A);
  endfunction

endpackage
