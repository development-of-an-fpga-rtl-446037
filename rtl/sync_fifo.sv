// sync_fifo: synchronous FIFO, the buffer that decouples every pair of blocks
// in the controller (host interface, packet processor, device bus interfaces).
//
// The interface (DEPTH, ELEMENT_SIZE, write_enable/data_write,
// read_enable/data_read, full/empty) is the one the design defines for its
// FIFO. Insides are this design's own: a circular buffer of DEPTH entries with
// read and write pointers and an element count.
//
// Timing: show-ahead. data_read always presents the oldest element while
// empty is low; read_enable pops it at the clock edge. A write while full and
// a read while empty are ignored (and flagged by assertions). Writing and
// reading in the same cycle is allowed, also when full (the read frees the
// slot). Reset is synchronous and empties the FIFO.
module sync_fifo #(
  parameter int unsigned DEPTH        = 1024,
  parameter int unsigned ELEMENT_SIZE = 8
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    write_enable,
  input  logic [ELEMENT_SIZE-1:0] data_write,
  input  logic                    read_enable,
  output logic [ELEMENT_SIZE-1:0] data_read,
  output logic                    full,
  output logic                    empty
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [ELEMENT_SIZE-1:0] mem [DEPTH];
  logic [AW-1:0]           wr_ptr, rd_ptr;
  logic [AW:0]             count;
  logic                    do_write, do_read;

  assign do_read  = read_enable && (count != 0);
  assign do_write = write_enable && ((count != (AW+1)'(DEPTH)) || do_read);

  assign full      = (count == (AW+1)'(DEPTH));
  assign empty     = (count == 0);
  assign data_read = mem[rd_ptr];

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_write) mem[wr_ptr] <= data_write;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_write) wr_ptr <= next_ptr(wr_ptr);
      if (do_read)  rd_ptr <= next_ptr(rd_ptr);
      case ({do_write, do_read})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  // Producers must respect full, consumers empty.
  a_no_overflow:  assert property (@(posedge clk) disable iff (rst)
                                   write_enable && full |-> read_enable);
  a_no_underflow: assert property (@(posedge clk) disable iff (rst)
                                   read_enable |-> !empty);
endmodule
