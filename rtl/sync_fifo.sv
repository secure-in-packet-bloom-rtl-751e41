// sync_fifo -- single-clock first-in first-out buffer used by the queues of
// the forwarding node.
//
// A memory array of DEPTH entries of type T with read and write pointers one
// bit wider than the address. The head entry is visible on rd_data while the
// FIFO is not empty (show-ahead); rd_en pops it at the clock edge, wr_en
// pushes wr_data. Reading and writing in the same cycle is allowed, also when
// full if a read is made. count gives the occupancy. Writing a full FIFO or
// reading an empty one is a protocol error and is flagged by assertions.
// This is an implementation helper; its depth is set by the instantiating
// queue. The assertions are disabled during reset, so lint reports rst_n as
// used both asynchronously and synchronously; that is intended.
module sync_fifo #(
  parameter type T     = logic [71:0],
  parameter int  DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  T                         wr_data,
  input  logic                     rd_en,
  output T                         rd_data,
  output logic                     full,
  output logic                     empty,
  output logic [$clog2(DEPTH):0]   count
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T mem [DEPTH];
  logic [AW:0] wptr, rptr;

  assign count   = ($clog2(DEPTH)+1)'(wptr - rptr);
  assign empty   = (wptr == rptr);
  assign full    = (count == ($clog2(DEPTH)+1)'(DEPTH));
  assign rd_data = mem[rptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (wr_en && (!full || rd_en)) mem[wptr[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (wr_en && (!full || rd_en)) wptr <= wptr + 1'b1;
      if (rd_en && !empty)           rptr <= rptr + 1'b1;
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full && !rd_en));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty));

endmodule
