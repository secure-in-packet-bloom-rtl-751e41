// input_arbiter -- merges the packet buses of the eight receive queues into
// the single packet bus of the forwarding pipeline, one whole packet at a
// time.
//
// How it works: each input has a small FIFO (IN_DEPTH words). When no packet
// is being passed on, the arbiter picks, round robin starting after the queue
// served last, the next input whose FIFO holds a word, and then passes that
// input's words until the end-of-packet word (first non-zero ctrl after the
// frame words began) has gone out. Words of a packet are never interleaved
// with those of another.
//
// Interface and timing: in_wr/in_word/in_rdy per input and out_wr/out_word/
// out_rdy towards the output queues; a word moves when wr and rdy are both
// high and wr is only raised with rdy high. A word written into an empty input
// FIFO can leave the arbiter on the next clock. Selecting an Rx queue and
// forwarding its packet follows the document; round robin and the per-input
// FIFOs follow the reference pipeline's usual arbiter and are this design's
// reading of it.
module input_arbiter
  import zf_pkg::*;
#(
  parameter int NUM_IN   = NUM_QUEUES,
  parameter int IN_DEPTH = 32
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic      [NUM_IN-1:0] in_wr,
  input  pkt_word_t [NUM_IN-1:0] in_word,
  output logic      [NUM_IN-1:0] in_rdy,
  output logic                   out_wr,
  output pkt_word_t              out_word,
  input  logic                   out_rdy
);
  localparam int SW = (NUM_IN > 1) ? $clog2(NUM_IN) : 1;

  logic      [NUM_IN-1:0] f_full, f_empty, f_rd;
  pkt_word_t [NUM_IN-1:0] f_head;

  for (genvar i = 0; i < NUM_IN; i++) begin : g_in
    logic [$clog2(IN_DEPTH):0] cnt;
    sync_fifo #(.T(pkt_word_t), .DEPTH(IN_DEPTH)) u_fifo (
      .clk, .rst_n, .wr_en(in_wr[i]), .wr_data(in_word[i]), .rd_en(f_rd[i]),
      .rd_data(f_head[i]), .full(f_full[i]), .empty(f_empty[i]), .count(cnt)
    );
    assign in_rdy[i] = !f_full[i];
  end

  logic          active, data_seen;
  logic [SW-1:0] cur, last;
  logic [SW-1:0] pick;
  logic          found;

  // round robin: first non-empty input after the one served last
  always_comb begin
    pick  = last;
    found = 1'b0;
    for (int k = NUM_IN; k >= 1; k--) begin
      if (!f_empty[(int'(last) + k) % NUM_IN]) begin
        pick  = SW'((int'(last) + k) % NUM_IN);
        found = 1'b1;
      end
    end
  end

  assign out_word = f_head[cur];
  assign out_wr   = active && !f_empty[cur] && out_rdy;

  always_comb begin
    f_rd = '0;
    f_rd[cur] = out_wr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active    <= 1'b0;
      data_seen <= 1'b0;
      cur       <= '0;
      last      <= SW'(NUM_IN - 1);
    end else if (!active) begin
      if (found) begin
        active    <= 1'b1;
        data_seen <= 1'b0;
        cur       <= pick;
        last      <= pick;
      end
    end else if (out_wr) begin
      if (out_word.ctrl == 8'h00) data_seen <= 1'b1;
      else if (data_seen) begin
        active    <= 1'b0;
        data_seen <= 1'b0;
      end
    end
  end

endmodule
