// rx_queue -- receive queue of one port: buffers a frame from the MAC (or
// the host DMA engine) and sends it on the packet bus behind an I/O queue
// module header.
//
// How it works: frame words go into a data FIFO together with their last
// flag and valid-byte count while word and byte counters run; when the last
// word is in, the lengths go into a length FIFO. The sending side waits for a
// complete frame, emits the module header (ctrl 0xFF: destination 0, length
// in words, source port PORT_NUM, length in bytes) and then the frame words
// with ctrl 0x00, the last one with the one-hot end marker of its last valid
// byte (0x80 >> (bytes - 1)).
//
// Interface and timing: frame side rx_valid/rx_word/rx_ready (a word moves
// when valid and ready are high), packet side out_wr/out_word/out_rdy. A frame
// is sent only once it has been received completely (store and forward). The
// header format is the reference pipeline's; the FIFO sizes and flow control
// towards the MAC are this design's choice (the MAC itself is outside the
// design).
module rx_queue
  import zf_pkg::*;
#(
  parameter int         DEPTH    = 512,
  parameter int         LEN_DEPTH = 16,
  parameter logic [2:0] PORT_NUM = 3'd0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rx_valid,
  input  frame_word_t rx_word,
  output logic        rx_ready,
  output logic        out_wr,
  output pkt_word_t   out_word,
  input  logic        out_rdy
);
  typedef struct packed {
    logic [15:0] words;
    logic [15:0] bytes;
  } len_t;

  logic        d_full, d_empty, d_rd, l_full, l_empty, l_rd, l_wr;
  frame_word_t d_head;
  len_t        l_head, l_in;
  logic [$clog2(DEPTH):0]     d_cnt;
  logic [$clog2(LEN_DEPTH):0] l_cnt;
  logic [15:0] wcnt, bcnt;
  logic        accept;

  assign rx_ready = !d_full && !l_full;
  assign accept   = rx_valid && rx_ready;
  assign l_wr     = accept && rx_word.last;
  assign l_in     = '{words: wcnt + 16'd1,
                      bytes: bcnt + (rx_word.last ? 16'(rx_word.bytes) : 16'd8)};

  sync_fifo #(.T(frame_word_t), .DEPTH(DEPTH)) u_data (
    .clk, .rst_n, .wr_en(accept), .wr_data(rx_word), .rd_en(d_rd),
    .rd_data(d_head), .full(d_full), .empty(d_empty), .count(d_cnt)
  );
  sync_fifo #(.T(len_t), .DEPTH(LEN_DEPTH)) u_len (
    .clk, .rst_n, .wr_en(l_wr), .wr_data(l_in), .rd_en(l_rd),
    .rd_data(l_head), .full(l_full), .empty(l_empty), .count(l_cnt)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wcnt <= '0;
      bcnt <= '0;
    end else if (accept) begin
      wcnt <= rx_word.last ? '0 : wcnt + 16'd1;
      bcnt <= rx_word.last ? '0 : bcnt + 16'd8;
    end
  end

  // sending side
  logic sending;   // header sent, frame words follow
  always_comb begin
    out_wr   = 1'b0;
    out_word = '0;
    l_rd     = 1'b0;
    d_rd     = 1'b0;
    if (!sending) begin
      if (!l_empty && out_rdy) begin
        out_wr   = 1'b1;
        l_rd     = 1'b1;
        out_word.ctrl = IO_QUEUE_CTRL;
        out_word.data = {16'h0, l_head.words, 13'h0, PORT_NUM, l_head.bytes};
      end
    end else if (!d_empty && out_rdy) begin
      out_wr        = 1'b1;
      d_rd          = 1'b1;
      out_word.data = d_head.data;
      out_word.ctrl = d_head.last ? eop_ctrl(d_head.bytes) : 8'h00;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sending <= 1'b0;
    else if (l_rd) sending <= 1'b1;
    else if (d_rd && d_head.last) sending <= 1'b0;
  end

endmodule
