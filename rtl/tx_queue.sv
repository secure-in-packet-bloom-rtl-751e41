// tx_queue -- transmit queue of one port: takes packets from the packet bus,
// strips the module headers and hands the frame to the MAC (or the host DMA
// engine).
//
// How it works: words whose ctrl is non-zero before the first frame word are
// module headers and are dropped; frame words (ctrl 0x00) are stored with
// last = 0; the end word (first non-zero ctrl after frame words) is stored
// with last = 1 and the number of valid bytes decoded from the one-hot end
// marker. The frame side reads the FIFO.
//
// Interface and timing: packet side in_wr/in_word/in_rdy (word moves when wr
// and rdy are high), frame side tx_valid/tx_word/tx_ready. A stored word can
// leave on the next clock (cut through). The packet format is the reference
// pipeline's; the FIFO depth is this design's choice.
module tx_queue
  import zf_pkg::*;
#(
  parameter int DEPTH = 512
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_wr,
  input  pkt_word_t   in_word,
  output logic        in_rdy,
  output logic        tx_valid,
  output frame_word_t tx_word,
  input  logic        tx_ready
);
  logic        full, empty, push, data_seen;
  frame_word_t f_in;
  logic [$clog2(DEPTH):0] cnt;

  assign in_rdy = !full;
  assign push   = in_wr && (in_word.ctrl == 8'h00 || data_seen);
  assign f_in   = '{data: in_word.data, last: (in_word.ctrl != 8'h00),
                    bytes: (in_word.ctrl != 8'h00) ? eop_bytes(in_word.ctrl) : 4'd8};

  sync_fifo #(.T(frame_word_t), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n, .wr_en(push), .wr_data(f_in), .rd_en(tx_valid && tx_ready),
    .rd_data(tx_word), .full, .empty, .count(cnt)
  );
  assign tx_valid = !empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) data_seen <= 1'b0;
    else if (in_wr) begin
      if (in_word.ctrl == 8'h00) data_seen <= 1'b1;
      else if (data_seen)        data_seen <= 1'b0;
    end
  end

endmodule
