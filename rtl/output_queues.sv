// output_queues -- stores each packet until its forwarding decision is known,
// then copies it into the output queue of every selected port, with the
// destination field and the TTL rewritten.
//
// How it works: accepted words go into a packet store (a FIFO of BUF_DEPTH
// bus words) and, in the same cycle, to the output_port_selector, which
// computes the decision while the packet is still arriving. Decisions wait in
// a small FIFO in packet order. A reader takes the next decision and streams
// the corresponding packet out of the store: a dropped packet is read and
// discarded; a forwarded one is written word by word into all selected
// output queues at once (stalling while any of them is full), with the I/O
// queue header's one-hot destination field set to the selected queues and
// the TTL byte (frame word 6) replaced by the decremented TTL. Ethernet link l
// is output queue 2l; odd queues (towards the host) receive nothing here.
//
// Interface and timing: packet bus in (in_wr, in_word, in_rdy) and eight
// packet buses out (out_wr, out_word, out_rdy). A word is transferred in any
// cycle where wr and rdy are both high; wr is only raised with rdy high.
// in_rdy drops between packets while the selector is still busy with the
// previous packet, and whenever the store or decision FIFO is full. The
// document keeps the packets in the board's SRAM; here the store is an
// on-chip memory, and its size, the queue depths and the copy-to-all-ports
// scheme are this design's choices. The protocol assertions are disabled
// during reset, so lint tools report rst_n as used both asynchronously (the
// flops) and synchronously (the assertion); that is intended.
module output_queues
  import zf_pkg::*;
#(
  parameter cipher_e                CIPHER    = CIPHER_AES,
  parameter int                     MAX_ONES  = 128,
  parameter logic [REG_ADDR_W-1:0]  BASE_ADDR = 23'h040000,
  parameter int                     BUF_DEPTH = 1024,
  parameter int                     OQ_DEPTH  = 512,
  parameter int                     DEC_DEPTH = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_wr,
  input  pkt_word_t                  in_word,
  output logic                       in_rdy,
  output logic      [NUM_QUEUES-1:0] out_wr,
  output pkt_word_t [NUM_QUEUES-1:0] out_word,
  input  logic      [NUM_QUEUES-1:0] out_rdy,
  input  reg_bus_t                   reg_in,
  output reg_bus_t                   reg_out
);

  typedef struct packed {
    logic [NUM_LINKS-1:0] links;
    logic                 drop;
    logic [7:0]           ttl;
  } decision_t;

  // ------------------------------------------------------------ writer
  logic w_in_pkt, w_data_seen;
  logic buf_full, buf_empty, buf_rd;
  pkt_word_t buf_head;
  logic [$clog2(BUF_DEPTH):0] buf_cnt;
  logic ops_ready;
  logic dec_full, dec_empty, dec_rd;
  decision_t dec_head, dec_in;
  logic [$clog2(DEC_DEPTH):0] dec_cnt;
  logic dec_valid, dec_drop;
  logic [NUM_LINKS-1:0] dec_links;
  logic [7:0] dec_ttl;

  assign in_rdy = !buf_full && (w_in_pkt || (ops_ready && !dec_full));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_in_pkt    <= 1'b0;
      w_data_seen <= 1'b0;
    end else if (in_wr) begin
      if (!w_in_pkt) begin
        w_in_pkt    <= 1'b1;
        w_data_seen <= (in_word.ctrl == 8'h00);
      end else if (in_word.ctrl == 8'h00) begin
        w_data_seen <= 1'b1;
      end else if (w_data_seen) begin
        w_in_pkt    <= 1'b0;
        w_data_seen <= 1'b0;
      end
    end
  end

  sync_fifo #(.T(pkt_word_t), .DEPTH(BUF_DEPTH)) u_store (
    .clk, .rst_n, .wr_en(in_wr), .wr_data(in_word), .rd_en(buf_rd),
    .rd_data(buf_head), .full(buf_full), .empty(buf_empty), .count(buf_cnt)
  );

  output_port_selector #(.CIPHER(CIPHER), .MAX_ONES(MAX_ONES),
                         .BASE_ADDR(BASE_ADDR)) u_ops (
    .clk, .rst_n, .in_wr, .in_word, .ready(ops_ready),
    .dec_valid, .dec_links, .dec_drop, .dec_ttl, .reg_in, .reg_out
  );

  assign dec_in = '{links: dec_links, drop: dec_drop, ttl: dec_ttl};

  sync_fifo #(.T(decision_t), .DEPTH(DEC_DEPTH)) u_dec (
    .clk, .rst_n, .wr_en(dec_valid), .wr_data(dec_in), .rd_en(dec_rd),
    .rd_data(dec_head), .full(dec_full), .empty(dec_empty), .count(dec_cnt)
  );

  // ------------------------------------------------------------ reader
  logic                  r_active, r_data_seen;
  logic [4:0]            r_wi;
  decision_t             cur;
  logic [NUM_QUEUES-1:0] sel_q, oq_full, oq_empty, oq_wr;
  pkt_word_t             mod_word;
  logic                  r_eop, can_move;

  always_comb begin
    sel_q = '0;
    for (int l = 0; l < NUM_LINKS; l++) sel_q[2*l] = cur.links[l] && !cur.drop;
  end

  assign r_eop    = r_data_seen && (buf_head.ctrl != 8'h00);
  assign can_move = r_active && !buf_empty && ((sel_q & oq_full) == '0);
  assign buf_rd   = can_move;
  assign dec_rd   = !r_active && !dec_empty;
  assign oq_wr    = can_move ? sel_q : '0;

  always_comb begin
    mod_word = buf_head;
    if (!r_data_seen && buf_head.ctrl == IO_QUEUE_CTRL)
      mod_word.data[IOQ_DST_HI:IOQ_DST_LO] = 16'(sel_q);
    if (buf_head.ctrl == 8'h00 && r_data_seen && int'(r_wi) == W_TTL)
      mod_word.data[31:24] = cur.ttl;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_active    <= 1'b0;
      r_data_seen <= 1'b0;
      r_wi        <= '0;
      cur         <= '0;
    end else begin
      if (dec_rd) begin
        r_active    <= 1'b1;
        r_data_seen <= 1'b0;
        r_wi        <= '0;
        cur         <= dec_head;
      end else if (can_move) begin
        if (r_eop) begin
          r_active    <= 1'b0;
          r_data_seen <= 1'b0;
        end else if (buf_head.ctrl == 8'h00) begin
          if (!r_data_seen)       r_wi <= 5'd1;
          else if (r_wi != 5'd31) r_wi <= r_wi + 5'd1;
          r_data_seen <= 1'b1;
        end
      end
    end
  end

  // ------------------------------------------------------ output queues
  for (genvar q = 0; q < NUM_QUEUES; q++) begin : g_oq
    logic [$clog2(OQ_DEPTH):0] cnt;
    sync_fifo #(.T(pkt_word_t), .DEPTH(OQ_DEPTH)) u_oq (
      .clk, .rst_n, .wr_en(oq_wr[q]), .wr_data(mod_word),
      .rd_en(out_wr[q]), .rd_data(out_word[q]), .full(oq_full[q]),
      .empty(oq_empty[q]), .count(cnt)
    );
    assign out_wr[q] = !oq_empty[q] && out_rdy[q];
  end

  a_wr_when_rdy: assert property (@(posedge clk) disable iff (!rst_n)
                                  in_wr |-> in_rdy);

endmodule
