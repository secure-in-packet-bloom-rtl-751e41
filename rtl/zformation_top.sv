// zformation_top -- user datapath of an in-packet Bloom filter forwarding
// node with dynamically computed, per-packet link identifiers (zFormation).
//
// The node forwards source-routed packets that carry a 256-bit Bloom filter
// (the iBF) and a 256-bit nonce I. Instead of a table of fixed link
// identifiers it computes, for each of its four Ethernet links, a 5-hot
// 256-bit link identifier from F3(K3, I xor O2[link]) (AES-128 or the
// Moustique stream cipher, chosen by CIPHER) and forwards the packet on every
// link whose identifier is contained in the iBF, provided the ethertype is
// 0xACDC, the TTL is non-zero and the iBF has no more than MAX_ONES ones.
// K3 and the per-link O2 values are written over the register bus.
//
// Structure: eight rx_queue instances (even numbers: Ethernet MAC ports 0..3,
// odd: host DMA ports 0..3) -> input_arbiter -> output_queues (packet store,
// output_port_selector with the per-link ciphers, do_zfiltering, bit_counter,
// ethertype / TTL checks and the register block) -> eight tx_queue instances.
// The MACs, the DMA engine and the register bus master are outside; their
// frame streams and the register bus are the ports of this module.
//
// Interface: frame streams per queue q (rx_* in, tx_* out) with valid/ready
// handshakes and frame_word_t words (64-bit data, last flag, valid bytes of
// the last word); reg_in / reg_out is the chained register bus, one clock
// through. All logic runs on clk (125 MHz in the reference platform) with an
// active-low asynchronous reset. The pipeline arrangement follows the
// document; queue depths and the base address are this design's choices.
module zformation_top
  import zf_pkg::*;
#(
  parameter cipher_e               CIPHER    = CIPHER_AES,
  parameter int                    MAX_ONES  = 128,
  parameter logic [REG_ADDR_W-1:0] BASE_ADDR = 23'h040000,
  parameter int                    RXQ_DEPTH = 512,
  parameter int                    TXQ_DEPTH = 512,
  parameter int                    IA_DEPTH  = 32,
  parameter int                    BUF_DEPTH = 1024,
  parameter int                    OQ_DEPTH  = 512
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic        [NUM_QUEUES-1:0] rx_valid,
  input  frame_word_t [NUM_QUEUES-1:0] rx_word,
  output logic        [NUM_QUEUES-1:0] rx_ready,
  output logic        [NUM_QUEUES-1:0] tx_valid,
  output frame_word_t [NUM_QUEUES-1:0] tx_word,
  input  logic        [NUM_QUEUES-1:0] tx_ready,
  input  reg_bus_t                     reg_in,
  output reg_bus_t                     reg_out
);

  logic      [NUM_QUEUES-1:0] rq_wr, rq_rdy, oq_wr, oq_rdy;
  pkt_word_t [NUM_QUEUES-1:0] rq_word, oq_word;
  logic      ia_wr, ia_rdy;
  pkt_word_t ia_word;

  for (genvar q = 0; q < NUM_QUEUES; q++) begin : g_q
    rx_queue #(.DEPTH(RXQ_DEPTH), .PORT_NUM(3'(q))) u_rxq (
      .clk, .rst_n, .rx_valid(rx_valid[q]), .rx_word(rx_word[q]),
      .rx_ready(rx_ready[q]), .out_wr(rq_wr[q]), .out_word(rq_word[q]),
      .out_rdy(rq_rdy[q])
    );
    tx_queue #(.DEPTH(TXQ_DEPTH)) u_txq (
      .clk, .rst_n, .in_wr(oq_wr[q]), .in_word(oq_word[q]), .in_rdy(oq_rdy[q]),
      .tx_valid(tx_valid[q]), .tx_word(tx_word[q]), .tx_ready(tx_ready[q])
    );
  end

  input_arbiter #(.IN_DEPTH(IA_DEPTH)) u_arb (
    .clk, .rst_n, .in_wr(rq_wr), .in_word(rq_word), .in_rdy(rq_rdy),
    .out_wr(ia_wr), .out_word(ia_word), .out_rdy(ia_rdy)
  );

  output_queues #(.CIPHER(CIPHER), .MAX_ONES(MAX_ONES), .BASE_ADDR(BASE_ADDR),
                  .BUF_DEPTH(BUF_DEPTH), .OQ_DEPTH(OQ_DEPTH)) u_oq (
    .clk, .rst_n, .in_wr(ia_wr), .in_word(ia_word), .in_rdy(ia_rdy),
    .out_wr(oq_wr), .out_word(oq_word), .out_rdy(oq_rdy), .reg_in, .reg_out
  );

endmodule
