// output_port_selector -- takes the forwarding decision for each packet of
// the zFormation node: which outgoing links it leaves on and with what TTL.
//
// How it works: the packet is observed word by word as it is written into the
// packet store. A header parser and word counter pick out the incoming queue
// (I/O queue header), the ethertype (frame word 1), the 256-bit nonce I
// (words 2..5), the TTL (word 6) and the 256-bit in-packet Bloom filter
// (words 7..10). For every outgoing link a cipher instance computes
// F3(K3, I xor O2[link]): with CIPHER = CIPHER_MOUSTIQUE it starts on nonce
// word 2 and decrypts 40 bits serially (key: the first 96 bits of K3); with
// CIPHER_AES it starts once nonce words 2 and 3 are in and encrypts 128 bits
// in 12 clocks (key: the first 128 bits of K3). do_zfiltering turns the first
// 40 cipher bits into a 5-hot Bloom mask and matches it against the filter;
// in parallel bit_counter, the ethertype check (0xACDC) and the TTL check
// (non-zero) run. Combining: a link is selected when its mask matches, it is
// not the link the packet came in on, and all three checks pass. The
// register block for K3 / O2 sits inside this module on the register bus.
//
// Interface and timing: in_wr/in_word is the accepted packet-bus stream.
// ready is high while no packet is in progress; the caller must not start a
// new packet otherwise. dec_valid pulses once per packet with dec_links (bit l
// = Ethernet link l), dec_drop and dec_ttl (received TTL minus one). With AES
// the decision comes 15 clocks after nonce word 3, with Moustique 43 clocks
// after nonce word 2, or 3 clocks after the last filter word if that is later.
// A packet that ends before its filter is complete is dropped.
// Follows the document: the block structure, the field positions of the
// forwarding header, the ciphers per link, the checks and their combination.
// Own choices: which K3 / O2 bits feed the ciphers, the bit order of masks,
// removing only Ethernet (even-numbered) incoming queues from the selection,
// and holding off the next packet until the decision is out. The assertion
// at the end is disabled during reset, so lint reports rst_n as used both
// asynchronously and synchronously; that is intended.
module output_port_selector
  import zf_pkg::*;
#(
  parameter cipher_e                CIPHER    = CIPHER_AES,
  parameter int                     MAX_ONES  = 128,
  parameter logic [REG_ADDR_W-1:0]  BASE_ADDR = 23'h040000
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // observed packet stream
  input  logic                 in_wr,
  input  pkt_word_t            in_word,
  output logic                 ready,
  // decision
  output logic                 dec_valid,
  output logic [NUM_LINKS-1:0] dec_links,
  output logic                 dec_drop,
  output logic [7:0]           dec_ttl,
  // register bus
  input  reg_bus_t             reg_in,
  output reg_bus_t             reg_out
);
  localparam int OUT_BITS = BF_K * IDX_W;

  // ---------------------------------------------------------- registers
  logic [KEY_BITS-1:0]               k3;
  logic [NUM_LINKS-1:0][O2_BITS-1:0] o2;
  logic                              keys_written, initialized;
  logic [31:0]                       fwd_count, drop_count;

  zf_registers #(.BASE_ADDR(BASE_ADDR)) u_regs (
    .clk, .rst_n, .reg_in, .reg_out, .k3, .o2, .keys_written,
    .initialized, .fwd_count, .drop_count
  );

  // ------------------------------------------------- header state parser
  logic        busy, data_seen, eop_seen, decided;
  logic [4:0]  wi;                // frame word number
  logic [2:0]  src_q;             // incoming queue
  logic [15:0] ethertype;
  logic [7:0]  ttl;
  logic [63:0] nonce_w0;          // first nonce word, kept for AES
  logic [BF_M-1:0] bf;
  logic        hdr_done, hdr_ok;

  logic       is_data, is_eop, frame_word;
  logic [4:0] cur_wi;

  assign is_data    = in_wr && (in_word.ctrl == 8'h00);
  assign is_eop     = in_wr && data_seen && (in_word.ctrl != 8'h00);
  assign frame_word = is_data || is_eop;
  assign cur_wi     = data_seen ? wi : 5'd0;

  // ------------------------------------------------------------ ciphers
  logic                                   start;
  logic [NUM_LINKS-1:0][OUT_BITS-1:0]     lk_bits;
  logic [NUM_LINKS-1:0]                   lk_done, lk_flag;
  logic                                   cipher_started;

  generate
    if (CIPHER == CIPHER_MOUSTIQUE) begin : g_moustique
      logic [NUM_LINKS-1:0] lk_init;
      assign start = frame_word && (cur_wi == 5'(W_NONCE0));
      for (genvar l = 0; l < NUM_LINKS; l++) begin : g_link
        logic [63:0] x;
        assign x = in_word.data ^ o2[l][O2_BITS-1 -: 64];
        moustique #(.OUT_BITS(OUT_BITS)) u_mq (
          .clk, .rst_n,
          .key(k3[KEY_BITS-1 -: MQ_KEY]),
          .start_initialization(keys_written),
          .start_moustique(start),
          .cipher_in(x[63 -: OUT_BITS]),
          .decrypted_data(lk_bits[l]),
          .decrypted_data_ready(lk_done[l]),
          .initialized(lk_init[l])
        );
      end
      assign initialized = &lk_init;
    end else begin : g_aes
      assign start = frame_word && (cur_wi == 5'(W_NONCE0 + 1));
      for (genvar l = 0; l < NUM_LINKS; l++) begin : g_link
        logic [127:0] txt, ct;
        logic         aes_busy;
        assign txt = {nonce_w0, in_word.data} ^ o2[l][O2_BITS-1 -: 128];
        aes_cipher_top u_aes (
          .clk, .rst_n, .ld(start), .key(k3[KEY_BITS-1 -: 128]),
          .text_in(txt), .text_out(ct), .done(lk_done[l]), .busy(aes_busy)
        );
        assign lk_bits[l] = ct[127 -: OUT_BITS];
      end
      assign initialized = 1'b1;
    end
  endgenerate

  // ------------------------------------------------------ verification
  logic [8:0] ones;
  logic       too_many;

  bit_counter #(.MAX_ONES(MAX_ONES)) u_bits (
    .clk, .rst_n,
    .clear(frame_word && cur_wi == 5'(W_BF0)),
    .word_valid(frame_word && cur_wi >= 5'(W_BF0) && cur_wi <= 5'(W_HDR_LAST)),
    .word(in_word.data), .count(ones), .too_many
  );

  logic               check, match_valid, checking;
  logic [NUM_LINKS-1:0] match;

  do_zfiltering u_zf (
    .clk, .rst_n, .check, .bf, .link_bits(lk_bits), .match, .match_valid
  );

  // results are ready when the header is complete and the ciphers are done
  assign check = busy && hdr_done && !decided && !match_valid && !dec_valid &&
                 (&lk_flag || !cipher_started) && !checking;

  // --------------------------------------------------- combine results
  logic [NUM_LINKS-1:0] in_link, sel;
  always_comb begin
    in_link = '0;
    if (!src_q[0]) in_link[src_q[2:1]] = 1'b1;  // Ethernet queues are even
    sel = match & ~in_link;
    if (!hdr_ok || ethertype != ZF_ETHERTYPE || ttl == 8'd0 || too_many ||
        !cipher_started)
      sel = '0;
  end

  assign ready = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; data_seen <= 1'b0; eop_seen <= 1'b0; decided <= 1'b0;
      wi <= '0; src_q <= '0; ethertype <= '0; ttl <= '0; nonce_w0 <= '0;
      bf <= '0; hdr_done <= 1'b0; hdr_ok <= 1'b0;
      lk_flag <= '0; cipher_started <= 1'b0; checking <= 1'b0;
      dec_valid <= 1'b0; dec_links <= '0; dec_drop <= 1'b0; dec_ttl <= '0;
      fwd_count <= '0; drop_count <= '0;
    end else begin
      dec_valid <= 1'b0;
      // a new packet starts
      if (in_wr && !busy) begin
        busy <= 1'b1; eop_seen <= 1'b0; decided <= 1'b0;
        hdr_done <= 1'b0; hdr_ok <= 1'b0; lk_flag <= '0;
        cipher_started <= 1'b0; src_q <= '0;
        ethertype <= '0; ttl <= '0;
      end
      // header parser and word counter
      if (in_wr) begin
        if (!data_seen && in_word.ctrl == IO_QUEUE_CTRL)
          src_q <= in_word.data[IOQ_SRC_LO +: 3];
        if (frame_word) begin
          data_seen <= !is_eop;
          wi        <= (cur_wi == 5'd31) ? cur_wi : cur_wi + 5'd1;
          case (int'(cur_wi))
            W_ETHERTYPE: ethertype <= in_word.data[31:16];
            W_NONCE0:    nonce_w0  <= in_word.data;
            W_TTL:       ttl       <= in_word.data[31:24];
            default: ;
          endcase
          if (cur_wi >= 5'(W_BF0) && cur_wi <= 5'(W_HDR_LAST))
            bf[BF_M-1-64*(int'(cur_wi)-W_BF0) -: 64] <= in_word.data;
          if (cur_wi == 5'(W_HDR_LAST)) begin
            hdr_done <= 1'b1;
            hdr_ok   <= 1'b1;
          end else if (is_eop) begin
            hdr_done <= 1'b1;          // short packet, dropped
          end
          if (is_eop) eop_seen <= 1'b1;
        end
      end
      if (start) cipher_started <= 1'b1;
      lk_flag <= (in_wr && !busy) ? '0 : (lk_flag | lk_done);
      // decision
      if (check) checking <= 1'b1;
      if (match_valid && checking) begin
        checking  <= 1'b0;
        decided   <= 1'b1;
        dec_valid <= 1'b1;
        dec_links <= sel;
        dec_drop  <= (sel == '0);
        dec_ttl   <= ttl - 8'd1;
        if (sel == '0) drop_count <= drop_count + 32'd1;
        else           fwd_count  <= fwd_count + 32'd1;
      end
      // the packet is finished when both its end and its decision are seen
      if (busy && (decided || (match_valid && checking)) &&
          (eop_seen || is_eop))
        busy <= 1'b0;
    end
  end

  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
                                 dec_valid |-> decided);

endmodule
